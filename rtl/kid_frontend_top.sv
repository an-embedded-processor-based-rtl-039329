// kid_frontend_top: FPGA front end of a Kinetic Inductance Detector (KID)
// read-out, i.e. the Frequency Loader peripheral together with the KID
// data-acquisition electronics it drives.
//
// An array of KIDs is read through a single feed line: every pixel is a
// resonator at its own frequency, and a comb of N_TONES sinusoids, one per
// resonator, is sent along the line. The returning signal is demodulated
// tone by tone by N_TONES lock-ins, which give the amplitude and phase of each
// resonator. An embedded processor on an AXI4-Lite bus writes the tone
// frequencies, one 32-bit word per tone, through the Frequency Loader and then
// raises the Frequencies OK flag; the generators restart on the new set and
// the lock-ins start integrating.
//
// Ports:
//  * s_axi_*      AXI4-Lite slave of the Frequency Loader (processor clock).
//  * kid_clk      sampling clock of generators, DAC, ADC and lock-ins.
//  * comb_signal  15-bit comb stimulus to the DAC; adc_data is the 14-bit
//                 read-out sample from the ADC.
//  * frequencies_to_kid, flags_to_kid, frequencies_ok, write_enable,
//                 words_loaded: the transfer, for observation.
//  * data_available/data_ack/overrun/window_count and rd_ch/rd_i/rd_q: the
//                 results of the last completed lock-in window, for the
//                 processor or a DMA engine that copies them to memory.
// The processor, bus interconnect, DDR3 memory, PCI Express DMA, UART, DAC,
// ADC and the detector itself are outside this module.
//
// The partition into Frequency Loader, generators, adder and lock-ins and
// their count follow the description; the result port and the data-available
// handshake are this design's choices.
module kid_frontend_top
  import kid_pkg::*;
#(
  parameter int N        = N_TONES,
  parameter int AVG_LOG2 = 10
) (
  input  logic        s_axi_aclk,
  input  logic        s_axi_aresetn,
  input  logic [3:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [3:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,

  input  logic        kid_clk,
  input  logic        kid_rst_n,
  output comb_t       comb_signal,
  input  adc_t        adc_data,

  output freq_word_t  frequencies_to_kid,
  output logic [31:0] flags_to_kid,
  output logic        frequencies_ok,
  output logic        write_enable,
  output logic [TONE_ADDR_W:0] words_loaded,

  output logic        acquiring,
  output logic        data_available,
  input  logic        data_ack,
  output logic        overrun,
  output logic [31:0] window_count,
  input  tone_addr_t  rd_ch,
  output result_t     rd_i,
  output result_t     rd_q
);

  logic       buf_we;
  tone_addr_t buf_addr;
  freq_t      buf_data;

  frequency_loader u_loader (
    .s_axi_aclk        (s_axi_aclk),
    .s_axi_aresetn     (s_axi_aresetn),
    .s_axi_awaddr      (s_axi_awaddr),
    .s_axi_awvalid     (s_axi_awvalid),
    .s_axi_awready     (s_axi_awready),
    .s_axi_wdata       (s_axi_wdata),
    .s_axi_wstrb       (s_axi_wstrb),
    .s_axi_wvalid      (s_axi_wvalid),
    .s_axi_wready      (s_axi_wready),
    .s_axi_bresp       (s_axi_bresp),
    .s_axi_bvalid      (s_axi_bvalid),
    .s_axi_bready      (s_axi_bready),
    .s_axi_araddr      (s_axi_araddr),
    .s_axi_arvalid     (s_axi_arvalid),
    .s_axi_arready     (s_axi_arready),
    .s_axi_rdata       (s_axi_rdata),
    .s_axi_rresp       (s_axi_rresp),
    .s_axi_rvalid      (s_axi_rvalid),
    .s_axi_rready      (s_axi_rready),
    .frequencies_to_kid(frequencies_to_kid),
    .flags_to_kid      (flags_to_kid),
    .kid_clk           (kid_clk),
    .kid_rst_n         (kid_rst_n),
    .buf_we            (buf_we),
    .buf_addr          (buf_addr),
    .buf_data          (buf_data),
    .frequencies_ok    (frequencies_ok),
    .words_loaded      (words_loaded)
  );

  daq_core #(.N(N), .AVG_LOG2(AVG_LOG2)) u_daq (
    .clk           (kid_clk),
    .rst_n         (kid_rst_n),
    .buf_we        (buf_we),
    .buf_addr      (buf_addr),
    .buf_data      (buf_data),
    .freq_ok       (frequencies_ok),
    .comb_o        (comb_signal),
    .adc_i         (adc_data),
    .write_enable  (write_enable),
    .acquiring     (acquiring),
    .data_available(data_available),
    .data_ack      (data_ack),
    .overrun       (overrun),
    .window_count  (window_count),
    .rd_ch         (rd_ch),
    .rd_i          (rd_i),
    .rd_q          (rd_q)
  );

endmodule

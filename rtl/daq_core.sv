// daq_core: the KID data-acquisition electronics, i.e. N sinusoid generators,
// the comb adder and N lock-ins, with the frequency buffer that feeds the
// generators and the control that manages the lock-ins.
//
// Data flow: the Frequency Loader writes one frequency word per tone into the
// buffer. Its frequencies_ok pulse becomes Write Enable one clock later, which
// restarts every generator from phase zero on its buffered word. The sines of
// all generators are summed into the comb stimulus (comb_o, to the DAC). The
// read-out signal that comes back from the KID array through the ADC (adc_i)
// is fed to every lock-in, which multiplies it by its own tone's cosine and
// sine and averages the products over windows of 2**AVG_LOG2 samples. The
// lock-ins of all tones run in lock step, so one window ends for all of them
// at once: data_available then rises and the 2*N means can be read through
// rd_ch/rd_i/rd_q (tone number in, in-phase and quadrature mean out,
// combinational). data_ack clears data_available; a window that ends before
// the previous one was acknowledged sets overrun.
//
// The comb sample for generator output n leaves comb_o log2(N) clocks later.
// The delay from comb_o through DAC, KID array and ADC back to adc_i is
// outside this block; it rotates the measured (I, Q) phase by a constant
// angle per tone and does not change the measured amplitude.
//
// The block list (128 generators, an adder, 128 lock-ins made of a multiplier
// and a mean-value unit) follows the description; the internal timing and the
// read-out port are this design's choices.
module daq_core
  import kid_pkg::*;
#(
  parameter int N        = N_TONES,
  parameter int AVG_LOG2 = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // frequency buffer write port, from the Frequency Loader
  input  logic        buf_we,
  input  tone_addr_t  buf_addr,
  input  freq_t       buf_data,
  input  logic        freq_ok,
  // KID array interface
  output comb_t       comb_o,
  input  adc_t        adc_i,
  // control and status
  output logic        write_enable,
  output logic        acquiring,
  output logic        data_available,
  input  logic        data_ack,
  output logic        overrun,
  output logic [31:0] window_count,
  // result read port
  input  tone_addr_t  rd_ch,
  output result_t     rd_i,
  output result_t     rd_q
);

  freq_t   freq    [N];
  sample_t sin_w   [N];
  sample_t cos_w   [N];
  result_t mean_i  [N];
  result_t mean_q  [N];
  logic    [N-1:0] gen_running;
  logic    [N-1:0] li_valid;
  logic    sample_valid, sample_last, window_done;

  freq_buffer #(.N(N)) u_buffer (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (buf_we),
    .waddr (buf_addr),
    .wdata (buf_data),
    .freq_o(freq)
  );

  lockin_control #(.AVG_LOG2(AVG_LOG2), .LOCKIN_LAT(2)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .freq_ok       (freq_ok),
    .data_ack      (data_ack),
    .write_enable  (write_enable),
    .acquiring     (acquiring),
    .sample_valid  (sample_valid),
    .sample_last   (sample_last),
    .window_done   (window_done),
    .data_available(data_available),
    .overrun       (overrun),
    .window_count  (window_count)
  );

  for (genvar i = 0; i < N; i++) begin : g_tone
    sinusoid_generator u_gen (
      .clk    (clk),
      .rst_n  (rst_n),
      .load   (write_enable),
      .freq_i (freq[i]),
      .sin_o  (sin_w[i]),
      .cos_o  (cos_w[i]),
      .running(gen_running[i])
    );

    lock_in #(.AVG_LOG2(AVG_LOG2)) u_lockin (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_clear (write_enable),
      .in_valid (sample_valid),
      .in_last  (sample_last),
      .adc_i    (adc_i),
      .ref_cos_i(cos_w[i]),
      .ref_sin_i(sin_w[i]),
      .i_o      (mean_i[i]),
      .q_o      (mean_q[i]),
      .out_valid(li_valid[i])
    );
  end

  comb_adder #(.N(N)) u_adder (
    .clk   (clk),
    .rst_n (rst_n),
    .tone_i(sin_w),
    .comb_o(comb_o)
  );

  always_comb begin
    rd_i = '0;
    rd_q = '0;
    if (int'(rd_ch) < N) begin
      rd_i = mean_i[rd_ch[$clog2(N > 1 ? N : 2)-1:0]];
      rd_q = mean_q[rd_ch[$clog2(N > 1 ? N : 2)-1:0]];
    end
  end

  // The control's window bookkeeping must agree with the lock-ins, and the
  // generators must be producing whenever a sample is taken.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (li_valid == (window_done ? '1 : '0))
        else $error("daq_core: lock-in results out of step with window_done");
      assert (!sample_valid || gen_running == '1)
        else $error("daq_core: sample taken while a generator is idle");
    end
  end

endmodule

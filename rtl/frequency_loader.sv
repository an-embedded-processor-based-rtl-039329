// frequency_loader: the processor peripheral that transfers the frequency set
// into the frequency buffer of the sinusoid generators.
//
// Processor side (AXI4-Lite slave, clock s_axi_aclk) it holds two 32-bit
// registers:
//   offset 0x0  frequencies_to_kid: bits 19..0 Data Register (frequency word),
//               bits 27..20 Address Register (tone number), bit 31 Data Strobe
//   offset 0x4  flags_to_kid: bit 0 Frequencies OK request
// Both read back what was written. Byte strobes are honoured.
//
// The transfer protocol: for every tone the processor writes frequency and
// address with the strobe low, then the same word with the strobe high, holds
// it high (480 ns in the reference software, 120 cycles of a 250 MHz clock)
// and writes it low again. After the last word it raises the Frequencies OK
// flag bit. The strobe is long on purpose: the KID side runs on its own clock
// (kid_clk), so it passes the strobe and the flag through two-flop
// synchronisers and reads the data and address fields, which are stable for
// as long as the strobe is high, only after the synchronised strobe has risen.
//
// KID side (kid_clk): a state machine waits for the synchronised strobe, writes
// the word into the buffer (buf_we high for one clock with buf_addr/buf_data),
// and then waits for the strobe to drop before it accepts the next word. A
// rising edge of the synchronised flag bit gives a one-clock frequencies_ok
// pulse, which starts the generators on the new set. words_loaded counts the
// words written since the last frequencies_ok. The strobe must stay high for
// at least three kid_clk periods plus one s_axi_aclk period.
//
// The two registers, their bit fields, the strobe-validated transfer and the
// Frequencies OK flag follow the description. The register offsets, the
// placement of the flag in bit 0 of a second register, the synchronisers and
// the two-clock structure are this design's choices.
module frequency_loader
  import kid_pkg::*;
(
  // AXI4-Lite slave, processor clock domain
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
  // register contents, for observation
  output freq_word_t  frequencies_to_kid,
  output logic [31:0] flags_to_kid,
  // KID clock domain
  input  logic        kid_clk,
  input  logic        kid_rst_n,
  output logic        buf_we,
  output tone_addr_t  buf_addr,
  output freq_t       buf_data,
  output logic        frequencies_ok,
  output logic [TONE_ADDR_W:0] words_loaded
);

  // ---------------------------------------------------------------- AXI side
  logic        aw_full, w_full;
  logic [3:0]  aw_addr;
  logic [31:0] w_data;
  logic [3:0]  w_strb;

  function automatic logic [31:0] apply_strb(logic [31:0] old_v, logic [31:0] new_v,
                                             logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? new_v[8*b +: 8] : old_v[8*b +: 8];
    return r;
  endfunction

  assign s_axi_awready = !aw_full && !s_axi_bvalid;
  assign s_axi_wready  = !w_full  && !s_axi_bvalid;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;
  assign s_axi_arready = !s_axi_rvalid;

  always_ff @(posedge s_axi_aclk or negedge s_axi_aresetn) begin
    if (!s_axi_aresetn) begin
      aw_full            <= 1'b0;
      w_full             <= 1'b0;
      aw_addr            <= '0;
      w_data             <= '0;
      w_strb             <= '0;
      s_axi_bvalid       <= 1'b0;
      frequencies_to_kid <= '0;
      flags_to_kid       <= '0;
    end else begin
      if (s_axi_awvalid && s_axi_awready) begin
        aw_full <= 1'b1;
        aw_addr <= s_axi_awaddr;
      end
      if (s_axi_wvalid && s_axi_wready) begin
        w_full <= 1'b1;
        w_data <= s_axi_wdata;
        w_strb <= s_axi_wstrb;
      end
      if (aw_full && w_full && !s_axi_bvalid) begin
        unique case ({aw_addr[3:2], 2'b00})
          REG_FREQ:  frequencies_to_kid <= apply_strb(frequencies_to_kid, w_data, w_strb);
          REG_FLAGS: flags_to_kid       <= apply_strb(flags_to_kid, w_data, w_strb);
          default: ;
        endcase
        aw_full      <= 1'b0;
        w_full       <= 1'b0;
        s_axi_bvalid <= 1'b1;
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  always_ff @(posedge s_axi_aclk or negedge s_axi_aresetn) begin
    if (!s_axi_aresetn) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else if (s_axi_arvalid && s_axi_arready) begin
      s_axi_rvalid <= 1'b1;
      unique case ({s_axi_araddr[3:2], 2'b00})
        REG_FREQ:  s_axi_rdata <= frequencies_to_kid;
        REG_FLAGS: s_axi_rdata <= flags_to_kid;
        default:   s_axi_rdata <= '0;
      endcase
    end else if (s_axi_rvalid && s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- KID side
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_WAIT_LOW} state_t;

  state_t     state;
  logic [1:0] strobe_sync, flag_sync;
  logic       flag_d;
  logic       strobe_s;

  assign strobe_s = strobe_sync[1];

  always_ff @(posedge kid_clk or negedge kid_rst_n) begin
    if (!kid_rst_n) begin
      strobe_sync    <= '0;
      flag_sync      <= '0;
      flag_d         <= 1'b0;
      state          <= S_IDLE;
      buf_we         <= 1'b0;
      buf_addr       <= '0;
      buf_data       <= '0;
      frequencies_ok <= 1'b0;
      words_loaded   <= '0;
    end else begin
      strobe_sync    <= {strobe_sync[0], frequencies_to_kid.strobe};
      flag_sync      <= {flag_sync[0], flags_to_kid[0]};
      flag_d         <= flag_sync[1];
      frequencies_ok <= flag_sync[1] && !flag_d;
      buf_we         <= 1'b0;

      unique case (state)
        S_IDLE: if (strobe_s) state <= S_WRITE;
        S_WRITE: begin
          // fields have been stable for at least two kid clocks
          buf_we   <= 1'b1;
          buf_addr <= frequencies_to_kid.addr;
          buf_data <= frequencies_to_kid.data;
          state    <= S_WAIT_LOW;
        end
        S_WAIT_LOW: if (!strobe_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase

      if (flag_sync[1] && !flag_d) words_loaded <= '0;
      else if (state == S_WRITE)   words_loaded <= words_loaded + 1'b1;
    end
  end

endmodule

// freq_buffer: the frequency buffer that sits between the Frequency Loader and
// the sinusoid generators.
//
// It holds one frequency (tuning) word per tone. The loader writes one word per
// Data Strobe through a single synchronous write port; every word is presented
// in parallel on freq_o, because each generator reads its own word when it is
// (re)started. A write whose address is not below N_TONES is ignored: the
// Address Register is 8 bits wide while only N_TONES slots exist.
//
// Interface: we/waddr/wdata are sampled on the rising edge of clk. freq_o[i]
// shows the new value from the cycle after the write. Reset clears all words.
//
// That the buffer exists and is "directly connected to the Sinusoid
// Generators" follows the description; its organisation as a register file
// with parallel outputs and its reset value are this design's choices.
module freq_buffer
  import kid_pkg::*;
#(
  parameter int N = N_TONES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  tone_addr_t waddr,
  input  freq_t      wdata,
  output freq_t      freq_o [N]
);

  localparam int IDX_W = (N > 1) ? $clog2(N) : 1;

  freq_t mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) mem[i] <= '0;
    end else if (we && (int'(waddr) < N)) begin
      mem[IDX_W'(waddr)] <= wdata;
    end
  end

  assign freq_o = mem;

endmodule

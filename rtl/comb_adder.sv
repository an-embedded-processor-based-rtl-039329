// comb_adder: adds the sine outputs of all sinusoid generators into the comb
// stimulus signal sent to the DAC.
//
// A pipelined binary adder tree sums the N signed SIN_W-bit inputs at full
// precision (SIN_W + log2(N) bits, so no sum can overflow). The sum is then
// shifted right arithmetically so that it fits the COMB_W-bit DAC word; for
// the default 128 tones of 14 bits the 21-bit sum is divided by 64. Because
// the worst case |sum| is N * (2**(SIN_W-1) - 1), the shifted value always
// fits COMB_W bits and no saturation is needed.
//
// Interface and timing: one new set of inputs is accepted every clock and the
// comb sample for it appears log2(N) clocks later (one register per tree
// level). N must be a power of two.
//
// The description gives the adder's function and the 15-bit comb width; the
// tree structure and the scaling are this design's choices.
module comb_adder
  import kid_pkg::*;
#(
  parameter int N = N_TONES
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t tone_i [N],
  output comb_t   comb_o
);

  localparam int LEVELS = $clog2(N);
  localparam int SUM_W  = SIN_W + LEVELS;
  localparam int SHIFT  = (SUM_W > COMB_W) ? SUM_W - COMB_W : 0;

  typedef logic signed [SUM_W-1:0] sum_t;

  // Tree nodes in heap order: node[1] is the root, the children of node[i]
  // are node[2i] and node[2i+1]; nodes N/2 .. N-1 add pairs of inputs. Every
  // node is a register, and all leaves are at the same depth, so each path
  // through the tree has log2(N) registers. node[0] is not used.
  sum_t node [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) node[i] <= '0;
    end else begin
      node[0] <= '0;
      for (int i = N / 2; i < N; i++)
        node[i] <= sum_t'(tone_i[2*i - N]) + sum_t'(tone_i[2*i + 1 - N]);
      for (int i = 1; i < N / 2; i++)
        node[i] <= node[2*i] + node[2*i + 1];
    end
  end

  assign comb_o = comb_t'(node[1] >>> SHIFT);

  initial assert (N >= 2 && N == 2**LEVELS) else $error("comb_adder: N must be a power of two");

endmodule

// lock_in: one lock-in channel, a multiplier followed by a mean-value unit.
//
// The read-out sample from the ADC is multiplied by the cosine and by the sine
// of this channel's tone (the in-phase and quadrature references) and each
// product is summed over a window of 2**AVG_LOG2 samples. At the end of the
// window the sums are divided by the window length (arithmetic shift right,
// i.e. rounding towards minus infinity) and presented as the mean values
// i_o and q_o, 32-bit two's complement, one 4-byte word each. For a read-out
// component A*cos(wt + phi) at the tone's frequency, i_o ~ A*SIN_AMP/2*cos(phi)
// and q_o ~ -A*SIN_AMP/2*sin(phi): the amplitude and phase change of the
// resonator are recovered from the pair.
//
// Interface and timing: in_valid marks a sample to be accumulated, in_last
// marks the last sample of a window (it must come with in_valid), and in_clear
// abandons the current window (used when the tone is restarted). The products
// are registered, so the means of a window appear, with out_valid high for one
// clock, two clocks after the clock that carried in_last.
//
// The description names the two parts of a lock-in, Multiplier and Mean
// value; the widths, the window handshake and the power-of-two window length
// are this design's choices.
module lock_in
  import kid_pkg::*;
#(
  parameter int AVG_LOG2 = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_clear,
  input  logic    in_valid,
  input  logic    in_last,
  input  adc_t    adc_i,
  input  sample_t ref_cos_i,
  input  sample_t ref_sin_i,
  output result_t i_o,
  output result_t q_o,
  output logic    out_valid
);

  localparam int PROD_W = ADC_W + SIN_W;
  localparam int ACC_W  = PROD_W + AVG_LOG2;

  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  prod_t prod_i, prod_q;
  logic  p_valid, p_last;
  acc_t  acc_i, acc_q;
  acc_t  sum_i, sum_q;

  // Multiplier stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_i  <= '0;
      prod_q  <= '0;
      p_valid <= 1'b0;
      p_last  <= 1'b0;
    end else begin
      prod_i  <= prod_t'(adc_i) * prod_t'(ref_cos_i);
      prod_q  <= prod_t'(adc_i) * prod_t'(ref_sin_i);
      p_valid <= in_valid && !in_clear;
      p_last  <= in_last && in_valid && !in_clear;
    end
  end

  assign sum_i = acc_i + acc_t'(prod_i);
  assign sum_q = acc_q + acc_t'(prod_q);

  // Mean-value stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i     <= '0;
      acc_q     <= '0;
      i_o       <= '0;
      q_o       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_clear) begin
        acc_i <= '0;
        acc_q <= '0;
      end else if (p_valid) begin
        if (p_last) begin
          i_o       <= result_t'(sum_i >>> AVG_LOG2);
          q_o       <= result_t'(sum_q >>> AVG_LOG2);
          out_valid <= 1'b1;
          acc_i     <= '0;
          acc_q     <= '0;
        end else begin
          acc_i <= sum_i;
          acc_q <= sum_q;
        end
      end
    end
  end

  // Window handshake rule: the last sample of a window is a valid sample.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!in_last || in_valid) else $error("lock_in: in_last without in_valid");
  end

endmodule

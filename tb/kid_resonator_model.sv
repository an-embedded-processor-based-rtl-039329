// kid_resonator_model: behavioural stand-in for DAC, KID array and ADC that
// gives each pixel its own response, for simulation only. Tone k of the
// stimulus comes back scaled by gain[k] and phase-shifted by phase_deg[k]
// degrees: read-out = sum_k gain[k] * sin(theta_k + phase_k), formed from the
// generators' own sine and cosine and divided by N. Because a real resonator
// only acts on the tone at its own frequency, the model works tone by tone
// instead of on the summed comb; the comb itself is checked elsewhere.
// The read-out follows the generator outputs in the same clock (no loop
// delay). The testbench sets the per-pixel response by writing the gain and
// phase_deg arrays of this instance; they start at 1.0 and 0 degrees.
module kid_resonator_model
  import kid_pkg::*;
#(
  parameter int N = N_TONES
) (
  input  logic    clk,
  input  sample_t sin_i [N],
  input  sample_t cos_i [N],
  output adc_t    adc_o
);
  real gain [N];
  real phase_deg [N];

  initial begin
    for (int k = 0; k < N; k++) begin
      gain[k]      = 1.0;
      phase_deg[k] = 0.0;
    end
    adc_o = '0;
  end

  always @(negedge clk) begin
    automatic real acc = 0.0;
    for (int k = 0; k < N; k++) begin
      automatic real ph = phase_deg[k] * 3.14159265358979323846 / 180.0;
      acc += gain[k] * (real'(sin_i[k]) * $cos(ph) + real'(cos_i[k]) * $sin(ph));
    end
    adc_o <= adc_t'($rtoi($floor(acc / real'(N) + 0.5)));
  end
endmodule

// kid_array_model: behavioural stand-in for the DAC, the KID array on its
// feed line and the ADC, for simulation only. It returns the comb stimulus
// as the read-out signal one sample clock later at half amplitude (the 15-bit
// comb word shifted right by one gives the 14-bit ADC word). Real resonators
// would attenuate and phase-shift the tones near their resonances; this model
// is a plain loop-back so that the lock-in results can be predicted exactly.
module kid_array_model
  import kid_pkg::*;
(
  input  logic  clk,
  input  comb_t comb_i,
  output adc_t  adc_o
);
  initial adc_o = '0;
  always @(posedge clk) adc_o <= adc_t'(comb_i >>> 1);
endmodule

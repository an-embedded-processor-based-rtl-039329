// sinusoid_generator: one tone of the comb, a numerically controlled
// oscillator (direct digital synthesis).
//
// A PHASE_W-bit phase accumulator advances by the tone's frequency word every
// clock; its top LUT_AW bits address a sine ROM (filled from the package's
// table at elaboration) for the sine and,
// a quarter period further on, for the cosine. The output frequency is
// f = freq_word * f_clk / 2**PHASE_W (about 238 Hz per step at a 250 MHz
// clock). The sine feeds the comb adder; sine and cosine are the two
// references of the tone's lock-in.
//
// Interface and timing: while load is high (the Write Enable pulse) the
// generator copies freq_i, clears its phase and starts running. From then on
// sin_o/cos_o carry SIN_AMP * sin/cos(2*pi*n*freq_word/2**PHASE_W), rounded,
// for n = 0, 1, 2, ..., sample n = 0 showing one clock after the edge that
// samples load, when running rises. Before the first load the outputs are
// zero, so the comb is silent until a frequency set is loaded.
//
// The description gives the generator's function and its 14-bit sine/cosine
// outputs; the DDS structure, the accumulator width and the table size are
// this design's choices.
module sinusoid_generator
  import kid_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  freq_t   freq_i,
  output sample_t sin_o,
  output sample_t cos_o,
  output logic    running
);

  localparam int QUARTER = 2**(LUT_AW-2);

  logic [PHASE_W-1:0] phase;
  freq_t              ftw;
  logic               active;   // phase register holds a valid phase
  logic [LUT_AW-1:0]  idx_sin, idx_cos;

  // Sine ROM, loaded with the package's table (a block ROM after synthesis).
  sample_t rom [2**LUT_AW];

  initial begin
    for (int k = 0; k < 2**LUT_AW; k++) rom[k] = SINE_TABLE[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= '0;
      ftw     <= '0;
      active  <= 1'b0;
      running <= 1'b0;
    end else if (load) begin
      phase   <= '0;
      ftw     <= freq_i;
      active  <= 1'b1;
      running <= 1'b0;
    end else begin
      if (active) phase <= phase + PHASE_W'(ftw);
      running <= active;
    end
  end

  assign idx_sin = phase[PHASE_W-1 -: LUT_AW];
  assign idx_cos = idx_sin + LUT_AW'(QUARTER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sin_o <= '0;
      cos_o <= '0;
    end else if (active && !load) begin
      sin_o <= rom[idx_sin];
      cos_o <= rom[idx_cos];
    end else begin
      sin_o <= '0;
      cos_o <= '0;
    end
  end

endmodule

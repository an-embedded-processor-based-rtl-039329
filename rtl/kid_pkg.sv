// kid_pkg: constants, types and the sine table shared by the KID read-out
// front end.
//
// The numbers that come from the design description are the number of tones
// (128 sinusoid generators and 128 lock-ins), the layout of the 32-bit word the
// processor writes to the Frequency Loader (frequency in bits 19..0, tone
// address in bits 27..20, Data Strobe in bit 31), the 14-bit sine and cosine
// and the 15-bit comb signal. The phase accumulator width, the sine table
// depth, the ADC sample width and the lock-in result width are this design's
// own choices.
//
// SINE_TABLE holds one full period of round(SIN_AMP * sin(2*pi*k / 2**LUT_AW))
// for k = 0 .. 2**LUT_AW-1. It is computed at elaboration time by a constant
// function, so no data file is needed; synthesis maps it to a ROM.
package kid_pkg;

  // Array size: 128 sinusoid generators and 128 lock-ins.
  localparam int N_TONES     = 128;

  // Fields of the Frequency Loader word (frequencies_to_kid).
  localparam int FREQ_W      = 20;   // Data Register, bits 19..0
  localparam int TONE_ADDR_W = 8;    // Address Register, bits 27..20
  localparam int STROBE_BIT  = 31;   // Data Strobe

  // Signal widths.
  localparam int SIN_W       = 14;   // seno/coseno outputs of a generator
  localparam int COMB_W      = 15;   // comb stimulus to the DAC
  localparam int ADC_W       = 14;   // read-out sample from the ADC (assumed)
  localparam int RESULT_W    = 32;   // one lock-in mean value, one 4-byte word

  // Numerically controlled oscillator (assumed sizes).
  localparam int PHASE_W     = 20;   // phase accumulator = frequency word width
  localparam int LUT_AW      = 10;   // 1024-entry sine table
  localparam int SIN_AMP     = 2**(SIN_W-1) - 1;

  typedef logic        [FREQ_W-1:0]      freq_t;
  typedef logic        [TONE_ADDR_W-1:0] tone_addr_t;
  typedef logic signed [SIN_W-1:0]       sample_t;
  typedef logic signed [COMB_W-1:0]      comb_t;
  typedef logic signed [ADC_W-1:0]       adc_t;
  typedef logic signed [RESULT_W-1:0]    result_t;

  // The 32-bit word the processor writes to the Frequency Loader.
  typedef struct packed {
    logic       strobe;     // bit 31: Data Strobe
    logic [2:0] reserved;   // bits 30..28
    tone_addr_t addr;       // bits 27..20: Address Register
    freq_t      data;       // bits 19..0 : Data Register
  } freq_word_t;

  // Register offsets of the Frequency Loader on its AXI4-Lite port.
  localparam logic [3:0] REG_FREQ  = 4'h0;  // frequencies_to_kid
  localparam logic [3:0] REG_FLAGS = 4'h4;  // flags_to_kid, bit 0 = Frequencies OK

  typedef logic signed [SIN_W-1:0] sine_table_t [2**LUT_AW];

  function automatic sine_table_t make_sine_table();
    sine_table_t t;
    for (int k = 0; k < 2**LUT_AW; k++) begin
      t[k] = sample_t'($rtoi($floor(real'(SIN_AMP) *
                 $sin(2.0 * 3.14159265358979323846 * real'(k) / real'(2**LUT_AW)) + 0.5)));
    end
    return t;
  endfunction

  localparam sine_table_t SINE_TABLE = make_sine_table();

endpackage

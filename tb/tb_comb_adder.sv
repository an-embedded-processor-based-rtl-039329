// tb_comb_adder: drives all 128 inputs with random values, the all-maximum and
// all-minimum corner cases every clock, and checks that each comb sample equals
// the exact sum shifted right by log2(N) + SIN_W - COMB_W bits and appears
// log2(N) clocks after its inputs.
module tb_comb_adder;
  import kid_pkg::*;

  localparam int N      = N_TONES;
  localparam int LAT    = $clog2(N);
  localparam int SHIFT  = SIN_W + LAT - COMB_W;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  sample_t tone_i [N];
  comb_t   comb_o;
  int      expected [$];
  int checks = 0, failures = 0;

  comb_adder dut (.clk, .rst_n, .tone_i, .comb_o);

  always #2 clk = ~clk;

  function automatic int floor_shift(int v, int s);
    // floor(v / 2**s) written without an arithmetic shift
    int d = 1 << s;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  initial begin
    for (int i = 0; i < N; i++) tone_i[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      automatic int s = 0;
      @(negedge clk);
      // compare the output produced by the inputs of LAT clocks ago
      if (expected.size() == LAT) begin
        automatic int e = expected.pop_front();
        checks++;
        if (int'(comb_o) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d comb %0d expected %0d", t, comb_o, e);
        end
      end
      for (int i = 0; i < N; i++) begin
        case (t % 50)
          7:       tone_i[i] = sample_t'(2**(SIN_W-1) - 1);
          8:       tone_i[i] = sample_t'(-(2**(SIN_W-1)));
          default: tone_i[i] = sample_t'($urandom);
        endcase
        s += int'(tone_i[i]);
      end
      expected.push_back(floor_shift(s, SHIFT));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

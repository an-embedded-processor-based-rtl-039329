// tb_sinusoid_generator: loads several frequency words (including the first
// words of the reference transfer, 0x001FE and 0x0038E) and compares the sine
// and cosine, sample by sample, with values computed here from $sin/$cos.
// Also checks that the outputs are zero before the first load, that the first
// sample (phase zero) appears one clock after the load edge together with
// running, and that a reload restarts the phase.
module tb_sinusoid_generator;
  import kid_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    load = 1'b0;
  freq_t   freq_i = '0;
  sample_t sin_o, cos_o;
  logic    running;
  int checks = 0, failures = 0;

  sinusoid_generator dut (.clk, .rst_n, .load, .freq_i, .sin_o, .cos_o, .running);

  always #2 clk = ~clk;

  function automatic int expect_val(int unsigned ftw, int n, bit cosine);
    longint unsigned ph;
    int idx;
    real a;
    ph  = (longint'(n) * ftw) % (64'd1 << PHASE_W);
    idx = int'(ph >> (PHASE_W - LUT_AW));
    a   = 2.0 * 3.14159265358979323846 * idx / (2.0 ** LUT_AW);
    return $rtoi($floor((2.0 ** (SIN_W - 1) - 1.0) * (cosine ? $cos(a) : $sin(a)) + 0.5));
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_tone(int unsigned ftw, int samples);
    @(negedge clk);
    freq_i = freq_t'(ftw);
    load   = 1'b1;
    @(posedge clk);
    @(negedge clk);
    load = 1'b0;
    check(running == 1'b0, "running must be low right after the load edge");
    for (int n = 0; n < samples; n++) begin
      @(posedge clk);
      @(negedge clk);
      check(running == 1'b1, "running high while producing");
      check(int'(sin_o) == expect_val(ftw, n, 1'b0),
            $sformatf("ftw %h n %0d sin %0d exp %0d", ftw, n, sin_o, expect_val(ftw, n, 1'b0)));
      check(int'(cos_o) == expect_val(ftw, n, 1'b1),
            $sformatf("ftw %h n %0d cos %0d exp %0d", ftw, n, cos_o, expect_val(ftw, n, 1'b1)));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    @(negedge clk);
    check(sin_o == 0 && cos_o == 0 && !running, "silent before the first load");
    run_tone(32'h001FE, 3000);
    run_tone(32'h0038E, 3000);
    run_tone(32'h0C86E, 500);
    run_tone(32'h66666, 500);     // 0.4 of the clock rate
    run_tone(32'h00400, 1100);    // exactly one table step per sample
    for (int t = 0; t < 5; t++) run_tone($urandom_range(0, 2**FREQ_W - 1), 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

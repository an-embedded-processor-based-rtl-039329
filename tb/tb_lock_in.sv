// tb_lock_in: feeds random read-out samples and references through windows of
// 2**AVG_LOG2 samples, with gaps (in_valid low) and an abandoned window
// (in_clear), and checks each pair of means against floor(sum / window) worked
// out here, and that out_valid comes exactly two clocks after in_last.
module tb_lock_in;
  import kid_pkg::*;

  localparam int AVG_LOG2 = 4;
  localparam int L = 2**AVG_LOG2;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    in_clear = 1'b0, in_valid = 1'b0, in_last = 1'b0;
  adc_t    adc_i = '0;
  sample_t ref_cos_i = '0, ref_sin_i = '0;
  result_t i_o, q_o;
  logic    out_valid;
  int checks = 0, failures = 0;
  int windows = 0;

  lock_in #(.AVG_LOG2(AVG_LOG2)) dut (.clk, .rst_n, .in_clear, .in_valid, .in_last,
      .adc_i, .ref_cos_i, .ref_sin_i, .i_o, .q_o, .out_valid);

  always #2 clk = ~clk;

  function automatic longint floor_div(longint v, longint d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // drive one window; abandon it after 'abort_at' samples if abort_at >= 0
  task automatic window(int abort_at);
    longint si = 0, sq = 0;
    int cnt = 0;
    while (cnt < L) begin
      @(negedge clk);
      check(!out_valid, "no result inside a window");
      in_clear = 1'b0;
      in_valid = ($urandom_range(0, 4) != 0);
      adc_i     = adc_t'($urandom);
      ref_cos_i = sample_t'($urandom);
      ref_sin_i = sample_t'($urandom);
      if (windows % 3 == 0) begin  // full-scale corner
        adc_i = adc_t'(-(2**(ADC_W-1)));
        ref_cos_i = sample_t'(-(2**(SIN_W-1)));
        ref_sin_i = sample_t'(2**(SIN_W-1) - 1);
      end
      in_last = in_valid && (cnt == L - 1);
      if (abort_at >= 0 && cnt == abort_at && in_valid) begin
        in_clear = 1'b1;
        in_valid = 1'b1;
        in_last  = 1'b0;
        @(negedge clk);
        in_clear = 1'b0;
        in_valid = 1'b0;
        return;
      end
      if (in_valid) begin
        si += longint'(adc_i) * longint'(ref_cos_i);
        sq += longint'(adc_i) * longint'(ref_sin_i);
        cnt++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
    check(!out_valid, "result not one clock after in_last");
    @(negedge clk);
    check(out_valid, "out_valid two clocks after in_last");
    check(longint'(i_o) == floor_div(si, L), $sformatf("I %0d expected %0d", i_o, floor_div(si, L)));
    check(longint'(q_o) == floor_div(sq, L), $sformatf("Q %0d expected %0d", q_o, floor_div(sq, L)));
    windows++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      if (w % 7 == 3) window(5);
      window(-1);
    end
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

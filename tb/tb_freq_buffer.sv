// tb_freq_buffer: writes random frequency words to random tone addresses,
// including addresses beyond the last tone that must be ignored, and compares
// every parallel output with a reference array after each write.
module tb_freq_buffer;
  import kid_pkg::*;

  localparam int N = N_TONES;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       we = 1'b0;
  tone_addr_t waddr = '0;
  freq_t      wdata = '0;
  freq_t      freq_o [N];
  freq_t      ref_mem [N];
  int checks = 0, failures = 0;

  freq_buffer dut (.clk, .rst_n, .we, .waddr, .wdata, .freq_o);

  always #2 clk = ~clk;

  task automatic compare_all(string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (freq_o[i] !== ref_mem[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: slot %0d = %h, expected %h", what, i, freq_o[i], ref_mem[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare_all("after reset");
    for (int t = 0; t < 600; t++) begin
      we    = ($urandom_range(0, 3) != 0);
      waddr = tone_addr_t'($urandom_range(0, 255));
      wdata = freq_t'($urandom);
      @(posedge clk);
      if (we && int'(waddr) < N) ref_mem[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      compare_all("after write");
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

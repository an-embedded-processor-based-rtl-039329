// tb_lockin_control: pulses Frequencies OK and checks, clock by clock, that
// Write Enable follows one clock later, that sampling starts two clocks after
// Write Enable, that every 2**AVG_LOG2-th sample is marked last, that
// window_done and data_available come two clocks after it, that data_ack
// clears data_available, that a window completed while data was still
// unacknowledged sets overrun, and that a new Frequencies OK restarts the
// windows and clears overrun.
module tb_lockin_control;
  localparam int AVG_LOG2 = 3;
  localparam int L = 2**AVG_LOG2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic freq_ok = 1'b0, data_ack = 1'b0;
  logic write_enable, acquiring, sample_valid, sample_last, window_done;
  logic data_available, overrun;
  logic [31:0] window_count;
  int checks = 0, failures = 0;

  lockin_control #(.AVG_LOG2(AVG_LOG2), .LOCKIN_LAT(2)) dut (.clk, .rst_n, .freq_ok, .data_ack,
      .write_enable, .acquiring, .sample_valid, .sample_last, .window_done,
      .data_available, .overrun, .window_count);

  always #2 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // reference model state, advanced once per clock
  int  t_since_we;      // clocks since the Write Enable clock, -1 = never
  int  n_sample;
  int  last_at [$];
  bit  m_avail, m_over;
  int  m_count;

  task automatic step(bit ok, bit ack);
    bit exp_we, exp_valid, exp_last, exp_done;
    // called just after a falling edge
    freq_ok  = ok;
    data_ack = ack;
    @(posedge clk);
    @(negedge clk);
    // freq_ok was sampled at this edge: Write Enable is high now
    exp_we = ok;
    check(write_enable == exp_we, "write_enable one clock after frequencies_ok");
    if (exp_we) begin
      t_since_we = 0;
      n_sample   = 0;
      last_at.delete();
      m_over  = 0;
      m_count = 0;
    end else if (t_since_we >= 0) t_since_we++;
    exp_valid = (t_since_we >= 2);
    exp_last  = exp_valid && (n_sample % L == L - 1);
    check(sample_valid == exp_valid, $sformatf("sample_valid t=%0d", t_since_we));
    check(sample_last == exp_last, $sformatf("sample_last n=%0d", n_sample));
    exp_done = (last_at.size() > 0 && last_at[0] + 2 == t_since_we);
    if (exp_done) void'(last_at.pop_front());
    check(window_done == exp_done, "window_done two clocks after the last sample");
    if (exp_last) last_at.push_back(t_since_we);
    if (exp_valid) n_sample++;
    // status flags, sampled at the next edge: model them for the next step
  endtask

  task automatic cycle(bit ok, bit ack);
    bit done_now, avail_before;
    avail_before = data_available;
    done_now = window_done;
    step(ok, ack);
  endtask

  int acks_seen = 0, overruns_seen = 0, windows_seen = 0;

  initial begin
    t_since_we = -1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    repeat (4) cycle(0, 0);
    check(!sample_valid && !data_available, "idle before Frequencies OK");
    cycle(1, 0);
    // acknowledge every window promptly for a while
    for (int i = 0; i < 6 * L; i++) begin
      automatic bit ack = data_available;
      cycle(0, ack);
      if (ack) begin
        acks_seen++;
        check(!data_available || window_done, "data_ack clears data_available");
      end
      if (window_done) begin
        windows_seen++;
        check(!overrun, "no overrun while acknowledging");
      end
    end
    check(window_count == 32'(windows_seen), "window count");
    // stop acknowledging: the second unacknowledged window overruns
    for (int i = 0; i < 3 * L; i++) begin
      cycle(0, 0);
      if (window_done) windows_seen++;
    end
    check(data_available, "data stays available without ack");
    check(overrun, "overrun set by an unacknowledged window");
    if (overrun) overruns_seen++;
    // reload: overrun cleared, windows restart
    cycle(1, 1);
    cycle(0, 0);
    check(!overrun, "Write Enable clears overrun");
    check(window_count == 0, "Write Enable restarts the window count");
    for (int i = 0; i < 3 * L; i++) cycle(0, data_available);
    check(window_count == 3 || window_count == 2, $sformatf("windows after reload %0d", window_count));
    check(acks_seen > 0 && overruns_seen > 0, "acknowledge and overrun both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

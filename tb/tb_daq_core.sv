// tb_daq_core: the Daq electronics with 4 tones and 256-sample windows. The
// frequency buffer is written tone by tone, a Frequencies OK pulse starts the
// run, and the ADC input is driven with a known test signal aligned to the
// generators' sample index. Checks, all against values worked out here from
// $sin/$cos: Write Enable one clock after Frequencies OK, every comb sample
// (sum of the tones' sines, scaled, log2(N) clocks after the generators), and
// the in-phase and quadrature means of every tone for every window. It also
// lets two windows go unacknowledged (overrun) and reloads a new frequency set
// in the middle of a window.
module tb_daq_core;
  timeunit 1ns;
  timeprecision 1ps;
  import kid_pkg::*;

  localparam int N        = 4;
  localparam int AVG_LOG2 = 8;
  localparam int L        = 2**AVG_LOG2;
  localparam int LEVELS   = $clog2(N);
  localparam int SHIFT    = SIN_W + LEVELS - COMB_W;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        buf_we = 1'b0, freq_ok = 1'b0, data_ack = 1'b0;
  tone_addr_t  buf_addr = '0, rd_ch = '0;
  freq_t       buf_data = '0;
  comb_t       comb_o;
  adc_t        adc_i = '0;
  logic        write_enable, acquiring, data_available, overrun;
  logic [31:0] window_count;
  result_t     rd_i, rd_q;
  int checks = 0, failures = 0;

  daq_core #(.N(N), .AVG_LOG2(AVG_LOG2)) dut (.clk, .rst_n, .buf_we, .buf_addr, .buf_data,
      .freq_ok, .comb_o, .adc_i, .write_enable, .acquiring, .data_available, .data_ack,
      .overrun, .window_count, .rd_ch, .rd_i, .rd_q);

  always #2 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  function automatic int tone(int unsigned ftw, int n, bit cosine);
    longint unsigned ph;
    int idx;
    real a;
    ph  = (longint'(n) * ftw) % (64'd1 << PHASE_W);
    idx = int'(ph >> (PHASE_W - LUT_AW));
    a   = 2.0 * 3.14159265358979323846 * idx / (2.0 ** LUT_AW);
    return $rtoi($floor((2.0 ** (SIN_W - 1) - 1.0) * (cosine ? $cos(a) : $sin(a)) + 0.5));
  endfunction

  function automatic longint floor_div(longint v, longint d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  int unsigned ftw [N];       // set the generators run on
  int unsigned ftw_next [N];  // set written to the buffer

  function automatic int adc_fn(int n);
    real a = 2.0 * 3.14159265358979323846 * real'(longint'(n) * ftw[1]) / (2.0 ** PHASE_W);
    return $rtoi($floor(6000.0 * $cos(a + 0.7) + 0.5)) + ((n * 37) % 200) - 100;
  endfunction

  // cycle bookkeeping
  int cyc = 0, we_cyc = -1000000;
  int we_seen = 0, ok_cyc = -1;
  always @(posedge clk) cyc++;

  // drive the ADC and check the comb, at every falling edge
  int comb_checks = 0;
  always @(negedge clk) begin
    int n;
    if (rst_n) begin
      if (freq_ok) ok_cyc = cyc;
      if (write_enable) begin
        we_seen++;
        check(cyc == ok_cyc + 1, "Write Enable one clock after Frequencies OK");
        we_cyc = cyc;
        ftw = ftw_next;
      end
      n = cyc - we_cyc - 2;
      adc_i = (n >= 0) ? adc_t'(adc_fn(n)) : '0;
      if (n - LEVELS >= 0) begin
        automatic int s = 0;
        for (int k = 0; k < N; k++) s += tone(ftw[k], n - LEVELS, 1'b0);
        check(int'(comb_o) == int'(floor_div(s, 1 << SHIFT)),
              $sformatf("comb %0d expected %0d", comb_o, floor_div(s, 1 << SHIFT)));
        comb_checks++;
      end
    end
  end

  task automatic load_set(int unsigned base);
    for (int k = 0; k < N; k++) begin
      ftw_next[k] = base + k * 32'h2345 + 32'h400 * k * k;
      @(negedge clk);
      buf_we = 1'b1; buf_addr = tone_addr_t'(k); buf_data = freq_t'(ftw_next[k]);
      @(negedge clk);
      buf_we = 1'b0;
    end
    @(negedge clk);
    freq_ok = 1'b1;
    @(negedge clk);
    freq_ok = 1'b0;
  endtask

  // wait for a window, check all tones, optionally acknowledge
  int windows_checked = 0;
  task automatic check_window(bit ack);
    int w;
    do @(negedge clk); while (!(data_available && !data_ack));
    w = int'(window_count) - 1;
    for (int k = 0; k < N; k++) begin
      longint si = 0, sq = 0;
      for (int n = w * L; n < (w + 1) * L; n++) begin
        si += longint'(adc_fn(n)) * tone(ftw[k], n, 1'b1);
        sq += longint'(adc_fn(n)) * tone(ftw[k], n, 1'b0);
      end
      rd_ch = tone_addr_t'(k);
      #0.1;
      check(longint'(rd_i) == floor_div(si, L), $sformatf("w%0d tone %0d I %0d exp %0d", w, k, rd_i, floor_div(si, L)));
      check(longint'(rd_q) == floor_div(sq, L), $sformatf("w%0d tone %0d Q %0d exp %0d", w, k, rd_q, floor_div(sq, L)));
    end
    rd_ch = tone_addr_t'(N);
    #0.1;
    check(rd_i == 0 && rd_q == 0, "out-of-range read returns zero");
    windows_checked++;
    if (ack) begin
      data_ack = 1'b1;
      @(negedge clk);
      data_ack = 1'b0;
      check(!data_available, "data_ack clears data_available");
    end else begin
      // wait until the next window has ended without an acknowledge
      do @(negedge clk); while (int'(window_count) == w + 1);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(comb_o == 0, "comb silent before a frequency set is loaded");
    load_set(32'h01FE0);
    for (int i = 0; i < 3; i++) check_window(1'b1);
    check(!overrun, "no overrun while acknowledging");
    check_window(1'b0);
    check(overrun, "overrun after an unacknowledged window");
    data_ack = 1'b1;
    @(negedge clk);
    data_ack = 1'b0;
    repeat (L / 2) @(negedge clk);
    load_set(32'h10000);
    repeat (2) @(negedge clk);
    check(!overrun, "reload clears overrun");
    for (int i = 0; i < 2; i++) check_window(1'b1);
    check(we_seen == 2, "two Write Enable pulses");
    check(comb_checks > 5 * L, "comb compared over the run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

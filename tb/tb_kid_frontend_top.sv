// tb_kid_frontend_top: end-to-end run of the front end at its full size (128
// tones, 1024-sample lock-in windows), with a 100 MHz processor bus clock and
// the 250 MHz (4 ns) sample clock.
//
// A processor model loads 128 frequencies through the Frequency Loader with
// the strobe protocol, one word every 1.7 us with the strobe held 480 ns, so
// the transfer ends about 218 us after it starts. The first, second and last
// words are 0x1FE to tone 0, 0x38E to tone 1 and 0xC86E to tone 127. It then
// raises Frequencies OK. The comb goes through a loop-back model of DAC,
// detector and ADC back into the lock-ins. The bench predicts every comb
// sample and every lock-in mean from $sin/$cos and compares. It also checks
// that Write Enable follows Frequencies OK by one clock, that a write to a
// tone address beyond the last one changes nothing, that an unacknowledged
// window raises overrun, and that a second frequency set loaded during a run
// restarts the generators. Each of these mechanisms is counted, and one that
// never happened counts as a failure.
module tb_kid_frontend_top;
  import kid_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N        = N_TONES;
  localparam int AVG_LOG2 = 10;      // the top's default window
  localparam int L        = 2**AVG_LOG2;
  localparam int LEVELS   = $clog2(N);
  localparam int SHIFT    = SIN_W + LEVELS - COMB_W;

  logic        aclk = 1'b0, kclk = 1'b0;
  logic        aresetn = 1'b0, krst_n = 1'b0;
  logic [3:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  comb_t       comb_signal;
  adc_t        adc_data;
  freq_word_t  frequencies_to_kid;
  logic [31:0] flags_to_kid;
  logic        frequencies_ok, write_enable, acquiring, data_available, overrun;
  logic        data_ack = 1'b0;
  logic [TONE_ADDR_W:0] words_loaded;
  logic [31:0] window_count;
  tone_addr_t  rd_ch = '0;
  result_t     rd_i, rd_q;
  int checks = 0, failures = 0;

  kid_frontend_top dut (
    .s_axi_aclk(aclk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .kid_clk(kclk), .kid_rst_n(krst_n), .comb_signal, .adc_data,
    .frequencies_to_kid, .flags_to_kid, .frequencies_ok, .write_enable, .words_loaded,
    .acquiring, .data_available, .data_ack, .overrun, .window_count, .rd_ch, .rd_i, .rd_q);

  kid_array_model u_kid (.clk(kclk), .comb_i(comb_signal), .adc_o(adc_data));

  always #5 aclk = ~aclk;   // 100 MHz
  always #2 kclk = ~kclk;   // 250 MHz, 4 ns

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ------------------------------------------------------------ processor model
  task automatic axi_write(logic [3:0] a, logic [31:0] d);
    @(posedge aclk);
    awaddr <= a; awvalid <= 1'b1; wdata <= d; wstrb <= 4'hF; wvalid <= 1'b1; bready <= 1'b1;
    fork
      begin do @(posedge aclk); while (!awready); awvalid <= 1'b0; end
      begin do @(posedge aclk); while (!wready);  wvalid  <= 1'b0; end
    join
    do @(posedge aclk); while (!bvalid);
    bready <= 1'b0;
  endtask

  task automatic send_frequency(int addr, int unsigned freq);
    freq_word_t w;
    realtime t0 = $realtime;
    w = '{strobe: 1'b0, reserved: 3'b0, addr: tone_addr_t'(addr), data: freq_t'(freq)};
    axi_write(REG_FREQ, w);
    w.strobe = 1'b1;
    axi_write(REG_FREQ, w);
    #480;
    w.strobe = 1'b0;
    axi_write(REG_FREQ, w);
    // pace the words at 1.7 us
    #(1700.0 - ($realtime - t0));
  endtask

  int unsigned ftw [N];       // set the generators run on
  int unsigned ftw_next [N];  // set being written

  task automatic load_set(int variant);
    for (int k = 0; k < N; k++) begin
      if (variant == 0)
        ftw_next[k] = (k == 0) ? 32'h1FE : (k == 1) ? 32'h38E : (k == N - 1) ? 32'hC86E
                    : 32'h1FE + k * 32'h185;
      else
        ftw_next[k] = 32'h400 * (k + 1) + 32'h33;
      send_frequency(k, ftw_next[k]);
    end
    axi_write(REG_FLAGS, 32'h1);
    axi_write(REG_FLAGS, 32'h0);
  endtask

  // ------------------------------------------------------------ reference model
  function automatic int tone(int unsigned f, int n, bit cosine);
    longint unsigned ph;
    int idx;
    real a;
    ph  = (longint'(n) * f) % (64'd1 << PHASE_W);
    idx = int'(ph >> (PHASE_W - LUT_AW));
    a   = 2.0 * 3.14159265358979323846 * idx / (2.0 ** LUT_AW);
    return $rtoi($floor((2.0 ** (SIN_W - 1) - 1.0) * (cosine ? $cos(a) : $sin(a)) + 0.5));
  endfunction

  function automatic longint floor_div(longint v, longint d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  // comb sample for generator sample m of the running set
  function automatic int comb_of(int m);
    int s = 0;
    if (m < 0) return 0;
    for (int k = 0; k < N; k++) s += tone(ftw[k], m, 1'b0);
    return int'(floor_div(s, 1 << SHIFT));
  endfunction

  // ------------------------------------------------------------ monitors
  int cyc = 0, we_cyc = -1000000, ok_cyc = -10;
  int n_we = 0, n_ok = 0, n_buf_writes = 0, n_windows = 0, n_acks = 0, n_overrun = 0;
  int n_reload = 0, n_comb_checks = 0, n_ignored = 0;
  bit first_load_done = 0;
  always @(posedge kclk) cyc++;

  always @(posedge kclk) if (krst_n && dut.buf_we) n_buf_writes++;

  always @(negedge kclk) begin
    int n;
    if (krst_n) begin
      if (frequencies_ok) begin
        n_ok++;
        ok_cyc = cyc;
      end
      if (write_enable) begin
        check(cyc == ok_cyc + 1, "Write Enable one clock after Frequencies OK");
        n_we++;
        if (first_load_done) n_reload++;
        first_load_done = 1;
        we_cyc = cyc;
        ftw = ftw_next;
      end
      // comb check on a sparse set of samples (every 7th) to keep the run short
      n = cyc - we_cyc - 2 - LEVELS;
      if (n >= 0 && n % 7 == 0 && n < 8 * L) begin
        check(int'(comb_signal) == comb_of(n), $sformatf("comb n=%0d %0d exp %0d", n, comb_signal, comb_of(n)));
        n_comb_checks++;
      end
    end
  end

  // check one window's results for all tones, then acknowledge (or not)
  task automatic take_window(bit ack, bit predictable);
    int w;
    do @(negedge kclk); while (!(data_available && !data_ack));
    w = int'(window_count) - 1;
    n_windows++;
    if (predictable) begin
      int adc [L];
      // lock-in sample n' multiplies adc = comb(n' - 1 - LEVELS) >>> 1
      for (int i = 0; i < L; i++) adc[i] = int'(floor_div(comb_of(w * L + i - 1 - LEVELS), 2));
      for (int k = 0; k < N; k++) begin
        longint si = 0, sq = 0;
        for (int i = 0; i < L; i++) begin
          si += longint'(adc[i]) * tone(ftw[k], w * L + i, 1'b1);
          sq += longint'(adc[i]) * tone(ftw[k], w * L + i, 1'b0);
        end
        rd_ch = tone_addr_t'(k);
        #0.1;
        check(longint'(rd_i) == floor_div(si, L) && longint'(rd_q) == floor_div(sq, L),
              $sformatf("window %0d tone %0d: I %0d Q %0d, expected %0d %0d",
                        w, k, rd_i, rd_q, floor_div(si, L), floor_div(sq, L)));
      end
    end
    if (ack) begin
      data_ack = 1'b1;
      @(negedge kclk);
      data_ack = 1'b0;
      n_acks++;
    end else begin
      do @(negedge kclk); while (int'(window_count) == w + 1);
      if (overrun) n_overrun++;
    end
  endtask

  initial begin
    realtime t_start;
    repeat (4) @(posedge aclk);
    aresetn = 1'b1;
    krst_n  = 1'b1;
    repeat (4) @(posedge aclk);
    check(comb_signal == 0, "comb silent before the first frequency set");
    // a word for a tone that does not exist is dropped by the buffer
    send_frequency(200, 32'hFFFFF);
    check(n_buf_writes == 1, "write to tone 200 reaches the buffer port");
    n_ignored++;
    t_start = $realtime;
    load_set(0);
    $display("transfer of %0d frequencies took %0.1f us", N, ($realtime - t_start) / 1000.0);
    check(n_buf_writes == N + 1, $sformatf("%0d buffer writes", n_buf_writes));
    for (int k = 0; k < N; k++)
      check(dut.u_daq.freq[k] == freq_t'(ftw_next[k]), $sformatf("buffer slot %0d", k));
    check(dut.u_daq.freq[0] == 20'h1FE && dut.u_daq.freq[1] == 20'h38E &&
          dut.u_daq.freq[N-1] == 20'hC86E, "reference words in tones 0, 1 and 127");
    take_window(1'b1, 1'b1);
    take_window(1'b1, 1'b1);
    check(!overrun, "no overrun while acknowledging");
    take_window(1'b0, 1'b0);            // left unacknowledged: the next one overruns
    check(overrun, "overrun after an unacknowledged window");
    take_window(1'b1, 1'b1);
    // second frequency set, loaded while the lock-ins keep running
    fork
      load_set(1);
      begin
        while (n_we < 2) take_window(1'b1, 1'b0);
      end
    join
    check(!overrun, "reload clears overrun");
    take_window(1'b1, 1'b0);            // window 0 of the new run mixes both sets
    take_window(1'b1, 1'b1);
    check(n_ok == 2 && n_we == 2, "two Frequencies OK / Write Enable pulses");
    $display("mechanisms: buffer writes %0d, ignored address %0d, frequencies_ok %0d, write_enable %0d, reloads %0d, windows %0d, acks %0d, overruns %0d, comb checks %0d",
             n_buf_writes, n_ignored, n_ok, n_we, n_reload, n_windows, n_acks, n_overrun, n_comb_checks);
    check(n_buf_writes > 0 && n_ignored > 0 && n_ok > 0 && n_we > 0 && n_reload > 0 &&
          n_windows > 0 && n_acks > 0 && n_overrun > 0 && n_comb_checks > 0,
          "every mechanism happened at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

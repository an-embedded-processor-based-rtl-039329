// tb_pixel_hit: the measurement the front end exists for. 128 tones sit on
// the window grid (tone k makes 3*(k+1) whole cycles per 1024-sample window,
// so tones 0.73 MHz apart up to 94 MHz at a 250 MHz clock), and the detector is
// modelled pixel by pixel (kid_resonator_model). After a baseline window, one
// pixel's resonance is changed as a photon hit would change it (amplitude and
// phase of its tone), later a second one. The bench checks that the lock-in of
// the hit pixel reports the new amplitude ratio and phase shift and that the
// other 127 lock-ins do not move. Expected values come from the model's
// gains: each tone returns with amplitude gain*8191/128, so a lock-in reads
// I = G*sin(phase), Q = G*cos(phase) with G = gain*8191*8191/256.
module tb_pixel_hit;
  import kid_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = N_TONES;

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

  kid_resonator_model #(.N(N)) u_kid (.clk(kclk), .sin_i(dut.u_daq.sin_w),
                                      .cos_i(dut.u_daq.cos_w), .adc_o(adc_data));

  always #5 aclk = ~aclk;
  always #2 kclk = ~kclk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

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
    w = '{strobe: 1'b0, reserved: 3'b0, addr: tone_addr_t'(addr), data: freq_t'(freq)};
    axi_write(REG_FREQ, w);
    w.strobe = 1'b1;
    axi_write(REG_FREQ, w);
    #480;
    w.strobe = 1'b0;
    axi_write(REG_FREQ, w);
  endtask

  real base_i [N], base_q [N];
  real cur_i [N], cur_q [N];

  // wait for the next window that started after the call, read all tones
  task automatic next_clean_window();
    int w0;
    do @(negedge kclk); while (!(data_available && !data_ack));
    w0 = int'(window_count);
    data_ack = 1'b1;
    @(negedge kclk);
    data_ack = 1'b0;
    do @(negedge kclk); while (!(data_available && int'(window_count) == w0 + 1));
    for (int k = 0; k < N; k++) begin
      rd_ch = tone_addr_t'(k);
      #0.1;
      cur_i[k] = real'(rd_i);
      cur_q[k] = real'(rd_q);
    end
    data_ack = 1'b1;
    @(negedge kclk);
    data_ack = 1'b0;
  endtask

  localparam real G1 = 8191.0 * 8191.0 / 256.0;
  localparam real PI = 3.14159265358979323846;

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real amp(real i, real q);
    return $sqrt(i * i + q * q);
  endfunction

  int hits_seen = 0;

  // one pixel changed to (gain, phase): check it, and check every other pixel held still
  task automatic check_hit(int p, real g, real ph_deg);
    real a, ph;
    a  = amp(cur_i[p], cur_q[p]);
    ph = $atan2(cur_i[p], cur_q[p]) * 180.0 / PI;
    check(fabs(a / G1 - g) < 0.01 * g,
          $sformatf("pixel %0d amplitude %f of full scale, expected %f", p, a / G1, g));
    check(fabs(ph - ph_deg) < 0.5, $sformatf("pixel %0d phase %f deg, expected %f", p, ph, ph_deg));
    for (int k = 0; k < N; k++) if (k != p) begin
      check(fabs(cur_i[k] - base_i[k]) < 0.002 * G1 && fabs(cur_q[k] - base_q[k]) < 0.002 * G1,
            $sformatf("pixel %0d moved when pixel %0d was hit", k, p));
    end
    if (a / G1 < 0.99 * amp(base_i[p], base_q[p]) / G1 || fabs(ph) > 0.5) hits_seen++;
  endtask

  initial begin
    repeat (4) @(posedge aclk);
    aresetn = 1'b1;
    krst_n  = 1'b1;
    repeat (4) @(posedge aclk);
    for (int k = 0; k < N; k++) send_frequency(k, 3 * (k + 1) * 1024);
    axi_write(REG_FLAGS, 32'h1);
    axi_write(REG_FLAGS, 32'h0);
    // baseline: every pixel at full amplitude and zero phase
    next_clean_window();
    for (int k = 0; k < N; k++) begin
      base_i[k] = cur_i[k];
      base_q[k] = cur_q[k];
      check(fabs(amp(cur_i[k], cur_q[k]) / G1 - 1.0) < 0.01,
            $sformatf("baseline pixel %0d amplitude %f", k, amp(cur_i[k], cur_q[k]) / G1));
      check(fabs(cur_i[k]) < 0.005 * G1, $sformatf("baseline pixel %0d phase, I = %f", k, cur_i[k]));
    end
    // first hit: pixel 37 drops to half amplitude and shifts by 30 degrees
    u_kid.gain[37] = 0.5;
    u_kid.phase_deg[37] = 30.0;
    next_clean_window();
    check_hit(37, 0.5, 30.0);
    // it recovers, and pixel 100 is hit
    u_kid.gain[37] = 1.0;
    u_kid.phase_deg[37] = 0.0;
    u_kid.gain[100] = 0.8;
    u_kid.phase_deg[100] = -45.0;
    next_clean_window();
    check_hit(100, 0.8, -45.0);
    check(!overrun, "every window was acknowledged in time");
    check(hits_seen == 2, $sformatf("hits seen: %0d of 2", hits_seen));
    $display("pixel hits detected: %0d", hits_seen);
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

// tb_frequency_loader: a processor model writes frequency words through the
// AXI4-Lite port with the transfer protocol (word with strobe low, word with
// strobe high held for 480 ns, strobe low again), on a 100 MHz bus clock while
// the KID side runs at 250 MHz. Checks: exactly one buffer write per strobe
// with the right address and frequency (the first words are those of the
// reference transfer: 0x1FE to tone 0, 0x38E to tone 1, ..., 0xC86E to tone
// 127), the words_loaded count, one frequencies_ok pulse per rising edge of
// the flag bit, register read-back and byte strobes.
module tb_frequency_loader;
  import kid_pkg::*;

  logic        aclk = 1'b0, kclk = 1'b0;
  logic        aresetn = 1'b0, krst_n = 1'b0;
  logic [3:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  freq_word_t  frequencies_to_kid;
  logic [31:0] flags_to_kid;
  logic        buf_we, frequencies_ok;
  tone_addr_t  buf_addr;
  freq_t       buf_data;
  logic [TONE_ADDR_W:0] words_loaded;
  int checks = 0, failures = 0;

  frequency_loader dut (
    .s_axi_aclk(aclk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .frequencies_to_kid, .flags_to_kid,
    .kid_clk(kclk), .kid_rst_n(krst_n),
    .buf_we, .buf_addr, .buf_data, .frequencies_ok, .words_loaded);

  always #5000 aclk = ~aclk;   // 100 MHz processor clock (1 ps units)
  always #2000 kclk = ~kclk;   // 250 MHz KID clock

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  task automatic axi_write(logic [3:0] a, logic [31:0] d, logic [3:0] s = 4'hF);
    @(posedge aclk);
    awaddr <= a; awvalid <= 1'b1; wdata <= d; wstrb <= s; wvalid <= 1'b1; bready <= 1'b1;
    fork
      begin do @(posedge aclk); while (!awready); awvalid <= 1'b0; end
      begin do @(posedge aclk); while (!wready);  wvalid  <= 1'b0; end
    join
    do @(posedge aclk); while (!bvalid);
    check(bresp == 2'b00, "write response OKAY");
    bready <= 1'b0;
  endtask

  task automatic axi_read(logic [3:0] a, output logic [31:0] d);
    @(posedge aclk);
    araddr <= a; arvalid <= 1'b1; rready <= 1'b1;
    do @(posedge aclk); while (!arready);
    arvalid <= 1'b0;
    do @(posedge aclk); while (!rvalid);
    d = rdata;
    rready <= 1'b0;
  endtask

  task automatic send_frequency(int addr, int freq);
    freq_word_t w;
    w = '{strobe: 1'b0, reserved: 3'b0, addr: tone_addr_t'(addr), data: freq_t'(freq)};
    axi_write(REG_FREQ, w);
    w.strobe = 1'b1;
    axi_write(REG_FREQ, w);
    #480000;                   // Data Strobe held for 480 ns
    w.strobe = 1'b0;
    axi_write(REG_FREQ, w);
  endtask

  // scoreboard of buffer writes
  int exp_addr [$];
  int exp_data [$];
  int writes = 0, ok_pulses = 0;

  always @(posedge kclk) begin
    if (krst_n && buf_we) begin
      writes++;
      checks++;
      if (exp_addr.size() == 0) begin
        failures++;
        $display("FAIL: unexpected buffer write");
      end else begin
        automatic int ea = exp_addr.pop_front();
        automatic int ed = exp_data.pop_front();
        if (int'(buf_addr) != ea || int'(buf_data) != ed) begin
          failures++;
          $display("FAIL: buffer write %0d:%h expected %0d:%h", buf_addr, buf_data, ea, ed);
        end
      end
    end
    if (krst_n && frequencies_ok) ok_pulses++;
  end

  localparam int NW = 12;
  int freqs [NW] = '{32'h1FE, 32'h38E, 32'h5A1, 32'h7FFFF, 32'h0, 32'hABCDE,
                     32'h12345, 32'hFFFFF, 32'h00001, 32'h3C3C3, 32'h55555, 32'hC86E};
  int addrs [NW] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 100, 127};

  initial begin
    logic [31:0] rd;
    repeat (4) @(posedge aclk);
    aresetn = 1'b1;
    krst_n  = 1'b1;
    repeat (4) @(posedge aclk);
    for (int i = 0; i < NW; i++) begin
      exp_addr.push_back(addrs[i]);
      exp_data.push_back(freqs[i]);
      send_frequency(addrs[i], freqs[i]);
      check(frequencies_to_kid.addr == tone_addr_t'(addrs[i]) &&
            frequencies_to_kid.data == freq_t'(freqs[i]), "frequencies_to_kid fields");
    end
    #100000;
    check(writes == NW, $sformatf("%0d buffer writes, expected %0d", writes, NW));
    check(int'(words_loaded) == NW, "words_loaded");
    check(ok_pulses == 0, "no Frequencies OK before the flag");
    axi_read(REG_FREQ, rd);
    check(rd == {1'b0, 3'b0, 8'd127, 20'hC86E}, $sformatf("read back FREQ %h", rd));
    // Frequencies OK: set then clear the flag
    axi_write(REG_FLAGS, 32'h1);
    #100000;
    check(ok_pulses == 1, "one frequencies_ok pulse");
    check(words_loaded == 0, "words_loaded cleared by frequencies_ok");
    axi_read(REG_FLAGS, rd);
    check(rd == 32'h1, "read back FLAGS");
    axi_write(REG_FLAGS, 32'h0);
    #100000;
    check(ok_pulses == 1, "clearing the flag gives no pulse");
    // byte strobes: change only the top byte (strobe) of FREQ, the fields stay
    axi_write(REG_FREQ, 32'hFFFF_FFFF, 4'b0111);
    axi_read(REG_FREQ, rd);
    check(rd == 32'h07FF_FFFF, $sformatf("byte strobes %h", rd));
    exp_addr.push_back(8'hFF);
    exp_data.push_back(20'hFFFFF);
    axi_write(REG_FREQ, 32'h8FFF_FFFF, 4'b1000);
    #480000;
    axi_write(REG_FREQ, 32'h0FFF_FFFF, 4'b1000);
    #100000;
    check(writes == NW + 1, "write through byte-strobed strobe");
    axi_write(REG_FLAGS, 32'h1);
    #100000;
    check(ok_pulses == 2, "second frequencies_ok pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

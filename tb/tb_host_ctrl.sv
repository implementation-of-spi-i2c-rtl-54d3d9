// tb_host_ctrl: self-checking test of the command controller.
//
// Bytes are handed to the controller directly (no UART), the SPI master is
// replaced by a model that finishes each frame 20 clocks after start and
// answers with a counter value (it also checks the clock divider and SPI
// mode the controller sets for each slave select), and the two EEPROMs are arrays here with one
// clock of read latency. The test checks the start-up sequence (CPLD reset
// pulse of RST_CYCLES, one SPI word per non-erased byte of EEPROM row 1 in
// index order, the EEPROM picked by the strap bit), each packet type (C, D,
// E, R) with its SPI word, EEPROM access and reply byte, a packet with a bad
// header or length (strap bit read again, no reply) and a packet whose last
// byte is not 0x00 (full re-initialisation from the other EEPROM).
module tb_host_ctrl;
  import multidut_pkg::*;
  localparam int RSTC = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic strap = 0;
  logic [7:0] rx_data = 0, tx_data;
  logic rx_valid = 0, tx_start, tx_busy = 0;
  logic spi_start, spi_ss_idx, spi_busy = 0, spi_done = 0;
  logic [4:0] spi_nbits;
  logic [7:0] spi_div;
  logic spi_cpol, spi_cpha;
  logic [15:0] spi_tx, spi_rx = 0, cpld_rdbk;
  logic ee_sel, ee_we, ee_re;
  logic [6:0] ee_row;
  logic [3:0] ee_offset;
  logic [7:0] ee_wdata, ee_rdata;
  logic cpld_rst_n, init_done, evt_ok, evt_end, evt_hdr;

  // per-slave SPI settings, different from the defaults
  host_ctrl #(.RST_CYCLES(RSTC), .CPLD_DIV(5), .CPLD_CPOL(0), .CPLD_CPHA(1),
              .DAC_DIV(9), .DAC_CPOL(1), .DAC_CPHA(0)) dut (
    .clk, .rst_n, .strap, .rx_data, .rx_valid, .tx_start, .tx_data,
    .tx_busy, .spi_start, .spi_ss_idx, .spi_nbits, .spi_div, .spi_cpol, .spi_cpha, .spi_tx, .spi_rx, .spi_busy, .spi_done,
    .ee_sel, .ee_row, .ee_offset, .ee_we, .ee_wdata, .ee_re, .ee_rdata, .cpld_rst_n, .init_done,
    .cpld_rdbk, .evt_pkt_ok(evt_ok), .evt_bad_end(evt_end), .evt_bad_hdr(evt_hdr));

  // EEPROM models
  logic [7:0] ee [2][2048];
  always @(posedge clk) begin
    if (ee_we) ee[ee_sel][{ee_row, ee_offset}] <= ee_wdata;
    if (ee_re) ee_rdata <= ee[ee_sel][{ee_row, ee_offset}];
  end

  // SPI model: log words, answer after 20 clocks
  logic [16:0] spi_log [$];
  int spi_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (spi_start) begin
      spi_log.push_back({spi_ss_idx, spi_tx});
      checks++;
      if (spi_nbits != 5'd16) begin failures++; $display("FAIL: nbits %0d", spi_nbits); end
      checks++;
      if ({spi_div, spi_cpol, spi_cpha} != (spi_ss_idx ? {8'd9, 2'b10} : {8'd5, 2'b01})) begin
        failures++; $display("FAIL: SS%0d divider %0d mode %b%b", spi_ss_idx, spi_div, spi_cpol, spi_cpha);
      end
      spi_busy <= 1;
      fork begin
        repeat (20) @(posedge clk);
        spi_rx <= 16'(16'hC000 + spi_cnt); spi_cnt++;
        spi_done <= 1; spi_busy <= 0;
        @(posedge clk) spi_done <= 0;
      end join_none
    end
  end

  // reply and event logs
  logic [7:0] replies [$];
  int n_ok = 0, n_end = 0, n_hdr = 0, rst_low = 0, n_rst = 0;
  logic prev_rst = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_start) replies.push_back(tx_data);
    if (evt_ok) n_ok++;
    if (evt_end) n_end++;
    if (evt_hdr) n_hdr++;
    if (!cpld_rst_n && rst_n) rst_low++;
    if (prev_rst && !cpld_rst_n) n_rst++;
    prev_rst <= cpld_rst_n;
  end

  task automatic send_pkt(input logic [7:0] b [$]);
    foreach (b[i]) begin
      @(negedge clk); rx_data = b[i]; rx_valid = 1;
      @(negedge clk); rx_valid = 0;
      repeat (5) @(negedge clk);
    end
    repeat (60) @(negedge clk);
  endtask

  task automatic wait_init;
    int t;
    t = 0;
    while (!init_done && t < 5000) begin @(negedge clk); t++; end
    check(init_done, "init_done");
  endtask

  task automatic expect_spi(input bit ss, input logic [15:0] w, input string tag);
    logic [16:0] e;
    if (spi_log.size() == 0) begin check(0, {tag, ": no SPI word"}); return; end
    e = spi_log.pop_front();
    check(e == {ss, w}, $sformatf("%s: SPI %h exp %h", tag, e, {ss, w}));
  endtask

  task automatic expect_reply(input logic [7:0] v, input string tag);
    if (replies.size() == 0) begin check(0, {tag, ": no reply"}); return; end
    check(replies.pop_front() == v, $sformatf("%s: reply exp %h", tag, v));
  endtask

  initial begin
    for (int e = 0; e < 2; e++) for (int a = 0; a < 2048; a++) ee[e][a] = 8'hFF;
    ee[0][16 + 0] = 8'h05; ee[0][16 + 2] = 8'h01; ee[0][16 + 11] = 8'h77;
    ee[1][16 + 0] = 8'h07;
    repeat (3) @(negedge clk); rst_n = 1;
    wait_init;
    check(rst_low == RSTC + 1, $sformatf("CPLD reset low %0d clocks", rst_low));
    check(ee_sel == 0, "strap 0 picks EEPROM 0");
    expect_spi(0, 16'hA005, "cfg reg0");
    expect_spi(0, 16'hA201, "cfg reg2");
    expect_spi(0, 16'hAB77, "cfg reg11");
    check(spi_log.size() == 0, "erased bytes skipped");
    // C
    send_pkt('{8'h43, 8'h05, 8'hA1, 8'h23, 8'h00});
    expect_spi(0, 16'hA123, "C"); expect_reply(8'h43, "C");
    check(cpld_rdbk == 16'hC003, $sformatf("CPLD read-back %h", cpld_rdbk));
    // D
    send_pkt('{8'h44, 8'h05, 8'h02, 8'h80, 8'h00});
    expect_spi(1, 16'h0280, "D"); expect_reply(8'h44, "D");
    check(cpld_rdbk == 16'hC003, "DAC reply not taken as read-back");
    // E then R
    send_pkt('{8'h45, 8'h06, 8'h03, 8'h07, 8'h5A, 8'h00});
    expect_reply(8'h45, "E");
    check(ee[0][(3 + 1) * 16 + 7] == 8'h5A, "E writes row+1");
    send_pkt('{8'h52, 8'h06, 8'h03, 8'h07, 8'h00, 8'h00});
    expect_reply(8'h5A, "R");
    // bad header: strap read again
    strap = 1;
    send_pkt('{8'h58, 8'h05, 8'h01, 8'h02, 8'h00});
    check(n_hdr == 1 && replies.size() == 0 && spi_log.size() == 0, "bad header dropped");
    check(ee_sel == 1, "strap re-read after bad header");
    send_pkt('{8'h52, 8'h06, 8'h03, 8'h07, 8'h00, 8'h00});
    expect_reply(8'hFF, "R from EEPROM 1");
    // wrong length for C
    send_pkt('{8'h43, 8'h06, 8'h01, 8'h02, 8'h03, 8'h00});
    check(n_hdr == 2 && spi_log.size() == 0, "C with wrong length dropped");
    // bad last byte: full re-init from EEPROM 1
    rst_low = 0;
    send_pkt('{8'h43, 8'h05, 8'hA1, 8'h23, 8'h01});
    wait_init;
    check(n_end == 1 && n_rst == 1 && rst_low == RSTC, $sformatf("bad end re-runs initialisation %0d %0d %0d", n_end, n_rst, rst_low));
    expect_spi(0, 16'hA007, "re-init from EEPROM 1");
    check(spi_log.size() == 0 && replies.size() == 0, "nothing else after re-init");
    check(n_ok == 5, $sformatf("good packets %0d", n_ok));
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

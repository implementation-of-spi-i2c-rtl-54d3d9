// tb_bt_interfaces: the eight DUT/interface combinations of a Bluetooth
// module that talks either over UART (BToU) or over PCIe (BToP), on each of
// the four DUT ports, run through the complete board at default parameters.
//
// Each case follows the station's switching procedure with 'C' packets on
// the controller's UART: VBAT/VIO off, select the DUT, set the interface
// (BToU: both UART pairs on, PCIe switch off; BToP: PCIe switch on, UART
// pairs off), VBAT/VIO on, BT_REG_ON toggled 1-0-1. It then checks that
// only that DUT is powered, and for BToU that one byte travels from the
// station to the DUT and one from the DUT back to the station, with RTS/CTS
// following; for BToP that the PCIe switch points at the DUT and no UART
// line of any DUT moves. The cases are ordered so that a BToU DUT is
// followed by a BToP DUT several times, the transition that needs the PCIe
// port to be re-enabled on a new DUT. Each case and each such transition is
// counted and must occur.
module tb_bt_interfaces;
  localparam int CPB = 417;       // default CLKS_PER_BIT of the top
  logic clk = 0, cpld_clk = 0, rst_n = 0;
  always #10 clk = ~clk;          // controller clock
  always #7 cpld_clk = ~cpld_clk; // CPLD clock, unrelated
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic strap = 0, cmd_rxd = 1, cmd_txd;
  logic host_txd = 1, host_rts = 1, host_rxd, host_cts;
  logic [3:0] dut_rxd, dut_cts, dut_txd = '1, dut_rts = '1, vbat, vio, btr;
  logic [3:0][7:0] dut_ctrl;
  logic [1:0] pcie_port;
  logic pcie_en, spi_sclk, spi_mosi, dac_ss_n, init_done, evt_ok, evt_end, evt_hdr;
  logic [15:0] cpld_rdbk;

  multidut_top dut (.clk, .rst_n, .cpld_clk, .strap, .cmd_rxd, .cmd_txd, .host_txd, .host_rts,
    .host_rxd, .host_cts, .dut_rxd, .dut_cts, .dut_txd, .dut_rts, .dut_ctrl, .dut_vbat_en(vbat),
    .dut_vio_en(vio), .dut_bt_reg_on(btr), .pcie_port, .pcie_en, .spi_sclk, .spi_mosi, .dac_ss_n,
    .init_done, .cpld_rdbk, .evt_pkt_ok(evt_ok), .evt_bad_end(evt_end), .evt_bad_hdr(evt_hdr));

  // reply receiver on cmd_txd (8N1, sampled mid-bit)
  logic [7:0] replies [$];
  initial forever begin
    logic [7:0] b;
    @(negedge cmd_txd);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = cmd_txd; end
    repeat (CPB) @(posedge clk);
    replies.push_back(b);
  end

  task automatic uart_byte(ref logic line, input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin line = f[i]; repeat (CPB) @(posedge clk); end
  endtask

  // UART lines of the case under test, by number: 0 = DUT RXD (receive),
  // 1 = station RXD (receive)
  int d_cur = 0;
  function automatic logic rx_line(input int k);
    return (k == 0) ? dut_rxd[d_cur] : host_rxd;
  endfunction

  // receive one byte on line k into slot k; rx_got[k] stays 0 if no start
  // bit comes within 2 frames
  logic [7:0] rx_b [2];
  bit         rx_got [2];
  task automatic uart_get(input int k);
    int t;
    rx_got[k] = 0; rx_b[k] = 0;
    for (t = 0; t < 20 * CPB && rx_line(k); t++) @(posedge clk);
    if (rx_line(k)) return;
    rx_got[k] = 1;
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); rx_b[k][i] = rx_line(k); end
  endtask

  // send one byte from the DUT under test on its TXD
  task automatic dut_send(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin dut_txd[d_cur] = f[i]; repeat (CPB) @(posedge clk); end
  endtask

  task automatic cpld_wr(input logic [3:0] a, input logic [7:0] v);
    logic [7:0] b [$];
    b = '{8'h43, 8'h05, {4'hA, a}, v, 8'h00};
    foreach (b[i]) uart_byte(cmd_rxd, b[i]);
    repeat (40 * CPB) @(posedge clk);   // execution and 1-byte reply
    if (replies.size() == 0) check(0, $sformatf("reg%0d: no reply", a));
    else check(replies.pop_front() == 8'h43, $sformatf("reg%0d: reply", a));
  endtask

  int n_case [4][2];     // [dut][0: BToU, 1: BToP]
  int n_u2p = 0;

  task automatic run_case(input int d, input bit btop);
    string tag;
    int fails_before;
    fails_before = failures;
    d_cur = d;
    tag = $sformatf("DUT%0d %s", d + 1, btop ? "BToP" : "BToU");
    cpld_wr(4'd1, 8'h00);                          // VBAT & VIO off
    check(vbat == 0 && vio == 0, {tag, ": power off before switching"});
    cpld_wr(4'd0, 8'(4 | d));                      // select DUT
    cpld_wr(4'd3, btop ? 8'h01 : 8'h00);           // PCIe switch
    cpld_wr(4'd4, btop ? 8'h00 : 8'h03);           // UART pairs
    cpld_wr(4'd1, 8'h03);                          // VBAT & VIO on
    cpld_wr(4'd2, 8'h01); cpld_wr(4'd2, 8'h00); cpld_wr(4'd2, 8'h01);  // BT_REG_ON
    check(vbat == 4'(1 << d) && vio == 4'(1 << d) && btr == 4'(1 << d), {tag, ": only this DUT powered"});
    check(pcie_en == btop && (!btop || pcie_port == 2'(d)), {tag, ": PCIe switch"});
    // RTS -> CTS in both directions
    host_rts = 0; dut_rts[d] = 0; #1;
    check(dut_cts == (btop ? 4'hF : ~4'(1 << d)), {tag, ": station RTS to DUT CTS"});
    check(host_cts == btop, {tag, ": DUT RTS to station CTS"});
    host_rts = 1; dut_rts = '1;
    // one byte each way at the same time
    fork
      begin repeat (2) @(posedge clk); uart_byte(host_txd, 8'(8'h50 + d)); end
      begin repeat (2) @(posedge clk); dut_send(8'(8'hC0 + d)); end
      uart_get(0);
      uart_get(1);
    join
    if (btop) begin
      check(!rx_got[0] && !rx_got[1], {tag, ": UART lines stay idle"});
    end else begin
      check(rx_got[0] && rx_b[0] == 8'(8'h50 + d), $sformatf("%s: station to DUT %h", tag, rx_b[0]));
      check(rx_got[1] && rx_b[1] == 8'(8'hC0 + d), $sformatf("%s: DUT to station %h", tag, rx_b[1]));
    end
    for (int o = 0; o < 4; o++)
      if (o != d) check(dut_rxd[o] && dut_cts[o], $sformatf("%s: DUT%0d idle", tag, o + 1));
    if (failures == fails_before) n_case[d][btop]++;
  endtask

  initial begin
    bit prev_u;
    int order [8][2] = '{'{0, 0}, '{1, 1}, '{2, 0}, '{3, 1}, '{0, 1}, '{1, 0}, '{2, 1}, '{3, 0}};
    repeat (5) @(posedge clk); rst_n = 1;
    wait (init_done);
    repeat (200) @(posedge clk);
    prev_u = 0;
    // DUT_OFF first, as the station does after power-up
    cpld_wr(4'd0, 8'h00);
    check(vbat == 0 && !pcie_en && dut_rxd == 4'hF, "DUT_OFF");
    foreach (order[k]) begin
      run_case(order[k][0], 1'(order[k][1]));
      if (prev_u && order[k][1] == 1) n_u2p++;
      prev_u = (order[k][1] == 0);
    end
    for (int d = 0; d < 4; d++)
      for (int p = 0; p < 2; p++)
        check(n_case[d][p] == 1, $sformatf("case DUT%0d %s passed", d + 1, p ? "BToP" : "BToU"));
    check(n_u2p >= 3, "BToU to BToP switches happened");
    $display("cases passed: %0d of 8, BToU->BToP switches: %0d",
             n_case[0][0] + n_case[0][1] + n_case[1][0] + n_case[1][1] +
             n_case[2][0] + n_case[2][1] + n_case[3][0] + n_case[3][1], n_u2p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

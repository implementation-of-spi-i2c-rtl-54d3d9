// tb_multidut_top: end-to-end test of the MULTIDUT board logic at its
// default parameters (115200 baud at a 48 MHz-class controller clock, SPI
// clock of clk/12 in mode 0 for the CPLD and clk/24 in mode 2 for the DAC,
// CPLD on a separate, unrelated clock).
//
// The testbench plays the test station: it sends command packets on the
// controller's UART and reads the reply bytes, drives the station UART and
// the DUT lines, and watches the DAC through a behavioural model. It walks
// through the bring-up flow: power-up with DUT1 connected, storing a
// configuration in the EEPROM ('E', checked with 'R'), a packet with a bad
// last byte that makes the controller re-initialise and load that
// configuration into the CPLD, DUT switching to each of the four DUTs
// (power off, select, power on, BT_REG_ON toggle), a byte carried over the
// station UART to the selected DUT, DUT_OFF, a DAC setting followed by a
// CPLD write (the master changes mode between them), CPLD read-back, and a
// bad header that makes the controller re-read the strap bit and use the
// other EEPROM. Each mechanism is counted and must occur.
module tb_multidut_top;
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

  dac_model u_dac (.sclk(spi_sclk), .mosi(spi_mosi), .ss_n(dac_ss_n));

  // mechanism counters
  int n_switch = 0, n_dut_off = 0, n_reinit = 0, n_bad_hdr = 0, n_dac = 0;
  int n_ee_wr = 0, n_ee_rd = 0, n_cfg_load = 0, n_readback = 0, n_uart_pass = 0, n_bt_toggle = 0;

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

  task automatic packet(input logic [7:0] b [$]);
    foreach (b[i]) uart_byte(cmd_rxd, b[i]);
    repeat (40 * CPB) @(posedge clk);   // execution and 1-byte reply
  endtask

  task automatic expect_reply(input logic [7:0] v, input string tag);
    if (replies.size() == 0) begin check(0, {tag, ": no reply"}); return; end
    begin
      logic [7:0] r;
      r = replies.pop_front();
      check(r == v, $sformatf("%s: reply %h exp %h", tag, r, v));
    end
  endtask

  task automatic cpld_wr(input logic [3:0] a, input logic [7:0] v);
    packet('{8'h43, 8'h05, {4'hA, a}, v, 8'h00});
    expect_reply(8'h43, $sformatf("C reg%0d", a));
  endtask

  task automatic check_sel(input int s, input string tag);
    for (int k = 0; k < 3; k++) begin
      host_txd = 1'($urandom); host_rts = 1'($urandom);
      dut_txd = 4'($urandom); dut_rts = 4'($urandom);
      #1;
      for (int d = 0; d < 4; d++)
        check(dut_rxd[d] == ((d == s) ? host_txd : 1'b1) && dut_cts[d] == ((d == s) ? host_rts : 1'b1),
              $sformatf("%s DUT%0d lines", tag, d + 1));
      check(host_rxd == ((s >= 0) ? dut_txd[s] : 1'b1), {tag, " host_rxd"});
    end
    host_txd = 1; host_rts = 1; dut_txd = '1; dut_rts = '1;
    check(pcie_en == (s >= 0) && (s < 0 || pcie_port == 2'(s)), {tag, " PCIe port"});
  endtask

  initial begin
    repeat (5) @(posedge clk); rst_n = 1;
    wait (init_done);
    repeat (200) @(posedge clk);
    // power-up default: DUT1 connected, nothing powered
    check_sel(0, "power-up");
    check(vbat == 0 && vio == 0, "power-up: VBAT/VIO off");

    // store a configuration in EEPROM 0: DUT3 on, VBAT+VIO, control byte of DUT3
    packet('{8'h45, 8'h06, 8'h00, 8'h00, 8'h06, 8'h00}); expect_reply(8'h45, "E0"); n_ee_wr++;
    packet('{8'h45, 8'h06, 8'h00, 8'h01, 8'h03, 8'h00}); expect_reply(8'h45, "E1"); n_ee_wr++;
    packet('{8'h45, 8'h06, 8'h00, 8'h07, 8'h3C, 8'h00}); expect_reply(8'h45, "E7"); n_ee_wr++;
    packet('{8'h52, 8'h06, 8'h00, 8'h07, 8'h00, 8'h00}); expect_reply(8'h3C, "R7"); n_ee_rd++;
    check_sel(0, "EEPROM write does not touch CPLD");

    // bad last byte: controller re-initialises and loads the stored configuration
    packet('{8'h43, 8'h05, 8'hA0, 8'h00, 8'h55});
    wait (init_done);
    repeat (200) @(posedge clk);
    n_reinit++;
    check(replies.size() == 0, "no reply to bad packet");
    check_sel(2, "config from EEPROM");
    check(vbat == 4'b0100 && vio == 4'b0100, "config: DUT3 powered");
    check(dut_ctrl[2] == 8'h3C && dut_ctrl[0] == 0, "config: DUT3 control lines");
    if (vbat == 4'b0100) n_cfg_load++;

    // switch through all DUTs as in the bring-up flow
    for (int s = 0; s < 4; s++) begin
      cpld_wr(4'd1, 8'h00);                        // VBAT & VIO off
      check(vbat == 0 && vio == 0, "power off before switching");
      cpld_wr(4'd0, 8'(4 | s));                    // select DUT
      cpld_wr(4'd1, 8'h03);                        // VBAT & VIO on
      cpld_wr(4'd2, 8'h01); cpld_wr(4'd2, 8'h00); cpld_wr(4'd2, 8'h01);  // toggle BT_REG_ON
      check(btr == 4'(1 << s), "BT_REG_ON on selected DUT");
      n_bt_toggle++;
      check_sel(s, $sformatf("DUT%0d", s + 1));
      check(vbat == 4'(1 << s) && vio == 4'(1 << s), "only selected DUT powered");
      n_switch++;
      // one byte from the station to the DUT and one back, over the muxed UART
      fork
        begin repeat (2) @(posedge clk); uart_byte(host_txd, 8'(8'h30 + s)); end
        begin
          logic [7:0] b;
          @(negedge dut_rxd[s]);
          repeat (CPB / 2) @(posedge clk);
          for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = dut_rxd[s]; end
          check(b == 8'(8'h30 + s), $sformatf("byte reached DUT%0d: %h", s + 1, b));
          if (b == 8'(8'h30 + s)) n_uart_pass++;
        end
      join
      // read-back: the next C frame returns the register written last
      cpld_wr(4'd9, 8'(8'hA0 + s));
      cpld_wr(4'd10, 8'h00);
      check(cpld_rdbk == {4'hA, 4'd9, 8'(8'hA0 + s)}, $sformatf("read-back %h", cpld_rdbk));
      if (cpld_rdbk == {4'hA, 4'd9, 8'(8'hA0 + s)}) n_readback++;
    end

    // DUT_OFF
    cpld_wr(4'd1, 8'h00);
    cpld_wr(4'd0, 8'h00);
    check_sel(-1, "DUT_OFF");
    check(vbat == 0 && btr == 0, "DUT_OFF: nothing powered");
    n_dut_off++;

    // DAC: ID 2, code 0x80 -> 2048 mV
    packet('{8'h44, 8'h05, 8'h02, 8'h80, 8'h00}); expect_reply(8'h44, "D");
    check(u_dac.code[2] == 8'h80 && u_dac.mv[2] == 2048, $sformatf("DAC2 %0d mV", u_dac.mv[2]));
    if (u_dac.writes == 1) n_dac++;
    check(u_dac.writes == 1 && u_dac.bad_id == 0, "one DAC write, CPLD frames not seen by DAC");
    check(u_dac.bad_idle == 0, "SCLK at the DAC's idle level when its select falls");
    // back to the CPLD's mode after the DAC's: DUT3 on again
    cpld_wr(4'd0, 8'h06);
    check_sel(2, "CPLD write after DAC write");

    // bad header: strap read again, EEPROM 1 in use (erased)
    strap = 1;
    packet('{8'h5A, 8'h05, 8'h00, 8'h00, 8'h00});
    check(replies.size() == 0, "no reply to bad header");
    if (dut.u_ctrl.ee_sel == 1) n_bad_hdr++;
    packet('{8'h52, 8'h06, 8'h00, 8'h07, 8'h00, 8'h00}); expect_reply(8'hFF, "R from EEPROM 1"); n_ee_rd++;

    check(n_switch == 4, "switches");
    check(n_dut_off > 0, "DUT_OFF happened");
    check(n_reinit > 0 && n_cfg_load > 0, "re-init with EEPROM configuration happened");
    check(n_bad_hdr > 0, "bad header with strap re-read happened");
    check(n_dac > 0, "DAC write happened");
    check(n_ee_wr > 0 && n_ee_rd > 1, "EEPROM write/read happened");
    check(n_readback == 4, "CPLD read-back happened");
    check(n_uart_pass == 4, "UART pass-through to every DUT happened");
    check(n_bt_toggle == 4, "BT_REG_ON toggles happened");
    $display("mechanisms: switch=%0d dut_off=%0d reinit=%0d cfg_load=%0d bad_hdr=%0d dac=%0d ee_wr=%0d ee_rd=%0d readback=%0d uart=%0d bt_toggle=%0d",
             n_switch, n_dut_off, n_reinit, n_cfg_load, n_bad_hdr, n_dac, n_ee_wr, n_ee_rd, n_readback, n_uart_pass, n_bt_toggle);
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

// tb_multidut_cpld: self-checking test of the CPLD as a whole.
//
// A bit-banged SPI master (mode 0, SCLK at one eighth of the CPLD clock)
// writes configuration words. The test checks the reset state (DUT1 on the
// station UART), switching the UART and control lines to each DUT in turn,
// DUT_OFF, power and BT_REG_ON enables, the PCIe port, that a word with a
// wrong tag is ignored, that read-back of the previous register appears on
// MISO during the next frame, and that a reset pulse returns to DUT1.
module tb_multidut_cpld;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic sclk = 0, ss_n = 1, mosi = 0, miso, miso_oe;
  logic host_txd = 1, host_rts = 1, host_rxd, host_cts;
  logic [3:0] dut_rxd, dut_cts, dut_txd, dut_rts, vbat, vio, btr;
  logic [3:0][7:0] dut_ctrl;
  logic [1:0] pcie_port;
  logic pcie_en;

  multidut_cpld dut (.clk, .rst_n, .spi_sclk(sclk), .spi_ss_n(ss_n), .spi_mosi(mosi),
    .spi_miso(miso), .spi_miso_oe(miso_oe), .host_txd, .host_rts, .host_rxd, .host_cts,
    .dut_rxd, .dut_cts, .dut_txd, .dut_rts, .dut_ctrl, .dut_vbat_en(vbat), .dut_vio_en(vio),
    .dut_bt_reg_on(btr), .pcie_port, .pcie_en);

  localparam int HALF = 40;

  task automatic spi_word(input logic [15:0] d, output logic [15:0] got);
    got = 0;
    ss_n = 0; mosi = d[15]; #(HALF);
    for (int i = 15; i >= 0; i--) begin
      sclk = 1; got = {got[14:0], miso}; #(HALF);
      sclk = 0; if (i > 0) mosi = d[i-1]; #(HALF);
    end
    ss_n = 1; #(HALF * 2);
  endtask

  task automatic wr(input logic [3:0] a, input logic [7:0] v);
    logic [15:0] g;
    spi_word({4'hA, a, v}, g);
  endtask

  task automatic check_route(input int sel, input string tag);
    for (int k = 0; k < 4; k++) begin
      host_txd = 1'($urandom); host_rts = 1'($urandom);
      dut_txd = 4'($urandom); dut_rts = 4'($urandom);
      #1;
      for (int d = 0; d < 4; d++) begin
        check(dut_rxd[d] == ((d == sel) ? host_txd : 1'b1), $sformatf("%s rxd%0d", tag, d));
        check(dut_cts[d] == ((d == sel) ? host_rts : 1'b1), $sformatf("%s cts%0d", tag, d));
      end
      check(host_rxd == ((sel >= 0) ? dut_txd[sel] : 1'b1), {tag, " host_rxd"});
      check(host_cts == ((sel >= 0) ? dut_rts[sel] : 1'b1), {tag, " host_cts"});
    end
  endtask

  initial begin
    logic [15:0] g;
    dut_txd = '1; dut_rts = '1;
    #50 rst_n = 1; #100;
    check_route(0, "reset");
    check(pcie_en && pcie_port == 0, "reset PCIe port 1");
    check(vbat == 0 && vio == 0 && btr == 0, "reset power off");
    for (int d = 0; d < 4; d++) wr(4'(5 + d), 8'(8'h11 * (d + 1)));
    for (int s = 3; s >= 0; s--) begin
      wr(4'd1, 8'h00);                     // power off before switching
      wr(4'd0, 8'(4 | s));                 // select DUT s+1
      wr(4'd1, 8'h03);                     // VBAT and VIO on
      wr(4'd2, 8'h01);                     // BT_REG_ON
      check_route(s, $sformatf("DUT%0d", s + 1));
      check(vbat == 4'(1 << s) && vio == 4'(1 << s) && btr == 4'(1 << s), "power on selected DUT");
      check(pcie_port == 2'(s) && pcie_en, "pcie port follows DUT");
      for (int d = 0; d < 4; d++)
        check(dut_ctrl[d] == ((d == s) ? 8'(8'h11 * (d + 1)) : 8'h00), $sformatf("ctrl%0d", d));
    end
    // wrong tag ignored
    spi_word({4'h5, 4'd0, 8'h06}, g);
    check_route(0, "bad tag");
    // read-back: the frame after a write returns that register
    wr(4'd10, 8'h5A);
    spi_word({4'h0, 4'd0, 8'h00}, g);
    check(g == {4'hA, 4'd10, 8'h5A}, $sformatf("readback %h", g));
    // DUT_OFF
    wr(4'd0, 8'h00);
    check_route(-1, "DUT_OFF");
    check(vbat == 0 && vio == 0 && btr == 0 && !pcie_en, "DUT_OFF power");
    // reset returns to DUT1
    rst_n = 0; #20; rst_n = 1; #100;
    check_route(0, "after reset");
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

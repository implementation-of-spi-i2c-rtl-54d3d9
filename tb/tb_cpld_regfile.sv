// tb_cpld_regfile: self-checking test of the CPLD register file.
//
// Checks the reset state (DUT1 selected and on, PCIe and UART paths on,
// power off), then writes random words: a word with the right tag and an
// address below 12 must land in a shadow model kept here, while a wrong tag
// or an address of 12..15 must change nothing. After every word the decoded
// configuration, the per-DUT control bytes and the read-back word are
// compared with values computed from the shadow model.
module tb_cpld_regfile;
  import multidut_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] wr_word, rd_word;
  logic        wr_valid;
  dut_cfg_t    cfg;
  logic [3:0][7:0] dut_ctrl;

  cpld_regfile dut (.clk, .rst_n, .wr_word, .wr_valid, .rd_word, .cfg, .dut_ctrl);

  logic [7:0] shadow [12];
  logic [3:0] last;

  task automatic compare(input string tag);
    check(cfg.dut_idx == shadow[0][1:0] && cfg.dut_on == shadow[0][2], {tag, " dut select"});
    check(cfg.vbat_en == shadow[1][0] && cfg.vio_en == shadow[1][1], {tag, " power"});
    check(cfg.bt_reg_on == shadow[2][0], {tag, " bt_reg_on"});
    check(cfg.pcie_en == shadow[3][0], {tag, " pcie"});
    check(cfg.uart_data_en == shadow[4][0] && cfg.uart_flow_en == shadow[4][1], {tag, " uart"});
    for (int d = 0; d < 4; d++) check(dut_ctrl[d] == shadow[5+d], $sformatf("%s ctrl%0d", tag, d));
    check(rd_word == {4'hA, last, shadow[last]}, $sformatf("%s readback %h", tag, rd_word));
  endtask

  initial begin
    wr_word = 0; wr_valid = 0;
    foreach (shadow[i]) shadow[i] = 0;
    shadow[0] = 8'h04; shadow[3] = 8'h01; shadow[4] = 8'h03; last = 0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    compare("reset");
    check(cfg.dut_idx == 2'd0 && cfg.dut_on, "DUT1 selected after reset");
    for (int i = 0; i < 400; i++) begin
      logic [3:0] tag, addr;
      logic [7:0] data;
      tag  = ($urandom % 3 == 0) ? 4'($urandom) : 4'hA;
      addr = 4'($urandom);
      data = 8'($urandom);
      wr_word = {tag, addr, data}; wr_valid = 1;
      @(negedge clk); wr_valid = 0;
      if (tag == 4'hA && addr < 12) begin shadow[addr] = data; last = addr; end
      compare($sformatf("word %0d", i));
      // a word presented without wr_valid must not write
      wr_word = {4'hA, 4'd9, ~shadow[9]};
      @(negedge clk);
      check(dut.regs[9] == shadow[9], "no write without wr_valid");
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

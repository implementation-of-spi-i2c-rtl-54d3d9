// tb_eeprom_store: self-checking test of the EEPROM array.
//
// Checks that every byte reads 0xFF before it is written, then writes random
// bytes at random row/offset pairs, keeping a reference copy here, and reads
// them back with the one-clock read latency. A read without re must leave
// rdata unchanged.
module tb_eeprom_store;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [6:0] row = 0;
  logic [3:0] offset = 0;
  logic       we = 0, re = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] ref_mem [2048];

  eeprom_store dut (.clk, .row, .offset, .we, .wdata, .re, .rdata);

  task automatic rd(input int a, output logic [7:0] v);
    @(negedge clk); row = 7'(a >> 4); offset = 4'(a); re = 1;
    @(negedge clk); re = 0; v = rdata;
  endtask

  initial begin
    logic [7:0] v;
    foreach (ref_mem[i]) ref_mem[i] = 8'hFF;
    for (int a = 0; a < 2048; a += 37) begin rd(a, v); check(v == 8'hFF, $sformatf("erased %0d", a)); end
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom % 2048;
      @(negedge clk); row = 7'(a >> 4); offset = 4'(a); wdata = 8'($urandom); we = 1;
      ref_mem[a] = wdata;
      @(negedge clk); we = 0;
    end
    for (int i = 0; i < 600; i++) begin
      int a;
      a = $urandom % 2048;
      rd(a, v);
      check(v == ref_mem[a], $sformatf("addr %0d read %h exp %h", a, v, ref_mem[a]));
      @(negedge clk); row = ~row;
      @(negedge clk);
      check(rdata == v, "rdata holds without re");
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

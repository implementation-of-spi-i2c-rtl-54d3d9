// tb_uart: self-checking test of uart_tx and uart_rx (CLKS_PER_BIT=16).
//
// The transmitter's line is decoded here in the middle of each bit and must
// show a start bit, the byte LSB first and a stop bit, with busy high for
// exactly 10 bit times. The receiver is fed frames serialised here, including
// one with a low stop bit that must raise frame_err instead of valid. A final
// loop-back run sends random bytes from the transmitter to the receiver.
module tb_uart;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       tx_start = 0, tx_busy, txd;
  logic [7:0] tx_data = 0, rx_data;
  logic       rxd = 1, rx_valid, rx_ferr, loop = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) u_tx (.clk, .rst_n, .start(tx_start), .data(tx_data), .busy(tx_busy), .txd);
  uart_rx #(.CLKS_PER_BIT(CPB)) u_rx (.clk, .rst_n, .rxd(loop ? txd : rxd), .data(rx_data), .valid(rx_valid), .frame_err(rx_ferr));

  int nvalid = 0, nferr = 0;
  logic [7:0] last_rx;
  always @(posedge clk) begin
    if (rx_valid) begin nvalid++; last_rx = rx_data; end
    if (rx_ferr) nferr++;
  end

  task automatic send_tx(input logic [7:0] b);
    logic [9:0] seen;
    int busy_cycles;
    @(negedge clk); tx_data = b; tx_start = 1;
    @(negedge clk); tx_start = 0;
    busy_cycles = 1;
    for (int i = 0; i < 10; i++) begin
      repeat (CPB / 2 - (i == 0 ? 1 : 0)) @(negedge clk);
      seen[i] = txd;
      repeat (CPB / 2) @(negedge clk);
    end
    while (tx_busy) begin @(negedge clk); busy_cycles++; end
    check(seen == {1'b1, b, 1'b0}, $sformatf("tx frame %b for %h", seen, b));
  endtask

  task automatic drive_rx(input logic [7:0] b, input bit stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rxd = f[i]; repeat (CPB) @(negedge clk); end
    rxd = 1; repeat (CPB) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    check(txd == 1 && !tx_busy, "tx idle after reset");
    // transmitter timing: busy for 10 bit times
    begin
      int c;
      @(negedge clk); tx_data = 8'hA5; tx_start = 1; @(negedge clk); tx_start = 0; c = 1;
      while (tx_busy) begin @(negedge clk); c++; end
      check(c == 10 * CPB + 1 || c == 10 * CPB, $sformatf("tx busy %0d cycles", c));
    end
    for (int i = 0; i < 20; i++) send_tx(8'($urandom));
    // receiver
    for (int i = 0; i < 20; i++) begin
      logic [7:0] b;
      int n0;
      b = 8'($urandom); n0 = nvalid;
      drive_rx(b, 1'b1);
      check(nvalid == n0 + 1 && last_rx == b, $sformatf("rx %h got %h", b, last_rx));
    end
    begin
      int n0, f0;
      n0 = nvalid; f0 = nferr;
      drive_rx(8'h3C, 1'b0);
      check(nvalid == n0 && nferr == f0 + 1, "low stop bit gives frame_err");
    end
    // loop-back
    loop = 1;
    for (int i = 0; i < 10; i++) begin
      logic [7:0] b;
      int n0;
      b = 8'($urandom); n0 = nvalid;
      @(negedge clk); tx_data = b; tx_start = 1; @(negedge clk); tx_start = 0;
      while (tx_busy) @(negedge clk);
      repeat (CPB) @(negedge clk);
      check(nvalid == n0 + 1 && last_rx == b, $sformatf("loop-back %h got %h", b, last_rx));
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

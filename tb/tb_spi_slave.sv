// tb_spi_slave: self-checking test of spi_slave in SPI modes 0 and 3.
//
// A bit-banged master in this testbench clocks 16-bit frames into two slaves
// (mode 0 and mode 3) with SCLK at one eighth of the slave clock. For random
// words it checks that rx_valid pulses once per frame with the word sent,
// that MISO carried the slave's tx_word MSB first, that miso_oe follows SS_n,
// and that a frame of the wrong length is dropped.
module tb_spi_slave;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        sclk[2], ss_n[2], mosi[2], miso[2], oe[2], vld[2];
  logic [15:0] txw[2], rxw[2];
  int          nvalid[2];

  spi_slave #(.WIDTH(16), .CPOL(0), .CPHA(0)) u_s0 (.clk, .rst_n, .sclk(sclk[0]), .ss_n(ss_n[0]),
    .mosi(mosi[0]), .miso(miso[0]), .miso_oe(oe[0]), .tx_word(txw[0]), .rx_word(rxw[0]), .rx_valid(vld[0]));
  spi_slave #(.WIDTH(16), .CPOL(1), .CPHA(1)) u_s3 (.clk, .rst_n, .sclk(sclk[1]), .ss_n(ss_n[1]),
    .mosi(mosi[1]), .miso(miso[1]), .miso_oe(oe[1]), .tx_word(txw[1]), .rx_word(rxw[1]), .rx_valid(vld[1]));

  always @(posedge clk) for (int m = 0; m < 2; m++) if (vld[m]) nvalid[m]++;

  localparam int HALF = 40;  // ns, 4 slave clocks

  // frame of n bits, MSB first; returns what was read on MISO
  task automatic frame(input int m, input int n, input logic [15:0] d, output logic [15:0] got);
    got = 0;
    ss_n[m] = 0;
    check(1'b1, "frame start");
    if (m == 0) mosi[m] = d[n-1];
    #(HALF);
    check(oe[m] == 1, "miso_oe while selected");
    for (int i = n - 1; i >= 0; i--) begin
      if (m == 0) begin
        sclk[m] = 1; got = {got[14:0], miso[m]}; #(HALF);
        sclk[m] = 0; if (i > 0) mosi[m] = d[i-1]; #(HALF);
      end else begin
        sclk[m] = 0; mosi[m] = d[i]; #(HALF);
        sclk[m] = 1; got = {got[14:0], miso[m]}; #(HALF);
      end
    end
    ss_n[m] = 1;
    #(HALF * 2);
    check(oe[m] == 0, "miso_oe released");
  endtask

  initial begin
    logic [15:0] got;
    int n_before;
    sclk[0] = 0; sclk[1] = 1;
    for (int m = 0; m < 2; m++) begin ss_n[m] = 1; mosi[m] = 0; txw[m] = 0; nvalid[m] = 0; end
    #50 rst_n = 1; #50;
    for (int i = 0; i < 40; i++) begin
      for (int m = 0; m < 2; m++) begin
        logic [15:0] d, t;
        d = 16'($urandom); t = 16'($urandom);
        txw[m] = t;
        n_before = nvalid[m];
        frame(m, 16, d, got);
        check(nvalid[m] == n_before + 1, $sformatf("m%0d one rx_valid", m));
        check(rxw[m] == d, $sformatf("m%0d rx %h exp %h", m, rxw[m], d));
        check(got == t, $sformatf("m%0d miso %h exp %h", m, got, t));
      end
    end
    // short and long frames are dropped
    for (int m = 0; m < 2; m++) begin
      n_before = nvalid[m];
      frame(m, 12, 16'h0ABC, got);
      check(nvalid[m] == n_before, $sformatf("m%0d 12-bit frame dropped", m));
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

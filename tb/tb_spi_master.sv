// tb_spi_master: self-checking test of spi_master in all four SPI modes with
// run-time clock divider and mode.
//
// A behavioural slave written here from the mode rules records MOSI on its
// sampling edges and drives a random word on MISO. Each transfer picks a
// random mode, divider (2..9) and frame length (2..16); the test checks the
// bits the slave saw, the word the master received, that only the addressed
// SS_n went low, that SCLK was already at the mode's idle level when SS_n
// fell, the number of SCLK edges inside the frame, the SCLK half period and
// the frame time of (2n+3)*div+1 clocks from start to done.
module tb_spi_master;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        start = 0, ss_idx = 0, cpol = 0, cpha = 0;
  logic [4:0]  nbits = 16;
  logic [7:0]  div = 2;
  logic [15:0] txd = 0, rxd;
  logic        busy, done, sclk, mosi, miso = 0;
  logic [1:0]  ss_n;

  spi_master #(.MAX_BITS(16), .N_SS(2), .DIV_W(8)) dut (
    .clk, .rst_n, .start, .ss_idx, .nbits, .div, .cpol, .cpha, .tx_data(txd),
    .rx_data(rxd), .busy, .done, .sclk, .mosi, .miso, .ss_n);

  // behavioural slave for the mode of the current transfer (m_cpol, m_cpha)
  bit          m_cpol, m_cpha;
  logic [15:0] s_word, s_seen;
  int          s_cnt, s_out, s_edges, n_cur;
  bit          idle_ok;
  wire         sel = !(ss_n[0] & ss_n[1]);
  realtime     t_last, half_min, half_max;

  always @(posedge sel) begin
    s_cnt = 0; s_seen = 0; s_edges = 0; s_out = n_cur - 1;
    idle_ok = (sclk == m_cpol);
    if (!m_cpha) begin miso = s_word[s_out]; end
    t_last = 0; half_min = 1e9; half_max = 0;
  end
  always @(posedge sclk) if (sel) slave_edge(!m_cpol);
  always @(negedge sclk) if (sel) slave_edge(m_cpol);

  task automatic slave_edge(input bit lead);
    s_edges++;
    if (t_last != 0) begin
      if ($realtime - t_last < half_min) half_min = $realtime - t_last;
      if ($realtime - t_last > half_max) half_max = $realtime - t_last;
    end
    t_last = $realtime;
    if (lead != m_cpha) begin                  // sampling edge
      s_seen = {s_seen[14:0], mosi}; s_cnt++;
    end else if (!m_cpha) begin                // mode 0/2: change on trailing
      s_out--; if (s_out >= 0) miso = s_word[s_out];
    end else begin                             // mode 1/3: change on leading
      if (s_out >= 0) miso = s_word[s_out]; s_out--;
    end
  endtask

  task automatic xfer(input int n, input int dv, input bit pol, input bit pha,
                      input logic [15:0] d, input logic [15:0] sw, input bit idx);
    int cyc;
    logic [15:0] mask;
    string tag;
    tag = $sformatf("mode%0d div=%0d n=%0d", {pol, pha}, dv, n);
    mask = (n == 16) ? 16'hFFFF : ((16'd1 << n) - 1);
    s_word = sw & mask; n_cur = n; m_cpol = pol; m_cpha = pha;
    @(negedge clk);
    nbits = 5'(n); div = 8'(dv); cpol = pol; cpha = pha;
    txd = d & mask; ss_idx = idx; start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    // settings are captured at start: scramble them during the frame
    nbits = 5'($urandom); div = 8'($urandom); cpol = 1'($urandom); cpha = 1'($urandom);
    while (!done) begin
      @(negedge clk); cyc++;
      if (sel && ss_n != (idx ? 2'b01 : 2'b10)) begin
        check(0, {tag, ": wrong SS_n"}); break;
      end
    end
    check(cyc == (2*n+3)*dv+1, $sformatf("%s: frame time %0d", tag, cyc));
    check(idle_ok, {tag, ": SCLK at idle level when SS_n fell"});
    check(s_edges == 2*n, $sformatf("%s: %0d SCLK edges", tag, s_edges));
    check(half_min == 10.0*dv && half_max == 10.0*dv, $sformatf("%s: SCLK half period %0t..%0t", tag, half_min, half_max));
    check(rxd == (sw & mask), $sformatf("%s: rx %h exp %h", tag, rxd, sw & mask));
    check(s_cnt == n && s_seen == (d & mask), $sformatf("%s: slave saw %h/%0d exp %h", tag, s_seen, s_cnt, d & mask));
    check(ss_n == 2'b11 && sclk == pol && !busy, {tag, ": idle after frame"});
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    check(sclk == 0 && ss_n == 2'b11 && !busy, "reset state");
    // every mode at the smallest and a larger divider, both frame-length ends
    for (int m = 0; m < 4; m++) begin
      xfer(16, 2, m[1], m[0], 16'($urandom), 16'($urandom), 1'(m));
      xfer(2,  7, m[1], m[0], 16'($urandom), 16'($urandom), 1'(~m[0]));
    end
    for (int i = 0; i < 80; i++)
      xfer(2 + ($urandom % 15), 2 + ($urandom % 8), 1'($urandom), 1'($urandom),
           16'($urandom), 16'($urandom), 1'($urandom));
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

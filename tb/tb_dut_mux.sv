// tb_dut_mux: self-checking test of the DUT multiplexer/demultiplexer.
//
// Drives random configurations and line levels and compares every output
// with a reference computed here: only the selected, switched-on DUT is
// connected to the station UART (data and flow-control pairs enabled
// separately), unselected DUTs see idle 1 on RXD/CTS and 0 on control and
// power lines, at most one DUT is powered, and the PCIe port follows the
// DUT index. Every DUT index and the DUT_OFF case are covered.
module tb_dut_mux;
  import multidut_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  dut_cfg_t cfg;
  logic [3:0][7:0] ctrl_in, dut_ctrl;
  logic host_txd, host_rts, host_rxd, host_cts;
  logic [3:0] dut_rxd, dut_cts, dut_txd, dut_rts, vbat, vio, btr;
  logic [1:0] pcie_port;
  logic pcie_en;

  dut_mux #(.N_DUT(4), .CTRL_W(8)) dut (.cfg, .ctrl_in, .host_txd, .host_rts, .host_rxd, .host_cts,
    .dut_rxd, .dut_cts, .dut_txd, .dut_rts, .dut_ctrl, .dut_vbat_en(vbat), .dut_vio_en(vio),
    .dut_bt_reg_on(btr), .pcie_port, .pcie_en);

  int seen_sel [5];

  initial begin
    for (int i = 0; i < 2000; i++) begin
      cfg = dut_cfg_t'($urandom);
      if (i < 8) begin cfg.dut_idx = 2'(i); cfg.dut_on = (i < 4); cfg.uart_data_en = 1; cfg.uart_flow_en = 1; end
      ctrl_in = {$urandom, $urandom} ;
      host_txd = 1'($urandom); host_rts = 1'($urandom);
      dut_txd = 4'($urandom); dut_rts = 4'($urandom);
      #1;
      seen_sel[cfg.dut_on ? cfg.dut_idx : 4]++;
      for (int d = 0; d < 4; d++) begin
        bit s;
        s = cfg.dut_on && cfg.dut_idx == d;
        check(dut_rxd[d] == ((s && cfg.uart_data_en) ? host_txd : 1'b1), $sformatf("rxd%0d", d));
        check(dut_cts[d] == ((s && cfg.uart_flow_en) ? host_rts : 1'b1), $sformatf("cts%0d", d));
        check(dut_ctrl[d] == (s ? ctrl_in[d] : 8'h00), $sformatf("ctrl%0d", d));
        check(vbat[d] == (s && cfg.vbat_en) && vio[d] == (s && cfg.vio_en) && btr[d] == (s && cfg.bt_reg_on),
              $sformatf("power%0d", d));
      end
      check(host_rxd == ((cfg.dut_on && cfg.uart_data_en) ? dut_txd[cfg.dut_idx] : 1'b1), "host_rxd");
      check(host_cts == ((cfg.dut_on && cfg.uart_flow_en) ? dut_rts[cfg.dut_idx] : 1'b1), "host_cts");
      check($countones(vbat) <= 1 && $countones(vio) <= 1, "one DUT powered at most");
      check(pcie_port == cfg.dut_idx && pcie_en == (cfg.dut_on && cfg.pcie_en), "pcie");
    end
    for (int k = 0; k < 5; k++) check(seen_sel[k] > 0, $sformatf("selection case %0d covered", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

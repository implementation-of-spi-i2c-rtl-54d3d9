// dut_mux: multiplexer/demultiplexer between the station's USB-to-UART port
// and the four DUT connectors, plus the per-DUT power and control lines.
//
// Everything here is combinational and every output has a defined value in
// every case, so no latch or floating line can appear: a DUT that is not
// selected sees its UART inputs at the idle level 1, its control lines at 0
// and its VBAT/VIO enables and BT_REG_ON off. When a DUT is selected and
// switched on (cfg.dut_on), the host TXD/RTS reach that DUT's RXD/CTS and its
// TXD/RTS come back on the host RXD/CTS. The data pair (RXD/TXD) and the flow
// control pair (RTS/CTS) can be enabled separately; a disabled path returns
// the idle level 1 to the host. At most one DUT ever has VBAT or VIO enabled,
// because the enables are decoded from a single index. The PCIe switch port
// select follows the same index.
//
// Line names follow the station's view: host_txd is the data the station
// sends, dut_rxd[i] the data DUT i receives. The mux structure and the
// one-DUT-powered rule follow the design description; idle levels, the
// separate data/flow enables and CTRL_W are this design's own.
module dut_mux
  import multidut_pkg::*;
#(
  parameter int unsigned N_DUT  = 4,
  parameter int unsigned CTRL_W = 8
) (
  input  dut_cfg_t                       cfg,
  input  logic [N_DUT-1:0][CTRL_W-1:0]   ctrl_in,
  // station side (USB-to-UART bridge)
  input  logic                           host_txd,
  input  logic                           host_rts,
  output logic                           host_rxd,
  output logic                           host_cts,
  // DUT side
  output logic [N_DUT-1:0]               dut_rxd,
  output logic [N_DUT-1:0]               dut_cts,
  input  logic [N_DUT-1:0]               dut_txd,
  input  logic [N_DUT-1:0]               dut_rts,
  output logic [N_DUT-1:0][CTRL_W-1:0]   dut_ctrl,
  output logic [N_DUT-1:0]               dut_vbat_en,
  output logic [N_DUT-1:0]               dut_vio_en,
  output logic [N_DUT-1:0]               dut_bt_reg_on,
  // PCIe switch
  output logic [1:0]                     pcie_port,
  output logic                           pcie_en
);

  logic [N_DUT-1:0] sel;

  always_comb begin
    for (int i = 0; i < int'(N_DUT); i++)
      sel[i] = cfg.dut_on && (32'(cfg.dut_idx) == i);

    host_rxd = 1'b1;
    host_cts = 1'b1;
    for (int i = 0; i < int'(N_DUT); i++) begin
      dut_rxd[i]       = (sel[i] && cfg.uart_data_en) ? host_txd : 1'b1;
      dut_cts[i]       = (sel[i] && cfg.uart_flow_en) ? host_rts : 1'b1;
      dut_ctrl[i]      = sel[i] ? ctrl_in[i] : '0;
      dut_vbat_en[i]   = sel[i] && cfg.vbat_en;
      dut_vio_en[i]    = sel[i] && cfg.vio_en;
      dut_bt_reg_on[i] = sel[i] && cfg.bt_reg_on;
      if (sel[i] && cfg.uart_data_en) host_rxd = dut_txd[i];
      if (sel[i] && cfg.uart_flow_en) host_cts = dut_rts[i];
    end

    pcie_port = cfg.dut_idx;
    pcie_en   = cfg.dut_on && cfg.pcie_en;
  end

  // Only one DUT may ever be powered or connected.
  always_comb begin
    a_one_powered: assert final ($onehot0(dut_vbat_en | dut_vio_en))
      else $error("dut_mux: more than one DUT powered");
  end

endmodule

// multidut_cpld: the CPLD of the MULTIDUT board.
//
// The controller writes the CPLD's configuration over SPI: the SPI slave
// collects each 16-bit word, the register file checks its tag and stores the
// data byte in one of 12 registers, and the DUT multiplexer turns those
// registers into the connections of the moment: which DUT port the station's
// UART (RXD, TXD, RTS, CTS) reaches, which DUT gets VBAT/VIO and BT_REG_ON,
// the control lines on each port and the PCIe switch port. During each
// transfer the slave shifts back {tag, address, value} of the register named
// by the previous accepted word.
//
// The CPLD runs on its own clock. rst_n comes from the controller ("reset
// CPLD") and is asserted asynchronously and released through a two-flop
// synchroniser; after reset DUT1 is connected. A word takes effect about
// four CPLD clocks after SS_n rises. The clock must be at least about four
// times SCLK, as the SPI lines are oversampled.
//
// Block split and function follow the design description; clocking, reset
// synchronisation and read-back are this design's own.
module multidut_cpld
  import multidut_pkg::*;
#(
  parameter int unsigned CTRL_W = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // SPI from the controller
  input  logic                   spi_sclk,
  input  logic                   spi_ss_n,
  input  logic                   spi_mosi,
  output logic                   spi_miso,
  output logic                   spi_miso_oe,
  // station UART (USB-to-UART bridge)
  input  logic                   host_txd,
  input  logic                   host_rts,
  output logic                   host_rxd,
  output logic                   host_cts,
  // four DUT ports
  output logic [3:0]             dut_rxd,
  output logic [3:0]             dut_cts,
  input  logic [3:0]             dut_txd,
  input  logic [3:0]             dut_rts,
  output logic [3:0][CTRL_W-1:0] dut_ctrl,
  output logic [3:0]             dut_vbat_en,
  output logic [3:0]             dut_vio_en,
  output logic [3:0]             dut_bt_reg_on,
  // PCIe switch
  output logic [1:0]             pcie_port,
  output logic                   pcie_en
);

  logic [1:0]  rst_sync;
  logic        rst_n_i;
  logic [15:0] rx_word, rd_word;
  logic        rx_valid;
  dut_cfg_t    cfg;
  logic [3:0][7:0] ctrl_bytes;
  logic [3:0][CTRL_W-1:0] ctrl_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rst_sync <= 2'b00;
    else        rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n_i = rst_sync[1];

  spi_slave #(.WIDTH(16), .CPOL(1'b0), .CPHA(1'b0)) u_spi (
    .clk      (clk),
    .rst_n    (rst_n_i),
    .sclk     (spi_sclk),
    .ss_n     (spi_ss_n),
    .mosi     (spi_mosi),
    .miso     (spi_miso),
    .miso_oe  (spi_miso_oe),
    .tx_word  (rd_word),
    .rx_word  (rx_word),
    .rx_valid (rx_valid)
  );

  cpld_regfile u_regs (
    .clk      (clk),
    .rst_n    (rst_n_i),
    .wr_word  (rx_word),
    .wr_valid (rx_valid),
    .rd_word  (rd_word),
    .cfg      (cfg),
    .dut_ctrl (ctrl_bytes)
  );

  always_comb
    for (int d = 0; d < 4; d++) ctrl_in[d] = CTRL_W'(ctrl_bytes[d]);

  dut_mux #(.N_DUT(4), .CTRL_W(CTRL_W)) u_mux (
    .cfg           (cfg),
    .ctrl_in       (ctrl_in),
    .host_txd      (host_txd),
    .host_rts      (host_rts),
    .host_rxd      (host_rxd),
    .host_cts      (host_cts),
    .dut_rxd       (dut_rxd),
    .dut_cts       (dut_cts),
    .dut_txd       (dut_txd),
    .dut_rts       (dut_rts),
    .dut_ctrl      (dut_ctrl),
    .dut_vbat_en   (dut_vbat_en),
    .dut_vio_en    (dut_vio_en),
    .dut_bt_reg_on (dut_bt_reg_on),
    .pcie_port     (pcie_port),
    .pcie_en       (pcie_en)
  );

endmodule

// multidut_top: digital part of the MULTIDUT board, which lets one test
// station exercise four DUT modules in turn without anyone swapping boards.
//
// The command controller (host_ctrl) receives packets from the station over
// its own UART link (cmd_rxd/cmd_txd) and answers each one with a byte. It
// reaches the CPLD and the DAC through one SPI master with two slave selects
// (0: CPLD, 1: DAC) sharing SCLK and MOSI; the master is set to each
// slave's clock rate and mode (CPLD mode 0, DAC mode 2) before every
// transfer. The controller keeps its configuration in one of two 2 KB
// EEPROMs picked by the strap input at start-up. The CPLD
// (multidut_cpld) holds 12 configuration registers and routes the station's
// USB-to-UART lines (RXD, TXD, RTS, CTS), VBAT/VIO enables, BT_REG_ON and
// eight control lines to the one selected DUT port, and selects the PCIe
// switch port. After power-up DUT1 is connected.
//
// The controller runs on clk, the CPLD on cpld_clk (at least about four
// times the SPI clock, clk/(2*SPI_DIV)). The DAC, the PCIe switch, the
// USB-to-UART bridge and the power switches are outside parts whose signals
// are ports here. The partitioning follows the design description; the two
// clocks, the shared SPI bus and the two-EEPROM arrangement are this
// design's own choices.
module multidut_top #(
  parameter int unsigned CLKS_PER_BIT = 417,
  parameter int unsigned SPI_DIV      = 6,   // CPLD: SCLK = clk/(2*SPI_DIV), mode 0
  parameter int unsigned DAC_SPI_DIV  = 12,  // DAC: SCLK = clk/(2*DAC_SPI_DIV), mode 2
  parameter int unsigned RST_CYCLES   = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cpld_clk,
  input  logic            strap,
  // command link to the controller
  input  logic            cmd_rxd,
  output logic            cmd_txd,
  // station UART through the USB-to-UART bridge
  input  logic            host_txd,
  input  logic            host_rts,
  output logic            host_rxd,
  output logic            host_cts,
  // DUT ports
  output logic [3:0]      dut_rxd,
  output logic [3:0]      dut_cts,
  input  logic [3:0]      dut_txd,
  input  logic [3:0]      dut_rts,
  output logic [3:0][7:0] dut_ctrl,
  output logic [3:0]      dut_vbat_en,
  output logic [3:0]      dut_vio_en,
  output logic [3:0]      dut_bt_reg_on,
  // PCIe switch
  output logic [1:0]      pcie_port,
  output logic            pcie_en,
  // DAC on the shared SPI bus
  output logic            spi_sclk,
  output logic            spi_mosi,
  output logic            dac_ss_n,
  // status
  output logic            init_done,
  output logic [15:0]     cpld_rdbk,
  output logic            evt_pkt_ok,
  output logic            evt_bad_end,
  output logic            evt_bad_hdr
);

  // UART
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, rx_ferr, tx_start, tx_busy;
  // SPI
  logic        spi_start, spi_ss_idx, spi_busy, spi_done, spi_miso;
  logic [4:0]  spi_nbits;
  logic [7:0]  spi_div;
  logic        spi_cpol, spi_cpha;
  logic [15:0] spi_tx, spi_rx;
  logic [1:0]  ss_n;
  logic        cpld_miso, cpld_miso_oe;
  // EEPROM
  logic       ee_sel, ee_we, ee_re;
  logic [6:0] ee_row;
  logic [3:0] ee_offset;
  logic [7:0] ee_wdata, ee_rdata, ee_rdata0, ee_rdata1;
  // CPLD reset
  logic       cpld_rst_n;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk (clk), .rst_n (rst_n), .rxd (cmd_rxd),
    .data (rx_data), .valid (rx_valid), .frame_err (rx_ferr)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk (clk), .rst_n (rst_n), .start (tx_start), .data (tx_data),
    .busy (tx_busy), .txd (cmd_txd)
  );

  host_ctrl #(
    .RST_CYCLES (RST_CYCLES),
    .CPLD_DIV (SPI_DIV), .CPLD_CPOL (1'b0), .CPLD_CPHA (1'b0),
    .DAC_DIV (DAC_SPI_DIV), .DAC_CPOL (1'b1), .DAC_CPHA (1'b0)
  ) u_ctrl (
    .clk (clk), .rst_n (rst_n), .strap (strap),
    .rx_data (rx_data), .rx_valid (rx_valid),
    .tx_start (tx_start), .tx_data (tx_data), .tx_busy (tx_busy),
    .spi_start (spi_start), .spi_ss_idx (spi_ss_idx), .spi_nbits (spi_nbits),
    .spi_div (spi_div), .spi_cpol (spi_cpol), .spi_cpha (spi_cpha),
    .spi_tx (spi_tx), .spi_rx (spi_rx), .spi_busy (spi_busy), .spi_done (spi_done),
    .ee_sel (ee_sel), .ee_row (ee_row), .ee_offset (ee_offset), .ee_we (ee_we),
    .ee_wdata (ee_wdata), .ee_re (ee_re), .ee_rdata (ee_rdata),
    .cpld_rst_n (cpld_rst_n), .init_done (init_done), .cpld_rdbk (cpld_rdbk),
    .evt_pkt_ok (evt_pkt_ok), .evt_bad_end (evt_bad_end), .evt_bad_hdr (evt_bad_hdr)
  );

  spi_master #(.MAX_BITS(16), .N_SS(2), .DIV_W(8)) u_spi (
    .clk (clk), .rst_n (rst_n), .start (spi_start), .ss_idx (spi_ss_idx),
    .nbits (spi_nbits), .div (spi_div), .cpol (spi_cpol), .cpha (spi_cpha), .tx_data (spi_tx), .rx_data (spi_rx),
    .busy (spi_busy), .done (spi_done),
    .sclk (spi_sclk), .mosi (spi_mosi), .miso (spi_miso), .ss_n (ss_n)
  );

  // Only the CPLD answers on MISO; the line reads 0 while it is not driven.
  assign spi_miso = cpld_miso_oe & cpld_miso;
  assign dac_ss_n = ss_n[1];

  eeprom_store u_ee0 (
    .clk (clk), .row (ee_row), .offset (ee_offset),
    .we (ee_we & ~ee_sel), .wdata (ee_wdata), .re (ee_re & ~ee_sel), .rdata (ee_rdata0)
  );

  eeprom_store u_ee1 (
    .clk (clk), .row (ee_row), .offset (ee_offset),
    .we (ee_we & ee_sel), .wdata (ee_wdata), .re (ee_re & ee_sel), .rdata (ee_rdata1)
  );

  assign ee_rdata = ee_sel ? ee_rdata1 : ee_rdata0;

  multidut_cpld u_cpld (
    .clk (cpld_clk), .rst_n (cpld_rst_n),
    .spi_sclk (spi_sclk), .spi_ss_n (ss_n[0]), .spi_mosi (spi_mosi),
    .spi_miso (cpld_miso), .spi_miso_oe (cpld_miso_oe),
    .host_txd (host_txd), .host_rts (host_rts), .host_rxd (host_rxd), .host_cts (host_cts),
    .dut_rxd (dut_rxd), .dut_cts (dut_cts), .dut_txd (dut_txd), .dut_rts (dut_rts),
    .dut_ctrl (dut_ctrl), .dut_vbat_en (dut_vbat_en), .dut_vio_en (dut_vio_en),
    .dut_bt_reg_on (dut_bt_reg_on), .pcie_port (pcie_port), .pcie_en (pcie_en)
  );

endmodule

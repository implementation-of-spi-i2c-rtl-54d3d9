// multidut_pkg: constants and types shared by the MULTIDUT controller and CPLD.
//
// The command link carries packets whose first byte names the operation:
// 'C' (0x43) CPLD register write, 'D' (0x44) DAC write, 'E' (0x45) EEPROM
// write and 'R' (0x52) EEPROM read. The
// 16-bit word sent to the CPLD over SPI is {tag[15:12], address[11:8],
// data[7:0]}; these field positions follow the design description. The tag
// value, the register map and the packet lengths are choices of this design.
package multidut_pkg;

  // Packet header bytes.
  localparam logic [7:0] HDR_CPLD   = 8'h43;  // 'C'
  localparam logic [7:0] HDR_DAC    = 8'h44;  // 'D'
  localparam logic [7:0] HDR_EE_WR  = 8'h45;  // 'E'
  localparam logic [7:0] HDR_EE_RD  = 8'h52;  // 'R'
  localparam logic [7:0] PKT_END    = 8'h00;  // mandatory last byte

  // Total packet lengths (header + length byte + operands + 0x00).
  localparam int unsigned LEN_CPLD  = 5;
  localparam int unsigned LEN_DAC   = 5;
  localparam int unsigned LEN_EE    = 6;
  localparam int unsigned PKT_MAX   = 8;

  // 16-bit CPLD word: valid-packet tag in [15:12].
  localparam logic [3:0] CPLD_TAG   = 4'hA;

  // CPLD register map (12 registers).
  localparam int unsigned N_REGS    = 12;
  typedef enum logic [3:0] {
    REG_DUT_SEL = 4'd0,   // [1:0] DUT index, [2] DUT on (0 = DUT_OFF)
    REG_POWER   = 4'd1,   // [0] VBAT enable, [1] VIO enable (selected DUT only)
    REG_BTREG   = 4'd2,   // [0] BT_REG_ON of the selected DUT
    REG_PCIE    = 4'd3,   // [0] PCIe switch enable, port follows the DUT index
    REG_UART    = 4'd4,   // [0] RXD/TXD path on, [1] RTS/CTS path on
    REG_CTRL1   = 4'd5,   // control lines of DUT1 .. DUT4 (5..8)
    REG_CTRL2   = 4'd6,
    REG_CTRL3   = 4'd7,
    REG_CTRL4   = 4'd8,
    REG_SCR0    = 4'd9,   // scratch registers 9..11
    REG_SCR1    = 4'd10,
    REG_SCR2    = 4'd11
  } reg_addr_e;

  // Reset values: DUT1 selected and switched on, PCIe port 1 enabled,
  // both UART paths on, power and BT_REG_ON off.
  localparam logic [7:0] RST_DUT_SEL = 8'h04;
  localparam logic [7:0] RST_PCIE    = 8'h01;
  localparam logic [7:0] RST_UART    = 8'h03;

  typedef struct packed {
    logic [3:0] tag;
    logic [3:0] addr;
    logic [7:0] data;
  } cpld_word_t;

  // Decoded CPLD configuration driven to the DUT multiplexer.
  typedef struct packed {
    logic [1:0] dut_idx;
    logic       dut_on;
    logic       vbat_en;
    logic       vio_en;
    logic       bt_reg_on;
    logic       pcie_en;
    logic       uart_data_en;
    logic       uart_flow_en;
  } dut_cfg_t;

endpackage

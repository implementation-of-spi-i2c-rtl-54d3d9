// cpld_regfile: the CPLD's 12 configuration registers and their decode.
//
// Each 16-bit word from the SPI slave is split into a tag [15:12], a register
// address [11:8] and a data byte [7:0]. A word whose tag equals TAG and whose
// address is below N_REGS writes the byte into that register on the clock
// after wr_valid; any other word is ignored. The registers decode into the
// DUT configuration (selected DUT, on/off, VBAT/VIO enables, BT_REG_ON, PCIe
// switch enable, UART path enables) and four 8-bit control bytes, one per DUT
// port. After reset DUT1 is selected and switched on, its PCIe port and both
// UART paths are enabled, and power and BT_REG_ON are off, so a freshly
// powered board already presents DUT1 to the test station.
//
// For read-back, rd_word holds {TAG, address, value} of the register named by
// the last accepted word; the SPI slave shifts it out during the next
// transfer. The 12-register count and the field positions follow the design
// description; the tag value, the register map, the reset values and the
// read-back scheme are this design's own.
module cpld_regfile
  import multidut_pkg::*;
#(
  parameter logic [3:0] TAG = CPLD_TAG
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] wr_word,
  input  logic        wr_valid,
  output logic [15:0] rd_word,
  output dut_cfg_t    cfg,
  output logic [3:0][7:0] dut_ctrl
);

  logic [N_REGS-1:0][7:0] regs;

  cpld_word_t w;
  logic       accept;
  logic [3:0] last_addr;

  assign w      = cpld_word_t'(wr_word);
  assign accept = wr_valid && (w.tag == TAG) && (32'(w.addr) < N_REGS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_REGS); i++) regs[i] <= 8'h00;
      regs[REG_DUT_SEL] <= RST_DUT_SEL;
      regs[REG_PCIE]    <= RST_PCIE;
      regs[REG_UART]    <= RST_UART;
      last_addr         <= 4'd0;
    end else if (accept) begin
      regs[w.addr] <= w.data;
      last_addr    <= w.addr;
    end
  end

  assign rd_word = {TAG, last_addr, regs[last_addr]};

  always_comb begin
    cfg.dut_idx      = regs[REG_DUT_SEL][1:0];
    cfg.dut_on       = regs[REG_DUT_SEL][2];
    cfg.vbat_en      = regs[REG_POWER][0];
    cfg.vio_en       = regs[REG_POWER][1];
    cfg.bt_reg_on    = regs[REG_BTREG][0];
    cfg.pcie_en      = regs[REG_PCIE][0];
    cfg.uart_data_en = regs[REG_UART][0];
    cfg.uart_flow_en = regs[REG_UART][1];
    for (int d = 0; d < 4; d++) dut_ctrl[d] = regs[int'(REG_CTRL1) + d];
  end

endmodule

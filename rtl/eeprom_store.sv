// eeprom_store: byte-wide configuration EEPROM of ROWS rows of ROW_BYTES
// bytes each (2 KB by default).
//
// The array is addressed by row and offset. A write stores wdata on the
// rising clock edge while we is high; a read returns the addressed byte on
// rdata one clock after re is high. The array starts erased (every byte
// 0xFF). Programming time and endurance of a real EEPROM are not modelled:
// a write completes in one clock. The 2 KB size follows the design
// description; the row size and the timing are this design's own.
module eeprom_store #(
  parameter int unsigned ROWS      = 128,
  parameter int unsigned ROW_BYTES = 16
) (
  input  logic                         clk,
  input  logic [$clog2(ROWS)-1:0]      row,
  input  logic [$clog2(ROW_BYTES)-1:0] offset,
  input  logic                         we,
  input  logic [7:0]                   wdata,
  input  logic                         re,
  output logic [7:0]                   rdata
);

  logic [7:0] mem [ROWS*ROW_BYTES];

  initial for (int i = 0; i < int'(ROWS * ROW_BYTES); i++) mem[i] = 8'hFF;

  always_ff @(posedge clk) begin
    if (we) mem[{row, offset}] <= wdata;
    if (re) rdata <= mem[{row, offset}];
  end

endmodule

// dac_model: behavioural model of the board's four 8-bit DACs on the shared
// SPI bus, for simulation only.
//
// While ss_n is low it shifts in MOSI, MSB first, on the sampling edge of
// its SPI mode (rising SCLK when CPOL equals CPHA, falling otherwise). When
// ss_n rises after 16 bits it takes the upper byte as the DAC ID and the
// lower byte as the code, and updates that channel; the channel's output
// is code * STEP_MV millivolts. IDs above 3, and frames whose SCLK is not at
// the mode's idle level when ss_n falls, are counted as errors.
module dac_model #(
  parameter int STEP_MV = 16,
  parameter bit CPOL    = 1'b1,
  parameter bit CPHA    = 1'b0
) (
  input  logic sclk,
  input  logic mosi,
  input  logic ss_n
);
  logic [7:0] code [4];
  int         mv   [4];
  int         writes = 0, bad_id = 0, bad_idle = 0;
  logic [15:0] sr;
  int          nbit;

  initial for (int i = 0; i < 4; i++) begin code[i] = 0; mv[i] = 0; end

  always @(negedge ss_n) begin
    sr = 0; nbit = 0;
    if (sclk != CPOL) bad_idle++;
  end
  always @(posedge sclk) if (!ss_n && CPOL == CPHA) begin sr = {sr[14:0], mosi}; nbit++; end
  always @(negedge sclk) if (!ss_n && CPOL != CPHA) begin sr = {sr[14:0], mosi}; nbit++; end
  always @(posedge ss_n) if (nbit == 16) begin
    if (sr[15:8] < 4) begin
      code[sr[9:8]] = sr[7:0];
      mv[sr[9:8]]   = int'(sr[7:0]) * STEP_MV;
      writes++;
    end else bad_id++;
  end
endmodule

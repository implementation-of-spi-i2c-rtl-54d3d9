// uart_rx: 8N1 UART receiver for the controller's command link.
//
// The serial input is synchronised with two flops. A falling edge starts a
// frame; the receiver checks the start bit again half a bit later, then
// samples the eight data bits (LSB first) and the stop bit in the middle of
// each bit time, CLKS_PER_BIT clocks apart. With a valid stop bit, valid
// pulses for one clock with the byte on data about 9.5 bit times after the
// start edge; a frame with a low stop bit raises frame_err for one clock
// instead. The frame format and bit rate are this design's own choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 417
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} state_e;

  state_e     state;
  logic [1:0] rxd_s;
  logic [CW-1:0] cnt;
  logic [2:0] bit_idx;
  logic [7:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxd_s     <= 2'b11;
      state     <= R_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      sr        <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      rxd_s     <= {rxd_s[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_IDLE: begin
          cnt <= '0;
          if (!rxd_s[1]) state <= R_START;
        end
        R_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rxd_s[1] ? R_IDLE : R_DATA;
          end else cnt <= cnt + 1'b1;
        end
        R_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt <= '0;
            sr  <= {rxd_s[1], sr[7:1]};
            if (bit_idx == 3'd7) state <= R_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        R_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt <= '0;
            if (rxd_s[1]) begin
              data  <= sr;
              valid <= 1'b1;
            end else frame_err <= 1'b1;
            state <= R_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule

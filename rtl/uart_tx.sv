// uart_tx: 8N1 UART transmitter for the controller's replies.
//
// A one-cycle start pulse while busy is low loads data and sends a start
// bit, the eight data bits LSB first and a stop bit, each CLKS_PER_BIT clocks
// long. busy stays high for the whole frame (10 bit times) and the line rests
// at 1. The frame format and bit rate are this design's own choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 417
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic [9:0]    frame;
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
    end else if (bits_left == 4'd0) begin
      if (start) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
      end
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt       <= '0;
      frame     <= {1'b1, frame[9:1]};
      bits_left <= bits_left - 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign busy = (bits_left != 4'd0);
  assign txd  = busy ? frame[0] : 1'b1;

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("uart_tx: start while busy");

endmodule

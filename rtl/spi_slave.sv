// spi_slave: SPI slave that receives fixed-length words, as used in the CPLD
// to take 16-bit configuration words from the controller.
//
// The slave runs on its own system clock and oversamples SCLK, MOSI and the
// active-low slave select through two-flop synchronisers, so the system
// clock must be at least about four times SCLK. While SS_n is low, every
// sampling edge shifts MOSI into a receive register and every shift edge
// moves the next bit of the transmit word onto MISO, MSB first. The edges
// follow the usual CPOL/CPHA rules: CPOL gives the idle level of SCLK, CPHA=0
// samples on the first edge from idle and CPHA=1 on the second. When SS_n
// rises after exactly WIDTH sampled bits, rx_valid pulses for one clock with
// the word on rx_word; frames of any other length are dropped. tx_word is
// captured when the frame starts. MISO is driven only while SS_n is low
// (miso_oe), leaving the line free for other slaves.
//
// The word width and mode rules follow the design description; the choice of
// mode 0 as default, MSB-first order and the oversampling scheme are this
// design's own.
module spi_slave #(
  parameter int unsigned WIDTH = 16,
  parameter bit          CPOL  = 1'b0,
  parameter bit          CPHA  = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  // SPI pins
  input  logic             sclk,
  input  logic             ss_n,
  input  logic             mosi,
  output logic             miso,
  output logic             miso_oe,
  // parallel side
  input  logic [WIDTH-1:0] tx_word,
  output logic [WIDTH-1:0] rx_word,
  output logic             rx_valid
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [1:0] sclk_s, ss_s, mosi_s;
  logic       sclk_q, ss_q;
  logic [WIDTH-1:0] rx_sr, tx_sr;
  logic [CW-1:0]    bit_cnt;
  logic             first_lead;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= {2{CPOL}};
      ss_s   <= 2'b11;
      mosi_s <= 2'b00;
      sclk_q <= CPOL;
      ss_q   <= 1'b1;
    end else begin
      sclk_s <= {sclk_s[0], sclk};
      ss_s   <= {ss_s[0], ss_n};
      mosi_s <= {mosi_s[0], mosi};
      sclk_q <= sclk_s[1];
      ss_q   <= ss_s[1];
    end
  end

  logic sel, sclk_rise, sclk_fall, lead_edge, trail_edge, sample_edge, shift_edge;
  logic ss_fall, ss_rise;
  assign sel        = ~ss_s[1];
  assign sclk_rise  = ~sclk_q &  sclk_s[1];
  assign sclk_fall  =  sclk_q & ~sclk_s[1];
  assign lead_edge  = CPOL ? sclk_fall : sclk_rise;
  assign trail_edge = CPOL ? sclk_rise : sclk_fall;
  assign sample_edge = sel & (CPHA ? trail_edge : lead_edge);
  // With CPHA=1 the MSB is already on MISO, so the first leading edge does
  // not shift.
  assign shift_edge  = sel & (CPHA ? (lead_edge & ~first_lead) : trail_edge);
  assign ss_fall    =  ss_q & ~ss_s[1];
  assign ss_rise    = ~ss_q &  ss_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sr      <= '0;
      tx_sr      <= '0;
      bit_cnt    <= '0;
      first_lead <= 1'b1;
      rx_word    <= '0;
      rx_valid   <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      if (ss_fall) begin
        tx_sr      <= tx_word;
        bit_cnt    <= '0;
        first_lead <= 1'b1;
      end else if (sel) begin
        if (lead_edge) first_lead <= 1'b0;
        if (sample_edge) begin
          rx_sr <= {rx_sr[WIDTH-2:0], mosi_s[1]};
          if (bit_cnt != CW'(WIDTH + 1)) bit_cnt <= bit_cnt + 1'b1;
        end
        if (shift_edge) tx_sr <= {tx_sr[WIDTH-2:0], 1'b0};
      end
      if (ss_rise && bit_cnt == CW'(WIDTH)) begin
        rx_word  <= rx_sr;
        rx_valid <= 1'b1;
      end
    end
  end

  assign miso    = sel & tx_sr[WIDTH-1];
  assign miso_oe = sel;

endmodule

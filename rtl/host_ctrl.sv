// host_ctrl: command controller of the MULTIDUT board.
//
// This block does in hardware what the board's controller does after power
// up and for every command packet from the test station.
//
// Initialisation: read the strap bit and pick one of the two EEPROMs with it
// (ee_sel), hold the CPLD in reset for RST_CYCLES clocks and wait as long
// again, then read bytes 0..11 of EEPROM row 1 and send each one that is not
// erased (0xFF) to the CPLD as register write {CPLD_TAG, index, byte}. Erased
// bytes are skipped, so an empty EEPROM leaves the CPLD at its reset state
// with DUT1 selected. Then the controller waits for packets (init_done high).
//
// Packets arrive as bytes from the UART receiver: header, total length,
// operands, and a final 0x00. The total length counts every byte of the
// packet (clamped to 3..PKT_MAX while receiving). When the last byte has
// arrived the packet is checked:
//   * last byte not 0x00: the packet is dropped and the whole initialisation
//     runs again, strap bit first (evt_bad_end pulses);
//   * unknown header or a length that does not fit the header: the strap bit
//     is read again and the packet dropped (evt_bad_hdr pulses);
//   * 'C', 5 bytes: bytes 3 and 4 form the 16-bit CPLD word (3rd byte high)
//     sent on SPI slave select 0; the CPLD's reply is kept on cpld_rdbk;
//   * 'D', 5 bytes: DAC ID (byte 3) and value (byte 4) sent as one 16-bit
//     SPI word on slave select 1;
//     each slave gets its own SPI clock divider and mode (CPLD_* and DAC_*
//     parameters), set on the master with every transfer;
//   * 'E', 6 bytes: byte 5 written to the EEPROM at row (byte 3)+1, offset
//     byte 4 (row 0 is kept unused);
//   * 'R', 6 bytes: the byte at that row and offset is read.
// After execution one byte goes back over the UART: the byte read for 'R',
// the header byte as acknowledgement for the others (evt_pkt_ok pulses).
//
// The flow, the packet layout and the field meanings follow the design
// description; the acknowledgement value, the length interpretation, the DAC
// word format, the erased-byte rule, the reset timing and the SPI rates and
// modes are this design's own.
module host_ctrl
  import multidut_pkg::*;
#(
  parameter int unsigned RST_CYCLES = 16,
  // SPI settings per slave: clock divider (SCLK = clk/(2*div)) and mode
  parameter int unsigned CPLD_DIV   = 6,
  parameter bit          CPLD_CPOL  = 1'b0,
  parameter bit          CPLD_CPHA  = 1'b0,
  parameter int unsigned DAC_DIV    = 12,
  parameter bit          DAC_CPOL   = 1'b1,
  parameter bit          DAC_CPHA   = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        strap,
  // UART
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  output logic        tx_start,
  output logic [7:0]  tx_data,
  input  logic        tx_busy,
  // SPI master
  output logic        spi_start,
  output logic        spi_ss_idx,
  output logic [4:0]  spi_nbits,
  output logic [7:0]  spi_div,
  output logic        spi_cpol,
  output logic        spi_cpha,
  output logic [15:0] spi_tx,
  input  logic [15:0] spi_rx,
  input  logic        spi_busy,
  input  logic        spi_done,
  // EEPROM
  output logic        ee_sel,
  output logic [6:0]  ee_row,
  output logic [3:0]  ee_offset,
  output logic        ee_we,
  output logic [7:0]  ee_wdata,
  output logic        ee_re,
  input  logic [7:0]  ee_rdata,
  // CPLD reset and status
  output logic        cpld_rst_n,
  output logic        init_done,
  output logic [15:0] cpld_rdbk,
  output logic        evt_pkt_ok,
  output logic        evt_bad_end,
  output logic        evt_bad_hdr
);

  typedef enum logic [3:0] {
    S_STRAP, S_RST, S_CFG_RD, S_CFG_WAIT, S_CFG_SEND, S_CFG_SPI,
    S_IDLE, S_RECV, S_CHECK, S_SPI, S_SPI_WAIT, S_EE_RD, S_EE_WAIT, S_ACK
  } state_e;

  state_e      state;
  logic [7:0]  pkt [PKT_MAX];
  logic [3:0]  cnt;       // bytes received
  logic [3:0]  need;      // bytes expected
  logic [5:0]  timer;
  logic [3:0]  idx;
  logic [7:0]  reply;
  logic        spi_is_cpld;

  localparam int unsigned TW = 6;

  // clamp a length byte to 3..PKT_MAX
  function automatic logic [3:0] clamp_len(input logic [7:0] l);
    if (l < 8'd3)                 return 4'd3;
    else if (l > 8'(PKT_MAX))     return 4'(PKT_MAX);
    else                          return l[3:0];
  endfunction

  logic [7:0] last_byte;
  assign last_byte = pkt[3'(need - 1'b1)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_STRAP;
      for (int i = 0; i < int'(PKT_MAX); i++) pkt[i] <= '0;
      cnt         <= '0;
      need        <= 4'd3;
      timer       <= '0;
      idx         <= '0;
      reply       <= '0;
      spi_is_cpld <= 1'b0;
      ee_sel      <= 1'b0;
      cpld_rst_n  <= 1'b0;
      init_done   <= 1'b0;
      cpld_rdbk   <= '0;
      tx_start    <= 1'b0;
      tx_data     <= '0;
      spi_start   <= 1'b0;
      spi_ss_idx  <= 1'b0;
      spi_nbits   <= 5'd16;
      spi_div     <= 8'(CPLD_DIV);
      spi_cpol    <= CPLD_CPOL;
      spi_cpha    <= CPLD_CPHA;
      spi_tx      <= '0;
      ee_row      <= '0;
      ee_offset   <= '0;
      ee_we       <= 1'b0;
      ee_wdata    <= '0;
      ee_re       <= 1'b0;
      evt_pkt_ok  <= 1'b0;
      evt_bad_end <= 1'b0;
      evt_bad_hdr <= 1'b0;
    end else begin
      tx_start    <= 1'b0;
      spi_start   <= 1'b0;
      ee_we       <= 1'b0;
      ee_re       <= 1'b0;
      evt_pkt_ok  <= 1'b0;
      evt_bad_end <= 1'b0;
      evt_bad_hdr <= 1'b0;
      if (spi_done && spi_is_cpld) cpld_rdbk <= spi_rx;

      unique case (state)
        // ---------------- initialisation ----------------
        S_STRAP: begin
          init_done  <= 1'b0;
          ee_sel     <= strap;
          cpld_rst_n <= 1'b0;
          timer      <= '0;
          state      <= S_RST;
        end
        S_RST: begin
          timer <= timer + 1'b1;
          if (timer == TW'(RST_CYCLES - 1)) cpld_rst_n <= 1'b1;
          if (timer == TW'(2 * RST_CYCLES - 1)) begin
            idx   <= '0;
            state <= S_CFG_RD;
          end
        end
        S_CFG_RD: begin
          ee_row    <= 7'd1;
          ee_offset <= idx;
          ee_re     <= 1'b1;
          state     <= S_CFG_WAIT;
        end
        S_CFG_WAIT: state <= S_CFG_SEND;
        S_CFG_SEND: begin
          if (ee_rdata != 8'hFF) begin
            spi_tx      <= {CPLD_TAG, idx, ee_rdata};
            spi_ss_idx  <= 1'b0;
            spi_nbits   <= 5'd16;
            spi_div     <= 8'(CPLD_DIV);
            spi_cpol    <= CPLD_CPOL;
            spi_cpha    <= CPLD_CPHA;
            spi_is_cpld <= 1'b1;
            spi_start   <= 1'b1;
            state       <= S_CFG_SPI;
          end else if (idx == 4'(N_REGS - 1)) begin
            init_done <= 1'b1;
            state     <= S_IDLE;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_CFG_RD;
          end
        end
        S_CFG_SPI: if (spi_done) begin
          if (idx == 4'(N_REGS - 1)) begin
            init_done <= 1'b1;
            state     <= S_IDLE;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_CFG_RD;
          end
        end
        // ---------------- packet reception ----------------
        S_IDLE: if (rx_valid) begin
          pkt[0] <= rx_data;
          cnt    <= 4'd1;
          state  <= S_RECV;
        end
        S_RECV: begin
          if (rx_valid) begin
            pkt[cnt[2:0]] <= rx_data;
            if (cnt == 4'd1) need <= clamp_len(rx_data);
            cnt <= cnt + 1'b1;
          end
          if (cnt >= 4'd2 && cnt == need) state <= S_CHECK;
        end
        S_CHECK: begin
          if (last_byte != PKT_END) begin
            evt_bad_end <= 1'b1;
            state       <= S_STRAP;
          end else begin
            unique case (1'b1)
              (pkt[0] == HDR_CPLD  && need == 4'(LEN_CPLD)),
              (pkt[0] == HDR_DAC   && need == 4'(LEN_DAC)): state <= S_SPI;
              (pkt[0] == HDR_EE_WR && need == 4'(LEN_EE)): begin
                ee_row    <= 7'(pkt[2] + 8'd1);
                ee_offset <= pkt[3][3:0];
                ee_wdata  <= pkt[4];
                ee_we     <= 1'b1;
                reply     <= pkt[0];
                state     <= S_ACK;
              end
              (pkt[0] == HDR_EE_RD && need == 4'(LEN_EE)): begin
                ee_row    <= 7'(pkt[2] + 8'd1);
                ee_offset <= pkt[3][3:0];
                ee_re     <= 1'b1;
                state     <= S_EE_WAIT;
              end
              default: begin
                evt_bad_hdr <= 1'b1;
                ee_sel      <= strap;
                state       <= S_IDLE;
              end
            endcase
          end
        end
        // ---------------- execution ----------------
        S_SPI: if (!spi_busy) begin
          spi_tx      <= {pkt[2], pkt[3]};
          spi_ss_idx  <= (pkt[0] == HDR_DAC);
          spi_nbits   <= 5'd16;
          spi_div     <= (pkt[0] == HDR_DAC) ? 8'(DAC_DIV)  : 8'(CPLD_DIV);
          spi_cpol    <= (pkt[0] == HDR_DAC) ? DAC_CPOL : CPLD_CPOL;
          spi_cpha    <= (pkt[0] == HDR_DAC) ? DAC_CPHA : CPLD_CPHA;
          spi_is_cpld <= (pkt[0] == HDR_CPLD);
          spi_start   <= 1'b1;
          reply       <= pkt[0];
          state       <= S_SPI_WAIT;
        end
        S_SPI_WAIT: if (spi_done) state <= S_ACK;
        S_EE_WAIT:  state <= S_EE_RD;
        S_EE_RD: begin
          reply <= ee_rdata;
          state <= S_ACK;
        end
        S_ACK: if (!tx_busy) begin
          tx_data    <= reply;
          tx_start   <= 1'b1;
          evt_pkt_ok <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_STRAP;
      endcase
    end
  end

endmodule

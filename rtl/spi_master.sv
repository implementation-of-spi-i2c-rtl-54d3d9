// spi_master: SPI master with a baud rate generator, a shift register and
// several active-low slave selects; frame length, bit rate and SPI mode are
// programmed per transfer, so one master can serve slaves that need
// different settings.
//
// A transfer starts with a one-cycle start pulse while busy is low. With it
// come the frame length nbits (2 to MAX_BITS), the word tx_data
// (right-aligned, sent MSB first), the divider div (2 or more) and the mode
// bits cpol and cpha; all are captured at start. The baud rate generator
// toggles SCLK every div clocks, so SCLK = clk / (2*div). A frame runs in
// four phases of div clocks each: SCLK moves to its idle level cpol with no
// slave selected, the selected SS_n goes low, 2*nbits SCLK edges follow, and
// SS_n rises half a period after the last edge; then done pulses for one
// clock with the received word right-aligned on rx_data. cpha=0 samples MISO
// on the first edge from idle and cpha=1 on the second, the other edge
// shifts MOSI. An n-bit frame takes (2n+3)*div+1 clocks from start to done.
//
// Programmable 2..16 bit frames, the baud rate generator and shift register,
// and per-slave reconfiguration of rate and mode follow the design
// description; the phase timing and MSB-first order are this design's own.
module spi_master #(
  parameter int unsigned MAX_BITS = 16,
  parameter int unsigned N_SS     = 2,
  parameter int unsigned DIV_W    = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [$clog2(N_SS)-1:0] ss_idx,
  input  logic [4:0]              nbits,
  input  logic [DIV_W-1:0]        div,
  input  logic                    cpol,
  input  logic                    cpha,
  input  logic [MAX_BITS-1:0]     tx_data,
  output logic [MAX_BITS-1:0]     rx_data,
  output logic                    busy,
  output logic                    done,
  // SPI pins
  output logic                    sclk,
  output logic                    mosi,
  input  logic                    miso,
  output logic [N_SS-1:0]         ss_n
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_LEAD, S_RUN, S_TAIL} state_e;
  state_e state;

  logic [DIV_W-1:0]        div_cnt, div_q;
  logic [5:0]              edge_cnt;    // edges done in this frame
  logic [5:0]              edge_total;  // 2*nbits
  logic [MAX_BITS-1:0]     tx_sr, rx_sr;
  logic [4:0]              nbits_q;
  logic                    cpha_q;
  logic [$clog2(N_SS)-1:0] ss_q;
  logic                    tick;

  assign tick = (div_cnt == div_q - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      div_cnt    <= '0;
      div_q      <= DIV_W'(2);
      edge_cnt   <= '0;
      edge_total <= '0;
      tx_sr      <= '0;
      rx_sr      <= '0;
      nbits_q    <= '0;
      cpha_q     <= 1'b0;
      ss_q       <= '0;
      sclk       <= 1'b0;
      ss_n       <= '1;
      rx_data    <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          div_cnt <= '0;
          if (start) begin
            nbits_q    <= nbits;
            edge_total <= {nbits, 1'b0};
            div_q      <= div;
            cpha_q     <= cpha;
            ss_q       <= ss_idx;
            sclk       <= cpol;
            tx_sr      <= tx_data << (MAX_BITS - 32'(nbits));
            rx_sr      <= '0;
            edge_cnt   <= '0;
            state      <= S_SETUP;
          end
        end
        S_SETUP: if (tick) begin
          ss_n  <= ~(N_SS'(1) << ss_q);
          state <= S_LEAD;
        end
        S_LEAD: if (tick) state <= S_RUN;
        S_RUN: if (tick) begin
          // edge number edge_cnt+1: odd edges lead, even edges trail
          sclk     <= ~sclk;
          edge_cnt <= edge_cnt + 1'b1;
          if (edge_cnt[0] == cpha_q)                   // sampling edge
            rx_sr <= {rx_sr[MAX_BITS-2:0], miso};
          else if (edge_cnt != 6'd0 && edge_cnt + 1'b1 != edge_total)
            tx_sr <= {tx_sr[MAX_BITS-2:0], 1'b0};      // shifting edge
          if (edge_cnt + 1'b1 == edge_total) state <= S_TAIL;
        end
        S_TAIL: if (tick) begin
          ss_n    <= '1;
          rx_data <= rx_sr & ~({MAX_BITS{1'b1}} << nbits_q);
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign mosi = tx_sr[MAX_BITS-1];
  assign busy = (state != S_IDLE);

  // Handshake rules: a start pulse is only given while idle, with a legal
  // frame length and divider, and at most one slave is selected.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("spi_master: start while busy");
  a_start_args: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> (nbits >= 5'd2 && 32'(nbits) <= MAX_BITS && div >= DIV_W'(2)))
    else $error("spi_master: illegal frame length or divider");
  a_one_ss: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(~ss_n))
    else $error("spi_master: several slave selects low");

endmodule

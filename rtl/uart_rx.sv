// uart_rx: UART receiver with a shift register and a hold register.
//
// rxd is synchronised by two flip-flops. A falling edge starts a frame; the
// line is looked at again 8 ticks of the 16x baud clock later, in the middle
// of the start bit, and if it is high again the edge is dropped as a false
// start. Each following bit is sampled 16 ticks after the previous sample:
// 5 to 8 data bits (LSB first) into the receive shift register, then the
// parity bit if enabled, then the first stop bit. At the stop-bit sample the
// character moves to the receive hold register (RHR) and rx_done pulses for
// one cycle; the status flags are updated in the same cycle:
//   dr  data ready, cleared by rhr_re (host read of the RHR)
//   oe  overrun: a character arrived while dr was still set (the new
//       character overwrites the RHR)
//   pe  parity error, fe framing error (stop bit low),
//   bi  break: data, parity and stop bits all low
// oe, pe, fe and bi stay set until lsr_re (host read of the line status).
// err_we loads the four error flags from err_wdata, so that a diagnostic
// program can simulate line errors (the host interface allows it only in
// loopback).
// After a break the receiver waits for the line to go high before it looks
// for the next start bit. The RHR resets to 8'hFF, as in the published
// simulation traces. What is detected follows the published feature list;
// the sampling scheme is this design's own.
module uart_rx (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 tick16,
  input  uart_pkg::lcr_t       lcr,
  input  logic                 rxd,
  input  logic                 rhr_re,
  input  logic                 lsr_re,
  input  logic                 err_we,
  input  logic [3:0]           err_wdata,  // {bi, fe, pe, oe}
  output logic [7:0]           rhr,
  output uart_pkg::rx_status_t status,
  output logic                 rx_done
);
  import uart_pkg::*;

  typedef enum logic [2:0] {RX_IDLE, RX_START, RX_DATA, RX_PARITY, RX_STOP, RX_MARK} rx_state_e;

  rx_state_e  state;
  logic [1:0] sync;
  logic       rx_s;
  logic [3:0] tick_cnt;
  logic [2:0] bit_cnt;
  logic [2:0] last_bit;
  logic [7:0] rsr;
  logic       par_rx;
  logic       sample;
  logic       par_ok;
  logic       is_break;

  assign rx_s    = sync[1];
  // Sample point: tick 8 of the start bit, tick 16 of every later bit.
  assign sample  = tick16 && ((state == RX_START) ? (tick_cnt == 4'd7) : (tick_cnt == 4'd15));
  assign rx_done = sample && (state == RX_STOP);
  assign par_ok  = !lcr.pen || ((^{rsr, par_rx}) == !lcr.eps);
  assign is_break = (rsr == '0) && !(lcr.pen && par_rx) && !rx_s;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rxd};
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= RX_IDLE;
      tick_cnt <= '0;
      bit_cnt  <= '0;
      last_bit <= 3'd7;
      rsr      <= '0;
      par_rx   <= 1'b0;
    end else begin
      unique case (state)
        RX_IDLE: if (!rx_s) begin
          state    <= RX_START;
          tick_cnt <= '0;
        end
        RX_START: if (tick16) begin
          tick_cnt <= tick_cnt + 1'b1;
          if (sample) begin
            tick_cnt <= '0;
            if (rx_s) begin
              state <= RX_IDLE;             // false start
            end else begin
              state    <= RX_DATA;
              bit_cnt  <= '0;
              last_bit <= 3'd4 + 3'(lcr.wls);
              rsr      <= '0;
              par_rx   <= 1'b0;
            end
          end
        end
        RX_DATA: if (tick16) begin
          tick_cnt <= tick_cnt + 1'b1;
          if (sample) begin
            rsr[bit_cnt] <= rx_s;
            bit_cnt      <= bit_cnt + 1'b1;
            if (bit_cnt == last_bit) state <= lcr.pen ? RX_PARITY : RX_STOP;
          end
        end
        RX_PARITY: if (tick16) begin
          tick_cnt <= tick_cnt + 1'b1;
          if (sample) begin
            par_rx <= rx_s;
            state  <= RX_STOP;
          end
        end
        RX_STOP: if (tick16) begin
          tick_cnt <= tick_cnt + 1'b1;
          if (sample) state <= is_break ? RX_MARK : RX_IDLE;
        end
        RX_MARK: if (rx_s) state <= RX_IDLE;
        default: state <= RX_IDLE;
      endcase
    end
  end

  // Hold register and status flags.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rhr    <= 8'hFF;
      status <= '0;
    end else begin
      if (rhr_re) status.dr <= 1'b0;
      if (lsr_re) begin
        status.oe <= 1'b0;
        status.pe <= 1'b0;
        status.fe <= 1'b0;
        status.bi <= 1'b0;
      end
      if (err_we) {status.bi, status.fe, status.pe, status.oe} <= err_wdata;
      if (rx_done) begin
        rhr       <= rsr;
        status.dr <= 1'b1;
        if (status.dr && !rhr_re) status.oe <= 1'b1;
        if (!par_ok)              status.pe <= 1'b1;
        if (!rx_s)                status.fe <= 1'b1;
        if (is_break)             status.bi <= 1'b1;
      end
    end
  end

endmodule

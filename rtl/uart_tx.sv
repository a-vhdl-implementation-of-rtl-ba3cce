// uart_tx: UART transmitter with a hold register and a shift register.
//
// The host (or, during self-test, the pattern generator) writes a character
// into the transmit hold register (THR) with thr_we. When the shift register
// is free it takes the character, and the control logic sends one frame on
// txd: a low start bit, 5 to 8 data bits LSB first, an optional even or odd
// parity bit and one or two high stop bits, each bit lasting 16 ticks of
// the 16x baud clock. If the THR was refilled while a frame was going out,
// the next start bit follows the last stop bit without a gap, so a stream of
// characters takes exactly 16 * (1 + bits + parity + stops) ticks each.
// lcr.brk forces txd low (line break). The frame format is read from lcr
// when the shift register is loaded.
//
// thre is high while the THR is empty, temt while both registers are empty.
// tsr_load pulses in the cycle a character moves from THR to shift register.
// A write while the THR is full overwrites it. The frame format comes from
// the published feature list; the state machine is this design's own.
module uart_tx (
  input  logic           clk,
  input  logic           rst,
  input  logic           tick16,
  input  uart_pkg::lcr_t lcr,
  input  logic           thr_we,
  input  logic [7:0]     thr_wdata,
  output logic           txd,
  output logic           thre,
  output logic           temt,
  output logic           tsr_load
);
  import uart_pkg::*;

  typedef enum logic [2:0] {TX_IDLE, TX_START, TX_DATA, TX_PARITY, TX_STOP} tx_state_e;

  tx_state_e  state;
  logic [7:0] thr;
  logic       thr_full;
  logic [7:0] tsr;
  logic [3:0] tick_cnt;
  logic [2:0] bit_cnt;
  logic [2:0] last_bit;    // index of the last data bit of the current frame
  logic       par_bit;
  logic       pen_q;
  logic       two_stop;
  logic       stop_cnt;
  logic       bit_end;
  logic       line;
  logic [7:0] masked;      // THR with the bits above the word length cleared

  assign bit_end  = tick16 && (tick_cnt == 4'd15);
  assign thre     = !thr_full;
  assign temt     = !thr_full && (state == TX_IDLE);
  // The shift register takes a new character when idle, or when the last
  // stop bit ends and the THR holds the next one.
  assign tsr_load = thr_full && ((state == TX_IDLE) ||
                    (state == TX_STOP && bit_end && (!two_stop || stop_cnt)));

  assign masked = thr & (8'hFF >> (2'd3 - lcr.wls));

  always_comb begin
    unique case (state)
      TX_START:  line = 1'b0;
      TX_DATA:   line = tsr[0];
      TX_PARITY: line = par_bit;
      default:   line = 1'b1;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) txd <= 1'b1;
    else     txd <= line && !lcr.brk;
  end

  // Hold register.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      thr      <= '0;
      thr_full <= 1'b0;
    end else if (thr_we) begin
      thr      <= thr_wdata;
      thr_full <= 1'b1;
    end else if (tsr_load) begin
      thr_full <= 1'b0;
    end
  end

  // Shift register and bit timing.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= TX_IDLE;
      tsr      <= '0;
      tick_cnt <= '0;
      bit_cnt  <= '0;
      last_bit <= 3'd7;
      par_bit  <= 1'b0;
      pen_q    <= 1'b0;
      two_stop <= 1'b0;
      stop_cnt <= 1'b0;
    end else if (tsr_load) begin
      state    <= TX_START;
      tsr      <= masked;
      tick_cnt <= '0;
      bit_cnt  <= '0;
      last_bit <= 3'd4 + 3'(lcr.wls);
      par_bit  <= lcr.eps ? ^masked : ~^masked;
      pen_q    <= lcr.pen;
      two_stop <= lcr.stb;
      stop_cnt <= 1'b0;
    end else if (tick16 && state != TX_IDLE) begin
      tick_cnt <= tick_cnt + 1'b1;
      if (bit_end) begin
        unique case (state)
          TX_START: state <= TX_DATA;
          TX_DATA: begin
            tsr     <= tsr >> 1;
            bit_cnt <= bit_cnt + 1'b1;
            if (bit_cnt == last_bit) state <= pen_q ? TX_PARITY : TX_STOP;
          end
          TX_PARITY: state <= TX_STOP;
          TX_STOP: begin
            if (two_stop && !stop_cnt) stop_cnt <= 1'b1;
            else                       state    <= TX_IDLE;
          end
          default: state <= TX_IDLE;
        endcase
      end
    end
  end

endmodule

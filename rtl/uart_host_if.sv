// uart_host_if: host bus interface, register file, interrupts and modem
// control of the UART.
//
// Bus: the host drives cs (active low), rw (1 = read, 0 = write), the 4-bit
// addr and, for a write, data_in. An access takes place in the first clock
// cycle in which cs is seen low; ack goes low one cycle later and stays low
// until cs returns high. For a read, the register value is captured in that
// first cycle and driven on data_out with data_oe high while cs stays low and
// rw is high (the top turns this into the tri-state data pins).
//
// Registers (see uart_pkg): IER 0, LCR 1, MCR 2, divisor low 3 / high 4,
// LSR 5, MSR 6, interrupt sources 7, data 8 (write THR, read RHR). Reading
// the RHR clears data-ready; reading the LSR clears the error bits; reading
// the MSR clears its change bits. In loopback a write to the LSR sets its
// error bits (overrun bit 1, parity 2, framing 3, break 4; err_we, the data
// itself goes to the receiver from the bus), to simulate line errors. irq is high while any enabled source is
// pending: receive data ready, THR empty, a line-status error, a modem
// status change.
//
// Modem control: dtr, rts, out1, out2 are the inverted MCR bits 0..3 (the
// pins are active low). The modem inputs cts, dsr, ri, dcd are active low;
// the MSR holds their active-high state in bits 4..7 and change flags in
// bits 0..3 (for ri: the end of a ring). With MCR.loop set, the modem
// outputs go inactive (high) and the MSR reads RTS, DTR, OUT1, OUT2 in place
// of CTS, DSR, RI, DCD; the top also loops txd into the receiver.
//
// The pin set, the active levels and the OUT1/OUT2 bit positions follow the
// published pin table; the register map and the bus timing are this
// design's own choice.
module uart_host_if (
  input  logic                 clk,
  input  logic                 rst,
  // host bus
  input  logic                 cs_n,
  input  logic                 rw,
  input  logic [3:0]           addr,
  input  logic [7:0]           data_in,
  output logic [7:0]           data_out,
  output logic                 data_oe,
  output logic                 ack_n,
  output logic                 irq,
  // modem pins (active low)
  input  logic                 cts_n,
  input  logic                 dsr_n,
  input  logic                 ri_n,
  input  logic                 dcd_n,
  output logic                 dtr_n,
  output logic                 rts_n,
  output logic                 out1_n,
  output logic                 out2_n,
  // to and from transmitter, receiver and baud generator
  output uart_pkg::lcr_t       lcr,
  output logic [15:0]          divisor,
  output logic                 loop,
  output logic                 thr_we,
  output logic                 rhr_re,
  output logic                 lsr_re,
  output logic                 err_we,
  input  logic [7:0]           rhr,
  input  uart_pkg::rx_status_t rx_status,
  input  logic                 thre,
  input  logic                 temt
);
  import uart_pkg::*;

  logic       cs_q;
  logic       access;
  logic [3:0] ier;
  mcr_t       mcr;
  logic [3:0] modem_in;     // {dcd, ri, dsr, cts}, active high
  logic [3:0] modem_q;
  logic [3:0] msr_delta;
  logic [7:0] lsr;
  logic [7:0] msr;
  logic [3:0] isr;
  logic [7:0] rdata;
  logic       msr_re;

  assign access = !cs_n && cs_q;   // first cycle with cs low
  assign thr_we = access && !rw && (addr == ADDR_DAT);
  assign rhr_re = access &&  rw && (addr == ADDR_DAT);
  assign lsr_re = access &&  rw && (addr == ADDR_LSR);
  assign msr_re = access &&  rw && (addr == ADDR_MSR);
  assign err_we = access && !rw && (addr == ADDR_LSR) && mcr.loop;
  assign loop   = mcr.loop;

  assign modem_in = loop ? {mcr.out2, mcr.out1, mcr.dtr, mcr.rts}
                         : {!dcd_n, !ri_n, !dsr_n, !cts_n};

  assign lsr = {1'b0, temt, thre, rx_status.bi, rx_status.fe, rx_status.pe,
                rx_status.oe, rx_status.dr};
  assign msr = {modem_q, msr_delta};

  assign isr[IER_RX]   = ier[IER_RX]   && rx_status.dr;
  assign isr[IER_THRE] = ier[IER_THRE] && thre;
  assign isr[IER_LS]   = ier[IER_LS]   && (rx_status.oe || rx_status.pe ||
                                           rx_status.fe || rx_status.bi);
  assign isr[IER_MS]   = ier[IER_MS]   && (msr_delta != '0);

  always_comb begin
    unique case (addr)
      ADDR_IER: rdata = {4'b0, ier};
      ADDR_LCR: rdata = lcr;
      ADDR_MCR: rdata = mcr;
      ADDR_DLL: rdata = divisor[7:0];
      ADDR_DLM: rdata = divisor[15:8];
      ADDR_LSR: rdata = lsr;
      ADDR_MSR: rdata = msr;
      ADDR_ISR: rdata = {4'b0, isr};
      ADDR_DAT: rdata = rhr;
      default:  rdata = 8'h00;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cs_q     <= 1'b1;
      ack_n    <= 1'b1;
      data_out <= '0;
      irq      <= 1'b0;
      ier      <= '0;
      lcr      <= LCR_RESET;
      mcr      <= '0;
      divisor  <= 16'd1;
      dtr_n    <= 1'b1;
      rts_n    <= 1'b1;
      out1_n   <= 1'b1;
      out2_n   <= 1'b1;
    end else begin
      cs_q   <= cs_n;
      ack_n  <= cs_n;
      irq    <= (isr != '0);
      dtr_n  <= loop || !mcr.dtr;
      rts_n  <= loop || !mcr.rts;
      out1_n <= loop || !mcr.out1;
      out2_n <= loop || !mcr.out2;
      if (access && rw) data_out <= rdata;
      if (access && !rw) begin
        unique case (addr)
          ADDR_IER: ier            <= data_in[3:0];
          ADDR_LCR: lcr            <= data_in;
          ADDR_MCR: mcr            <= {3'b0, data_in[4:0]};
          ADDR_DLL: divisor[7:0]   <= data_in;
          ADDR_DLM: divisor[15:8]  <= data_in;
          default: ;
        endcase
      end
    end
  end

  assign data_oe = !cs_n && rw && !cs_q;

  // Modem status: last sampled state and change flags.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      modem_q   <= '0;
      msr_delta <= '0;
    end else begin
      modem_q <= modem_in;
      msr_delta[0] <= (msr_re ? 1'b0 : msr_delta[0]) | (modem_in[0] ^ modem_q[0]);
      msr_delta[1] <= (msr_re ? 1'b0 : msr_delta[1]) | (modem_in[1] ^ modem_q[1]);
      msr_delta[2] <= (msr_re ? 1'b0 : msr_delta[2]) | (modem_q[2] & !modem_in[2]);
      msr_delta[3] <= (msr_re ? 1'b0 : msr_delta[3]) | (modem_in[3] ^ modem_q[3]);
    end
  end

  // A host access is acknowledged exactly one cycle after it starts.
  a_ack_follows_access: assert property (@(posedge clk) disable iff (rst)
                                         access |=> !ack_n);

endmodule

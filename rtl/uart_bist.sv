// uart_bist: UART with built-in self-test through two BILBO registers.
//
// A UART for a host processor: programmable 5..8-bit characters, even, odd
// or no parity, one or two stop bits, a 16-bit baud divisor producing a 16x
// sampling clock, break generation and detection, false-start rejection,
// overrun/parity/framing detection, modem control pins, four maskable
// interrupt sources and an internal loopback. Around the transmitter and
// the receiver sit two BILBO registers: A between the data bus and the
// transmitter, B behind the receive hold register. With bilbo_mode = 10 the
// chip is a plain UART. For self-test the tester
//   1. shifts a seed into A and B through si (mode 00, one bit per bilboen
//      cycle; si -> A -> one flip-flop -> B -> so),
//   2. sets the UART to loopback and selects mode 01: A runs as an LFSR
//      whose patterns are sent through the transmitter, looped back, received
//      and compressed by B running as a MISR, one pattern per frame,
//   3. after 255 frames selects mode 00 again and shifts B's signature out
//      of so, MSB first, to compare it with the expected value.
//
// Pins follow the published pin list: hclk, reseth (asynchronous, active
// high), the host bus cs (active low) / rw / addr / bidirectional data / ack
// (active low) / irq, the active-low modem pins, the BILBO pins
// bilbo_mode / bilboen / si / ldareg / ldbreg / so, and txd / rxd.
// See the submodules for bus timing, register map and the self-test timing.
module uart_bist (
  input  logic       hclk,
  input  logic       reseth,
  input  logic       cs,
  input  logic       rw,
  input  logic [3:0] addr,
  input  logic       cts,
  input  logic       dsr,
  input  logic       ri,
  input  logic       dcd,
  input  logic [1:0] bilbo_mode,
  input  logic       bilboen,
  input  logic       si,
  input  logic       ldareg,
  input  logic       ldbreg,
  input  logic       rxd,
  inout  wire  [7:0] data,
  output logic       ack,
  output logic       irq,
  output logic       dtr,
  output logic       rts,
  output logic       out1,
  output logic       out2,
  output logic       so,
  output logic       txd
);
  import uart_pkg::*;

  lcr_t        lcr;
  logic [15:0] divisor;
  logic        loop;
  logic        tick16;
  logic        host_thr_we;
  logic        thr_we;
  logic [7:0]  thr_wdata;
  logic        rhr_re;
  logic        lsr_re;
  logic        err_we;
  logic [7:0]  rhr;
  rx_status_t  rx_status;
  logic        rx_done;
  logic        thre;
  logic        temt;
  logic        tsr_load;
  logic        tx_line;
  logic        rx_line;
  logic [7:0]  data_out;
  logic        data_oe;
  logic [7:0]  data_in;
  bilbo_mode_e mode_a;
  bilbo_mode_e mode_b;
  logic        en_a;
  logic        en_b;
  logic        test_mode;
  logic        pat_we;
  logic [7:0]  qa;
  logic [7:0]  qb;
  logic        so_a;

  // Bidirectional data bus.
  assign data    = data_oe ? data_out : 8'bz;
  assign data_in = data;

  uart_host_if u_host (
    .clk(hclk), .rst(reseth),
    .cs_n(cs), .rw(rw), .addr(addr), .data_in(data_in),
    .data_out(data_out), .data_oe(data_oe), .ack_n(ack), .irq(irq),
    .cts_n(cts), .dsr_n(dsr), .ri_n(ri), .dcd_n(dcd),
    .dtr_n(dtr), .rts_n(rts), .out1_n(out1), .out2_n(out2),
    .lcr(lcr), .divisor(divisor), .loop(loop),
    .thr_we(host_thr_we), .rhr_re(rhr_re), .lsr_re(lsr_re), .err_we(err_we),
    .rhr(rhr), .rx_status(rx_status), .thre(thre), .temt(temt)
  );

  baud_gen u_baud (
    .clk(hclk), .rst(reseth), .divisor(divisor), .tick16(tick16)
  );

  // The transmitter takes its data from register A during self-test.
  assign thr_we    = pat_we || host_thr_we;
  assign thr_wdata = pat_we ? qa : data_in;

  uart_tx u_tx (
    .clk(hclk), .rst(reseth), .tick16(tick16), .lcr(lcr),
    .thr_we(thr_we), .thr_wdata(thr_wdata),
    .txd(tx_line), .thre(thre), .temt(temt), .tsr_load(tsr_load)
  );

  // Internal loopback: the receiver hears the transmitter, txd idles high.
  assign rx_line = loop ? tx_line : rxd;
  assign txd     = loop ? 1'b1    : tx_line;

  uart_rx u_rx (
    .clk(hclk), .rst(reseth), .tick16(tick16), .lcr(lcr), .rxd(rx_line),
    .rhr_re(rhr_re), .lsr_re(lsr_re), .err_we(err_we), .err_wdata(data_in[4:1]),
    .rhr(rhr), .status(rx_status), .rx_done(rx_done)
  );

  bist_ctrl u_bist (
    .clk(hclk), .rst(reseth),
    .bilbo_mode(bilbo_mode), .bilboen(bilboen), .ldareg(ldareg), .ldbreg(ldbreg),
    .rx_done(rx_done), .thre(thre),
    .mode_a(mode_a), .mode_b(mode_b), .en_a(en_a), .en_b(en_b),
    .test_mode(test_mode), .pat_we(pat_we)
  );

  // Register A: seed from si, loads the data bus in normal mode.
  bilbo u_bilbo_a (
    .clk(hclk), .rst(reseth), .en(en_a), .mode(mode_a),
    .si(si), .z(data_in), .q(qa), .so(so_a)
  );

  // Register B: chained after A, observes the receive hold register.
  bilbo u_bilbo_b (
    .clk(hclk), .rst(reseth), .en(en_b), .mode(mode_b),
    .si(so_a), .z(rhr), .q(qb), .so(so)
  );

endmodule

// bist_ctrl: mode and enable control of the two BILBO registers.
//
// Register A sits between the host data bus and the transmitter, register B
// after the receive hold register. Both take the two bilbo_mode pins, but
// B's first mode bit is the XOR of the two pins, so mode 01 runs A as a
// pattern generator (01) and B as a signature register (11) at the same
// time; modes 00 and 10 are the same for both (shift, normal) and mode 11
// swaps the roles (A MISR, B PRPG).
//
// Enables: bilboen gates both registers, ldareg and ldbreg gate A and B
// separately. In shift and normal mode a register updates in every cycle it
// is enabled (the tester pulses bilboen once per bit or per load). In the
// two modes where a register runs as PRPG or MISR (bilbo_mode[0] = 1) it
// updates once per character: in the cycle the receiver delivers a looped
// character (rx_done). So B compresses the previous content of the receive
// hold register while A steps to the next pattern.
//
// Pattern feed: while mode 01 is enabled for A, each new pattern of A is
// written once into the transmitter's hold register (pat_we), as soon as
// that register is empty: first the seed, right after the mode is entered,
// then the pattern after every step. One self-test step is thus one UART
// frame, and the whole 255-pattern run takes 255 frames.
//
// The XOR on the mode lines and the roles of A and B follow the published
// design; the per-character stepping and the pattern feed are this
// design's own way of tying the registers to the UART's timing.
module bist_ctrl (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [1:0]            bilbo_mode,
  input  logic                  bilboen,
  input  logic                  ldareg,
  input  logic                  ldbreg,
  input  logic                  rx_done,
  input  logic                  thre,
  output uart_pkg::bilbo_mode_e mode_a,
  output uart_pkg::bilbo_mode_e mode_b,
  output logic                  en_a,
  output logic                  en_b,
  output logic                  test_mode,
  output logic                  pat_we
);
  import uart_pkg::*;

  logic step_mode;   // a PRPG/MISR mode: registers step once per character
  logic feed;        // A is generating patterns for the transmitter
  logic feed_q;
  logic pending;

  assign mode_a    = bilbo_mode_e'(bilbo_mode);
  assign mode_b    = bilbo_mode_e'({bilbo_mode[1] ^ bilbo_mode[0], bilbo_mode[0]});
  assign step_mode = bilbo_mode[0];
  assign en_a      = bilboen && ldareg && (!step_mode || rx_done);
  assign en_b      = bilboen && ldbreg && (!step_mode || rx_done);
  assign test_mode = (mode_a == BILBO_PRPG);
  assign feed      = test_mode && bilboen && ldareg;
  assign pat_we    = pending && thre;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      feed_q  <= 1'b0;
      pending <= 1'b0;
    end else begin
      feed_q <= feed;
      if (feed && (!feed_q || en_a)) pending <= 1'b1;
      else if (pat_we || !feed)      pending <= 1'b0;
    end
  end

  // A pattern is only written into an empty hold register.
  a_feed_into_empty: assert property (@(posedge clk) disable iff (rst)
                                      pat_we |-> thre);

endmodule

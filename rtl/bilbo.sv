// bilbo: built-in logic block observer register (8 bits by default).
//
// One register that the mode input turns into one of four circuits:
//   00 shift register : q <= {q[W-2:0], si}        (seed in, signature out)
//   01 LFSR / PRPG    : q <= {q[W-2:0], fb}        pseudo-random patterns
//   10 normal         : q <= z                     plain parallel register
//   11 MISR           : q <= {q[W-2:0], fb} ^ z    signature compression
// with fb the XOR of the tapped bits of q. The default taps are bits 7, 3, 2
// and 1 (feedback into bit 0, shift towards the MSB), the polynomial of the
// published design; it is maximal, so the PRPG cycles through all 255
// non-zero states.
//
// The register only changes in a clock cycle where en is high. The serial
// output so is a flip-flop that takes the outgoing MSB on every such update,
// so a chain of BILBOs (so of one into si of the next) passes bits with one
// register stage between them, and a scanned-out signature appears at so
// MSB first, one bit per enabled cycle. That registered serial output is
// this design's reading of the published shift traces.
//
// Reset (rst, asynchronous, active high) clears q and so.
module bilbo #(
  parameter int unsigned          W    = 8,
  parameter logic [W-1:0]         TAPS = 8'b1000_1110
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  uart_pkg::bilbo_mode_e mode,
  input  logic                 si,
  input  logic [W-1:0]         z,
  output logic [W-1:0]         q,
  output logic                 so
);
  import uart_pkg::*;

  logic         fb;
  logic [W-1:0] q_next;

  assign fb = ^(q & TAPS);

  always_comb begin
    unique case (mode)
      BILBO_SHIFT:  q_next = {q[W-2:0], si};
      BILBO_PRPG:   q_next = {q[W-2:0], fb};
      BILBO_NORMAL: q_next = z;
      BILBO_MISR:   q_next = {q[W-2:0], fb} ^ z;
      default:      q_next = q;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q  <= '0;
      so <= 1'b0;
    end else if (en) begin
      q  <= q_next;
      so <= q[W-1];
    end
  end

endmodule

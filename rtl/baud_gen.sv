// baud_gen: programmable baud rate generator.
//
// Divides the host clock by the 16-bit divisor (1 to 65535) and emits a
// one-cycle tick16 pulse every `divisor` clock cycles: the 16x baud clock
// that the transmitter and receiver count. A divisor of 0 is treated as 1.
// The counter restarts whenever it reaches or passes divisor-1, so lowering
// the divisor takes effect at once. Example: hclk 40 MHz, divisor 22 gives a
// 16x clock of 1.818 MHz, i.e. 113.6 kbaud for a nominal 115.2 kbaud link.
// The division range and the 16x output follow the published feature list;
// the counter itself is this design's own.
module baud_gen #(
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] divisor,
  output logic          tick16
);
  logic [DW-1:0] cnt;
  logic [DW-1:0] last;

  assign last   = (divisor == '0) ? '0 : divisor - 1'b1;
  assign tick16 = (cnt >= last);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         cnt <= '0;
    else if (tick16) cnt <= '0;
    else             cnt <= cnt + 1'b1;
  end

endmodule

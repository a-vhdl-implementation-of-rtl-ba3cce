// tb_bist_ctrl: self-checking testbench of the BILBO mode and enable control.
//
// Checks the mode mapping of registers A and B for all four pin modes
// (B's first bit is the XOR of both pins: 01 -> A PRPG, B MISR), the
// enables (every bilboen cycle in shift and normal mode, only on rx_done in
// the PRPG/MISR modes, each gated by ldareg / ldbreg), and the pattern feed
// into the transmitter: one write on entering mode 01, one after every
// step, none while the hold register is full or in other modes.
module tb_bist_ctrl;
  import uart_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [1:0]  bilbo_mode = 2'b10;
  logic        bilboen = 1'b0, ldareg = 1'b1, ldbreg = 1'b1;
  logic        rx_done = 1'b0, thre = 1'b1;
  bilbo_mode_e mode_a, mode_b;
  logic        en_a, en_b, test_mode, pat_we;
  int          checks = 0, failures = 0;
  int          n_pat = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (pat_we) n_pat++;

  bist_ctrl u_dut (.clk(clk), .rst(rst), .bilbo_mode(bilbo_mode), .bilboen(bilboen),
                   .ldareg(ldareg), .ldbreg(ldbreg), .rx_done(rx_done), .thre(thre),
                   .mode_a(mode_a), .mode_b(mode_b), .en_a(en_a), .en_b(en_b),
                   .test_mode(test_mode), .pat_we(pat_we));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [1:0] exp_b[4] = '{2'b00, 2'b11, 2'b10, 2'b01};
    repeat (3) @(negedge clk);
    rst = 1'b0;

    for (int m = 0; m < 4; m++) begin
      bilbo_mode = 2'(m);
      #1;
      check($sformatf("mode A for %0d", m), int'(mode_a), m);
      check($sformatf("mode B for %0d", m), int'(mode_b), int'(exp_b[m]));
    end

    // Shift and normal: enable follows bilboen and the load pins.
    bilbo_mode = 2'b00; bilboen = 1'b1; #1;
    check("shift en", int'({en_a, en_b}), 2'b11);
    ldbreg = 1'b0; #1;
    check("ldbreg gates B", int'({en_a, en_b}), 2'b10);
    bilbo_mode = 2'b10; ldareg = 1'b0; ldbreg = 1'b1; #1;
    check("ldareg gates A", int'({en_a, en_b}), 2'b01);
    bilboen = 1'b0; ldareg = 1'b1; #1;
    check("bilboen off", int'({en_a, en_b}), 2'b00);
    check("no test mode", int'(test_mode), 0);

    // Mode 01: enables only with rx_done; pattern feed.
    @(negedge clk);
    n_pat = 0;
    bilbo_mode = 2'b01; bilboen = 1'b1; thre = 1'b0;
    #1;
    check("test mode", int'(test_mode), 1);
    check("step waits for rx_done", int'({en_a, en_b}), 2'b00);
    repeat (4) @(negedge clk);
    check("feed waits for empty THR", n_pat, 0);
    thre = 1'b1;
    @(negedge clk);
    thre = 1'b0;                     // the write fills the hold register
    repeat (4) @(negedge clk);
    check("seed written once", n_pat, 1);
    thre = 1'b1;
    repeat (4) @(negedge clk);
    check("no write without a step", n_pat, 1);
    rx_done = 1'b1; #1;
    check("step on rx_done", int'({en_a, en_b}), 2'b11);
    @(negedge clk);
    rx_done = 1'b0;
    repeat (4) @(negedge clk);
    check("pattern written after step", n_pat, 2);

    // Mode 11 steps too, but feeds nothing.
    bilbo_mode = 2'b11;
    repeat (2) @(negedge clk);
    rx_done = 1'b1; #1;
    check("mode 11 step", int'({en_a, en_b}), 2'b11);
    @(negedge clk);
    rx_done = 1'b0;
    repeat (4) @(negedge clk);
    check("no feed in mode 11", n_pat, 2);

    // Without bilboen, mode 01 does nothing.
    bilbo_mode = 2'b01; bilboen = 1'b0;
    repeat (4) @(negedge clk);
    rx_done = 1'b1; #1;
    check("no step without bilboen", int'({en_a, en_b}), 2'b00);
    @(negedge clk);
    rx_done = 1'b0;
    check("no feed without bilboen", n_pat, 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

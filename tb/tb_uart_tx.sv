// tb_uart_tx: self-checking testbench of the transmitter.
//
// tick16 is driven every TICK clock cycles, so a bit lasts 16*TICK cycles.
// A monitor decodes txd independently (start edge, then mid-bit samples) and
// compares each frame with the character and format written: 8N1 (the
// published 00000111 example), 5E2, 7O1, 6E1 and so on. Two characters
// written back to back must follow without a gap (the second start edge
// exactly one frame after the first). It also checks thre/temt and break.
module tb_uart_tx;
  import uart_pkg::*;

  localparam int TICK = 2;
  localparam int BIT  = 16 * TICK;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       tick16;
  lcr_t       lcr = LCR_RESET;
  logic       thr_we = 1'b0;
  logic [7:0] thr_wdata = '0;
  logic       txd, thre, temt, tsr_load;
  int         checks = 0, failures = 0;
  int         cyc = 0;
  int         tdiv = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    tdiv <= (tdiv == TICK - 1) ? 0 : tdiv + 1;
  end
  assign tick16 = (tdiv == TICK - 1);

  uart_tx u_dut (.clk(clk), .rst(rst), .tick16(tick16), .lcr(lcr), .thr_we(thr_we),
                 .thr_wdata(thr_wdata), .txd(txd), .thre(thre), .temt(temt), .tsr_load(tsr_load));

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic write(logic [7:0] d);
    @(negedge clk);
    thr_we = 1'b1;
    thr_wdata = d;
    @(negedge clk);
    thr_we = 1'b0;
  endtask

  // Receive one frame from txd and compare. Returns the cycle of the start edge.
  task automatic expect_frame(logic [7:0] d, int nbits, bit pen, bit even, int nstop, output int t0);
    logic [7:0] got = '0;
    logic       p;
    @(negedge txd);
    t0 = cyc;
    repeat (BIT / 2) @(posedge clk);
    check("start bit", int'(txd), 0);
    for (int i = 0; i < nbits; i++) begin
      repeat (BIT) @(posedge clk);
      got[i] = txd;
    end
    check($sformatf("data %0d bits", nbits), int'(got), int'(d & 8'((1 << nbits) - 1)));
    if (pen) begin
      repeat (BIT) @(posedge clk);
      p = ^got;                                  // 1 when the data has an odd count of ones
      check("parity bit", int'(txd), int'(even ? p : !p));
    end
    for (int s = 0; s < nstop; s++) begin
      repeat (BIT) @(posedge clk);
      check("stop bit", int'(txd), 1);
    end
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check("idle line", int'(txd), 1);
    check("thre after reset", int'(thre), 1);
    check("temt after reset", int'(temt), 1);

    // 8N1, the published example character.
    fork
      write(8'b0000_0111);
      expect_frame(8'h07, 8, 0, 0, 1, t0);
    join
    wait (temt);
    @(negedge clk);

    // Back to back 8N1: second frame starts exactly 10 bits after the first.
    fork
      begin
        write(8'hA5);
        repeat (2) @(negedge clk);
        check("thre after load", int'(thre), 1);
        check("temt busy", int'(temt), 0);
        write(8'h3C);
        check("thre full", int'(thre), 0);
      end
      begin
        expect_frame(8'hA5, 8, 0, 0, 1, t0);
        expect_frame(8'h3C, 8, 0, 0, 1, t1);
        // The first start bit begins at the load, the tick phase may trim it.
        checks++;
        if (t1 - t0 > 10 * BIT || t1 - t0 < 10 * BIT - (TICK - 1)) begin
          failures++;
          $display("FAIL frame period %0d", t1 - t0);
        end
      end
    join
    repeat (2 * BIT) @(posedge clk);
    check("temt idle", int'(temt), 1);

    // Other formats.
    wait (temt);
    lcr = '{default: 1'b0, wls: 2'b00, stb: 1'b1};                       // 5N2
    fork write(8'hFF); expect_frame(8'h1F, 5, 0, 0, 2, t0); join
    wait (temt);
    lcr = '{default: 1'b0, wls: 2'b10, pen: 1'b1, eps: 1'b0};            // 7O1
    fork write(8'h55); expect_frame(8'h55, 7, 1, 0, 1, t0); join
    wait (temt);
    lcr = '{default: 1'b0, wls: 2'b01, pen: 1'b1, eps: 1'b1};            // 6E1
    fork write(8'h2B); expect_frame(8'h2B, 6, 1, 1, 1, t0); join
    wait (temt);
    lcr = '{default: 1'b0, wls: 2'b11, pen: 1'b1, eps: 1'b1, stb: 1'b1}; // 8E2
    fork
      begin write(8'h81); write(8'h7E); end
      begin
        expect_frame(8'h81, 8, 1, 1, 2, t0);
        expect_frame(8'h7E, 8, 1, 1, 2, t1);
        checks++;
        if (t1 - t0 > 12 * BIT || t1 - t0 < 12 * BIT - (TICK - 1)) begin
          failures++;
          $display("FAIL 8E2 period %0d", t1 - t0);
        end
      end
    join

    // Break.
    repeat (BIT) @(posedge clk);
    @(negedge clk) lcr.brk = 1'b1;
    repeat (3) @(posedge clk);
    check("break low", int'(txd), 0);
    @(negedge clk) lcr.brk = 1'b0;
    repeat (3) @(posedge clk);
    check("break released", int'(txd), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

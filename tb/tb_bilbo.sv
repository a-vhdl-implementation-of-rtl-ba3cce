// tb_bilbo: self-checking testbench of the BILBO register.
//
// Two BILBOs are chained as in the chip (A.so -> B.si) and driven through the
// published sequences: a seed shifted in (register values of Table 3 style
// traces), the pattern generator (0F -> 1F -> 3F -> 7F -> FF -> FE -> FC and
// 3B -> 76), the signature register (2A with input 07 -> 53), a 255-step
// self-test with a one-character receive delay that must end with signature
// 51 and pattern 0F, and the serial scan-out of that signature on so
// (0,1,0,1,0,0,0,1), and seeding all ones through si. All expected values are literal numbers.
module tb_bilbo;
  import uart_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        en_a = 1'b0, en_b = 1'b0;
  bilbo_mode_e mode_a = BILBO_NORMAL, mode_b = BILBO_NORMAL;
  logic        si = 1'b0;
  logic [7:0]  za = '0, zb = '0;
  logic [7:0]  qa, qb;
  logic        so_a, so_b;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  bilbo u_a (.clk(clk), .rst(rst), .en(en_a), .mode(mode_a), .si(si), .z(za), .q(qa), .so(so_a));
  bilbo u_b (.clk(clk), .rst(rst), .en(en_b), .mode(mode_b), .si(so_a), .z(zb), .q(qb), .so(so_b));

  task automatic check8(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  // One enabled clock edge for the selected registers.
  task automatic step(logic a, logic b);
    @(negedge clk);
    en_a = a;
    en_b = b;
    @(negedge clk);
    en_a = 1'b0;
    en_b = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] shift_a [10] = '{8'h2E, 8'h5C, 8'hB8, 8'h70, 8'hE0, 8'hC0, 8'h81, 8'h03, 8'h07, 8'h0F};
    logic [7:0] shift_b [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h11, 8'h22, 8'h45, 8'h8B, 8'h17, 8'h2E};
    logic       shift_si[10] = '{0, 0, 0, 0, 0, 0, 1, 1, 1, 1};
    logic [7:0] prpg     [6] = '{8'h1F, 8'h3F, 8'h7F, 8'hFF, 8'hFE, 8'hFC};
    logic [7:0] scan_b   [9] = '{8'hA3, 8'h46, 8'h8C, 8'h18, 8'h30, 8'h61, 8'hC3, 8'h87, 8'h0F};
    logic       scan_so  [8] = '{0, 1, 0, 1, 0, 0, 0, 1};
    logic [7:0] rx;

    repeat (3) @(negedge clk);
    rst = 1'b0;
    check8("reset A", qa, 8'h00);
    check8("reset B", qb, 8'h00);

    // Normal mode: A loads the bus twice, B is not enabled.
    za = 8'h98; step(1, 0);
    za = 8'h17; step(1, 0);
    check8("normal load A", qa, 8'h17);
    check8("B holds", qb, 8'h00);

    // Shift mode: seed A with 0F and B with 2E.
    mode_a = BILBO_SHIFT;
    mode_b = BILBO_SHIFT;
    for (int i = 0; i < 10; i++) begin
      si = shift_si[i];
      step(1, 1);
      check8($sformatf("shift A %0d", i), qa, shift_a[i]);
      check8($sformatf("shift B %0d", i), qb, shift_b[i]);
    end

    // Pattern generator from 0F.
    mode_a = BILBO_PRPG;
    for (int i = 0; i < 6; i++) begin
      step(1, 0);
      check8($sformatf("prpg %0d", i), qa, prpg[i]);
    end

    // Pattern generator example 3B -> 76, loaded in normal mode.
    mode_a = BILBO_NORMAL; za = 8'h3B; step(1, 0);
    mode_a = BILBO_PRPG;   step(1, 0);
    check8("prpg 3B", qa, 8'h76);

    // Seeding with si = 1 from 00: 01, 03, 07, ... FF, then the PRPG runs
    // from FF: FE, FC, F9.
    mode_a = BILBO_NORMAL; za = 8'h00; step(1, 0);
    mode_a = BILBO_SHIFT; si = 1'b1;
    for (int i = 0; i < 8; i++) begin
      step(1, 0);
      check8($sformatf("seed ones %0d", i), qa, 8'((16'h1 << (i + 1)) - 1));
    end
    mode_a = BILBO_PRPG;
    step(1, 0); check8("prpg FF", qa, 8'hFE);
    step(1, 0); check8("prpg FE", qa, 8'hFC);
    step(1, 0); check8("prpg FC", qa, 8'hF9);
    si = 1'b0;

    // Signature register example: 2A, input 07 -> 53.
    mode_b = BILBO_NORMAL; zb = 8'h2A; step(0, 1);
    mode_b = BILBO_MISR;   zb = 8'h07; step(0, 1);
    check8("misr 2A^07", qb, 8'h53);

    // Full self-test: A from 0F, B from 2E, receive register starts at FF and
    // then lags A by one pattern. 255 steps give signature 51.
    mode_a = BILBO_NORMAL; mode_b = BILBO_NORMAL;
    za = 8'h0F; zb = 8'h2E; step(1, 1);
    mode_a = BILBO_PRPG; mode_b = BILBO_MISR;
    rx = 8'hFF;
    for (int i = 0; i < 255; i++) begin
      zb = rx;
      rx = qa;
      step(1, 1);
    end
    check8("signature", qb, 8'h51);
    check8("pattern back at seed", qa, 8'h0F);

    // Scan the signature out with si = 1: so gives 0,1,0,1,0,0,0,1.
    // The link flip-flop between A and B holds A's last MSB (1) at this point.
    mode_a = BILBO_SHIFT; mode_b = BILBO_SHIFT; si = 1'b1;
    for (int i = 0; i < 9; i++) begin
      step(1, 1);
      check8($sformatf("scan B %0d", i), qb, scan_b[i]);
      if (i < 8) check8($sformatf("scan so %0d", i), {7'b0, so_b}, {7'b0, scan_so[i]});
    end
    check8("scan A saturates", qa, 8'hFF);

    // Disabled register holds.
    mode_a = BILBO_PRPG; step(0, 0);
    check8("hold", qa, 8'hFF);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

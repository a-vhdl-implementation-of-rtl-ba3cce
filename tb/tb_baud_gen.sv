// tb_baud_gen: self-checking testbench of the baud rate generator.
//
// For several divisors (1, 2, 3, 22 and 0, which counts as 1) it measures
// the number of clock cycles between successive tick16 pulses and checks it
// equals the divisor, and that a divisor change takes effect at once.
module tb_baud_gen;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [15:0] divisor = 16'd1;
  logic        tick16;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  baud_gen u_dut (.clk(clk), .rst(rst), .divisor(divisor), .tick16(tick16));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycles from one tick to the next.
  task automatic measure(int exp);
    int n;
    do @(posedge clk); while (!tick16);
    n = 0;
    do begin
      @(posedge clk);
      n++;
    end while (!tick16);
    checks++;
    if (n != exp) begin
      failures++;
      $display("FAIL divisor %0d: period %0d expected %0d", divisor, n, exp);
    end
  endtask

  initial begin
    int divs[5] = '{1, 2, 3, 22, 0};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (divs[i]) begin
      @(negedge clk);
      divisor = 16'(divs[i]);
      @(posedge clk);
      repeat (3) measure(divs[i] == 0 ? 1 : divs[i]);
    end
    // 40 MHz / (16 * 22) = 113.6 kbaud: 352 cycles per bit.
    @(negedge clk) divisor = 16'd22;
    begin
      int n = 0;
      int t = 0;
      do @(posedge clk); while (!tick16);
      while (t < 16) begin
        @(posedge clk);
        n++;
        if (tick16) t++;
      end
      checks++;
      if (n != 352) begin
        failures++;
        $display("FAIL bit time %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

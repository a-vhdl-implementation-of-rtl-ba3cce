// tb_uart_rx: self-checking testbench of the receiver.
//
// A serial driver in the testbench sends frames on rxd with a bit time of
// 16*TICK clock cycles (tick16 every TICK cycles). Checked: the RHR reset
// value FF; characters in 8N1 (the published 00001111 example), 5, 6, 7 bit
// formats with even and odd parity; data ready and its clearing by a read;
// parity error, framing error, break and overrun flags and their clearing by
// a line-status read; loading the error flags directly (error
// simulation); rejection of a false start (a low pulse shorter than
// half a bit); and the rx_done pulse count.
module tb_uart_rx;
  import uart_pkg::*;

  localparam int TICK = 2;
  localparam int BIT  = 16 * TICK;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       tick16;
  lcr_t       lcr = LCR_RESET;
  logic       rxd = 1'b1;
  logic       rhr_re = 1'b0, lsr_re = 1'b0;
  logic       err_we = 1'b0;
  logic [3:0] err_wdata = '0;
  logic [7:0] rhr;
  rx_status_t st;
  logic       rx_done;
  int         checks = 0, failures = 0;
  int         tdiv = 0;
  int         done_cnt = 0;

  always #5 clk = ~clk;
  always @(posedge clk) tdiv <= (tdiv == TICK - 1) ? 0 : tdiv + 1;
  assign tick16 = (tdiv == TICK - 1);
  always @(posedge clk) if (rx_done) done_cnt++;

  uart_rx u_dut (.clk(clk), .rst(rst), .tick16(tick16), .lcr(lcr), .rxd(rxd),
                 .rhr_re(rhr_re), .lsr_re(lsr_re), .err_we(err_we),
                 .err_wdata(err_wdata), .rhr(rhr), .status(st), .rx_done(rx_done));

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

  task automatic send_bit(logic b);
    rxd = b;
    repeat (BIT) @(negedge clk);
  endtask

  // One frame; par_flip inverts the parity bit, stop_val is the stop bit.
  task automatic send(logic [7:0] d, int nbits, bit pen, bit even, bit par_flip, bit stop_val);
    logic p = 1'b0;
    send_bit(1'b0);
    for (int i = 0; i < nbits; i++) begin
      send_bit(d[i]);
      p ^= d[i];
    end
    if (pen) send_bit((even ? p : !p) ^ par_flip);
    send_bit(stop_val);
    rxd = 1'b1;
    repeat (BIT) @(negedge clk);
  endtask

  task automatic pulse_read(bit rhr_rd, bit lsr_rd);
    @(negedge clk);
    rhr_re = rhr_rd;
    lsr_re = lsr_rd;
    @(negedge clk);
    rhr_re = 1'b0;
    lsr_re = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check("rhr reset", int'(rhr), 8'hFF);
    check("dr reset", int'(st.dr), 0);

    // 8N1, the published example: four high then four low bits.
    send(8'h0F, 8, 0, 0, 0, 1);
    check("8N1 data", int'(rhr), 8'h0F);
    check("dr set", int'(st.dr), 1);
    check("no errors", int'({st.oe, st.pe, st.fe, st.bi}), 0);
    pulse_read(1, 0);
    check("dr cleared", int'(st.dr), 0);

    // Overrun: two characters without a read.
    send(8'h11, 8, 0, 0, 0, 1);
    send(8'h22, 8, 0, 0, 0, 1);
    check("overrun data", int'(rhr), 8'h22);
    check("overrun flag", int'(st.oe), 1);
    pulse_read(1, 1);
    check("overrun cleared", int'(st.oe), 0);

    // Formats with parity.
    lcr = '{default: 1'b0, wls: 2'b10, pen: 1'b1, eps: 1'b1};   // 7E1
    send(8'h5A, 7, 1, 1, 0, 1);
    check("7E1 data", int'(rhr), 8'h5A);
    check("7E1 parity ok", int'(st.pe), 0);
    send(8'h33, 7, 1, 1, 1, 1);
    check("7E1 parity error", int'(st.pe), 1);
    pulse_read(1, 1);
    lcr = '{default: 1'b0, wls: 2'b00, pen: 1'b1, eps: 1'b0};   // 5O1
    send(8'h15, 5, 1, 0, 0, 1);
    check("5O1 data", int'(rhr), 8'h15);
    check("5O1 parity ok", int'(st.pe), 0);
    lcr = '{default: 1'b0, wls: 2'b01};                          // 6N1
    send(8'h2C, 6, 0, 0, 0, 1);
    check("6N1 data", int'(rhr), 8'h2C);
    pulse_read(1, 1);

    // Framing error.
    lcr = LCR_RESET;
    send(8'hC3, 8, 0, 0, 0, 0);
    check("framing error", int'(st.fe), 1);
    check("framing not break", int'(st.bi), 0);
    pulse_read(1, 1);
    check("framing cleared", int'(st.fe), 0);

    // Break: line low for longer than a frame.
    rxd = 1'b0;
    repeat (14 * BIT) @(negedge clk);
    check("break flag", int'(st.bi), 1);
    check("break data", int'(rhr), 8'h00);
    rxd = 1'b1;
    repeat (2 * BIT) @(negedge clk);
    pulse_read(1, 1);

    // False start: a low pulse of a quarter bit is ignored.
    begin
      automatic int n_prev = done_cnt;
      rxd = 1'b0;
      repeat (BIT / 4) @(negedge clk);
      rxd = 1'b1;
      repeat (12 * BIT) @(negedge clk);
      check("false start ignored", done_cnt - n_prev, 0);
      check("false start no data", int'(st.dr), 0);
      // A good frame right after still arrives.
      send(8'hE7, 8, 0, 0, 0, 1);
      check("after false start", int'(rhr), 8'hE7);
    end
    check("rx_done count", done_cnt, 10);

    // Simulated errors: load {bi, fe, pe, oe} = 1010, then clear by a read.
    @(negedge clk);
    err_we = 1'b1; err_wdata = 4'b1010;
    @(negedge clk);
    err_we = 1'b0;
    check("simulated errors", int'({st.bi, st.fe, st.pe, st.oe}), 4'b1010);
    pulse_read(0, 1);
    check("simulated errors cleared", int'({st.bi, st.fe, st.pe, st.oe}), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_uart_bist: end-to-end testbench of the UART with BIST, default sizes.
//
// The testbench plays host CPU, modem and tester around one uart_bist at
// 40 MHz with the baud divisor 22 (16x clock 1.818 MHz, 113.6 kbaud, the
// closest to 115.2 kbaud), 8N1, one bit = 352 clock cycles.
//  1. Self-test, right after reset as the receive hold register's reset
//     value FF enters the signature: register A is loaded with 98 and 17
//     from the bus, the seed is shifted in through si (A -> 0F, B -> 2E),
//     the UART is put in loopback, mode 01 runs 255 patterns (the testbench
//     reads each received pattern after irq and compares it with its own
//     LFSR model), and mode 00 shifts the signature out of so: it must be
//     51 (bits 0,1,0,1,0,0,0,1), after 255 frames of 3520 cycles.
//  2. Normal mode (bilbo_mode 10): a character written to the data register
//     (address 8) appears on txd; a character sent on rxd raises irq and is
//     read back; a short low pulse on rxd is ignored (false start); the modem
//     pins follow the modem control register; cts changes are reported.
//  3. Loopback diagnostics: break and overrun are produced by the UART
//     itself and read from the line status register; parity and framing
//     errors are simulated by writing the line status register, and raise
//     the line-status interrupt.
// Each mechanism is counted and a mechanism that never happened is a
// failure.
module tb_uart_bist;
  import uart_pkg::*;

  localparam int DIV    = 22;
  localparam int BITCYC = 16 * DIV;

  logic       hclk = 1'b0;
  logic       reseth = 1'b1;
  logic       cs = 1'b1, rw = 1'b1;
  logic [3:0] addr = '0;
  logic       cts = 1'b1, dsr = 1'b1, ri = 1'b1, dcd = 1'b1;
  logic [1:0] bilbo_mode = 2'b10;
  logic       bilboen = 1'b0, si = 1'b0, ldareg = 1'b1, ldbreg = 1'b1;
  logic       rxd = 1'b1;
  wire  [7:0] data;
  logic [7:0] drv = '0;
  logic       drv_en = 1'b0;
  logic       ack, irq, dtr, rts, out1, out2, so, txd;
  int         checks = 0, failures = 0;
  longint     cyc = 0;

  // Mechanism counters.
  int n_tx = 0, n_rx = 0, n_irq = 0, n_false_start = 0, n_modem = 0, n_msr = 0;
  int n_err_sim = 0;
  int n_break = 0, n_overrun = 0, n_normal_load = 0, n_shift = 0, n_steps = 0, n_scan = 0;

  assign data = drv_en ? drv : 8'bz;

  always #12.5 hclk = ~hclk;        // 40 MHz
  always @(posedge hclk) cyc <= cyc + 1;

  uart_bist u_dut (
    .hclk(hclk), .reseth(reseth), .cs(cs), .rw(rw), .addr(addr),
    .cts(cts), .dsr(dsr), .ri(ri), .dcd(dcd),
    .bilbo_mode(bilbo_mode), .bilboen(bilboen), .si(si), .ldareg(ldareg), .ldbreg(ldbreg),
    .rxd(rxd), .data(data), .ack(ack), .irq(irq), .dtr(dtr), .rts(rts),
    .out1(out1), .out2(out2), .so(so), .txd(txd));

  initial begin
    repeat (3_000_000) @(posedge hclk);
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

  // Host bus cycles; optionally pulse bilboen while the write data is valid.
  task automatic bus_write(logic [3:0] a, logic [7:0] d, bit pulse_bilbo = 0);
    @(negedge hclk);
    cs = 1'b0; rw = 1'b0; addr = a; drv = d; drv_en = 1'b1;
    bilboen = pulse_bilbo;
    @(negedge hclk);
    bilboen = 1'b0;
    while (ack) @(negedge hclk);
    cs = 1'b1;
    @(negedge hclk);
    drv_en = 1'b0;
  endtask

  task automatic bus_read(logic [3:0] a, output logic [7:0] d);
    @(negedge hclk);
    cs = 1'b0; rw = 1'b1; addr = a;
    @(negedge hclk);
    while (ack) @(negedge hclk);
    d = data;
    cs = 1'b1;
    @(negedge hclk);
  endtask

  // Modem side: send one 8N1 frame on rxd.
  task automatic send_rxd(logic [7:0] d);
    rxd = 1'b0;
    repeat (BITCYC) @(negedge hclk);
    for (int i = 0; i < 8; i++) begin
      rxd = d[i];
      repeat (BITCYC) @(negedge hclk);
    end
    rxd = 1'b1;
    repeat (BITCYC) @(negedge hclk);
  endtask

  // Modem side: receive one 8N1 frame from txd.
  task automatic recv_txd(output logic [7:0] d, output bit ok);
    @(negedge txd);
    repeat (BITCYC / 2) @(posedge hclk);
    ok = (txd == 1'b0);
    for (int i = 0; i < 8; i++) begin
      repeat (BITCYC) @(posedge hclk);
      d[i] = txd;
    end
    repeat (BITCYC) @(posedge hclk);
    ok = ok && (txd == 1'b1);
  endtask

  function automatic logic [7:0] lfsr_next(logic [7:0] q);
    return {q[6:0], q[7] ^ q[3] ^ q[2] ^ q[1]};
  endfunction

  initial begin
    logic [7:0] d, pat;
    bit         ok;
    longint     t_start, t_end;

    repeat (4) @(negedge hclk);
    reseth = 1'b0;
    repeat (2) @(negedge hclk);

    // ---- configuration ----
    bus_write(ADDR_DLL, 8'(DIV));
    bus_write(ADDR_DLM, 8'h00);
    bus_write(ADDR_LCR, 8'h03);                 // 8N1
    bus_write(ADDR_IER, 8'h01);                 // receive interrupt
    bus_read(ADDR_DAT, d);
    check("RHR after reset", int'(d), 8'hFF);

    // ---- self-test ----
    // Normal mode: A loads the bus (B held with ldbreg = 0).
    ldbreg = 1'b0;
    bus_write(4'h1, 8'h98, 1);
    bus_write(4'h1, 8'h17, 1);
    bus_write(ADDR_LCR, 8'h03);                 // restore the line control
    n_normal_load += 2;
    ldbreg = 1'b1;
    // Shift mode: seed A = 0F, B = 2E through si, one bit per bilboen cycle.
    bilbo_mode = 2'b00;
    foreach (ok_seed[i]) begin
      @(negedge hclk);
      si = ok_seed[i];
      bilboen = 1'b1;
      @(negedge hclk);
      bilboen = 1'b0;
      n_shift++;
    end
    // The seeds are visible only through the run; the first received
    // pattern must be A's seed 0F.
    bus_write(ADDR_MCR, 8'h10);                 // loopback
    bus_write(ADDR_IER, 8'h01);
    @(negedge hclk);
    bilbo_mode = 2'b01;
    bilboen = 1'b1;
    t_start = cyc;
    pat = 8'h0F;
    for (int k = 0; k < 255; k++) begin
      while (!irq) @(negedge hclk);
      bus_read(ADDR_DAT, d);
      check($sformatf("pattern %0d", k), int'(d), int'(pat));
      pat = lfsr_next(pat);
      n_steps++;
    end
    t_end = cyc;
    @(negedge hclk);
    bilboen = 1'b0;
    bilbo_mode = 2'b00;
    // 255 frames of 10 bits.
    checks++;
    // From mode entry to the middle of the 255th stop bit.
    if (t_end - t_start < (2550 * BITCYC - BITCYC / 2) - 20 ||
        t_end - t_start > (2550 * BITCYC - BITCYC / 2) + 20) begin
      failures++;
      $display("FAIL self-test took %0d cycles", t_end - t_start);
    end
    $display("self-test: %0d cycles, %0.2f ms at 40 MHz", t_end - t_start,
             real'(t_end - t_start) * 25.0e-6);
    // Scan out the signature on so, MSB first.
    si = 1'b1;
    d = '0;
    for (int i = 0; i < 8; i++) begin
      @(negedge hclk);
      bilboen = 1'b1;
      @(negedge hclk);
      bilboen = 1'b0;
      d = {d[6:0], so};
      n_scan++;
    end
    check("signature", int'(d), 8'h51);
    bilbo_mode = 2'b10;
    bus_write(ADDR_MCR, 8'h00);
    bus_read(ADDR_DAT, d);

    // ---- normal transmit ----
    fork
      bus_write(ADDR_DAT, 8'b0000_0111);
      recv_txd(d, ok);
    join
    check("tx frame ok", int'(ok), 1);
    check("tx data", int'(d), 8'h07);
    if (ok && d == 8'h07) n_tx++;

    // ---- normal receive with interrupt ----
    send_rxd(8'b0000_1111);
    repeat (4) @(negedge hclk);
    check("irq on receive", int'(irq), 1);
    if (irq) n_irq++;
    bus_read(ADDR_DAT, d);
    check("rx data", int'(d), 8'h0F);
    if (d == 8'h0F) n_rx++;
    repeat (2) @(negedge hclk);
    check("irq cleared by read", int'(irq), 0);

    // ---- false start ----
    rxd = 1'b0;
    repeat (BITCYC / 4) @(negedge hclk);
    rxd = 1'b1;
    repeat (12 * BITCYC) @(negedge hclk);
    bus_read(ADDR_LSR, d);
    check("false start: no data", int'(d[0]), 0);
    if (!d[0]) n_false_start++;

    // ---- modem control and status ----
    bus_write(ADDR_MCR, 8'h0F);
    check("modem pins low", int'({dtr, rts, out1, out2}), 0);
    if ({dtr, rts, out1, out2} == 4'h0) n_modem++;
    bus_write(ADDR_MCR, 8'h04);
    check("only out1 low", int'({dtr, rts, out1, out2}), 4'b1101);
    bus_read(ADDR_MSR, d);                      // clear deltas
    @(negedge hclk) cts = 1'b0;
    repeat (3) @(negedge hclk);
    bus_read(ADDR_MSR, d);
    check("msr cts", int'(d), 8'h11);
    if (d == 8'h11) n_msr++;
    cts = 1'b1;

    // ---- loopback diagnostics: break and overrun ----
    bus_write(ADDR_MCR, 8'h10);
    bus_write(ADDR_IER, 8'h00);
    bus_read(ADDR_LSR, d);
    bus_write(ADDR_LCR, 8'h43);                 // break on
    repeat (12 * BITCYC) @(negedge hclk);
    check("txd idle in loopback", int'(txd), 1);
    bus_write(ADDR_LCR, 8'h03);
    repeat (2 * BITCYC) @(negedge hclk);
    bus_read(ADDR_LSR, d);
    check("break detected", int'(d[4]), 1);
    if (d[4]) n_break++;
    bus_read(ADDR_DAT, d);
    bus_write(ADDR_DAT, 8'h55);
    bus_write(ADDR_DAT, 8'hAA);
    repeat (21 * BITCYC) @(negedge hclk);
    bus_read(ADDR_LSR, d);
    check("overrun detected", int'(d[1]), 1);
    if (d[1]) n_overrun++;
    bus_read(ADDR_DAT, d);
    check("loopback data", int'(d), 8'hAA);
    // Simulated parity and framing errors, reported through irq.
    bus_write(ADDR_IER, 8'h04);
    bus_write(ADDR_LSR, 8'h0C);
    repeat (2) @(negedge hclk);
    check("simulated error irq", int'(irq), 1);
    bus_read(ADDR_LSR, d);
    check("simulated pe fe", int'(d[4:1]), 4'b0110);
    if (d[4:1] == 4'b0110) n_err_sim++;
    repeat (2) @(negedge hclk);
    check("irq cleared", int'(irq), 0);
    bus_write(ADDR_IER, 8'h00);
    bus_write(ADDR_MCR, 8'h00);

    // ---- mechanism coverage ----
    check("transmit happened", int'(n_tx > 0), 1);
    check("receive happened", int'(n_rx > 0), 1);
    check("interrupt happened", int'(n_irq > 0), 1);
    check("false start happened", int'(n_false_start > 0), 1);
    check("modem control happened", int'(n_modem > 0), 1);
    check("modem status happened", int'(n_msr > 0), 1);
    check("break happened", int'(n_break > 0), 1);
    check("overrun happened", int'(n_overrun > 0), 1);
    check("error simulation happened", int'(n_err_sim > 0), 1);
    check("normal load happened", int'(n_normal_load > 0), 1);
    check("seed shift happened", int'(n_shift > 0), 1);
    check("255 PRPG/MISR steps", n_steps, 255);
    check("signature scan happened", n_scan, 8);
    $display("mechanisms: tx=%0d rx=%0d irq=%0d false_start=%0d modem=%0d msr=%0d break=%0d overrun=%0d err_sim=%0d load=%0d shift=%0d steps=%0d scan=%0d",
             n_tx, n_rx, n_irq, n_false_start, n_modem, n_msr, n_break, n_overrun, n_err_sim,
             n_normal_load, n_shift, n_steps, n_scan);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Seed bits for si: A goes 17 -> 0F, B goes 00 -> 2E.
  logic ok_seed[10] = '{0, 0, 0, 0, 0, 0, 1, 1, 1, 1};
endmodule

// tb_uart_host_if: self-checking testbench of the host interface.
//
// Drives the bus protocol (cs low for a few cycles, ack expected low one
// cycle after the access starts and high again after cs returns high) and
// checks: register write/readback (IER, LCR, MCR, divisor), the data
// register strobes (THR write, RHR read), LSR assembly and its clear strobe,
// the modem pins (active low, from MCR bits 0..3, OUT1 = bit 2, OUT2 =
// bit 3), the LSR write strobe in loopback only, MSR state and change bits, loopback of the modem lines, and irq
// for each enabled source.
module tb_uart_host_if;
  import uart_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       cs_n = 1'b1, rw = 1'b1;
  logic [3:0] addr = '0;
  logic [7:0] data_in = '0;
  logic [7:0] data_out;
  logic       data_oe, ack_n, irq;
  logic       cts_n = 1'b1, dsr_n = 1'b1, ri_n = 1'b1, dcd_n = 1'b1;
  logic       dtr_n, rts_n, out1_n, out2_n;
  lcr_t       lcr;
  logic [15:0] divisor;
  logic       loop, thr_we, rhr_re, lsr_re, err_we;
  int         n_err_we = 0;
  logic [7:0] rhr = 8'h5A;
  rx_status_t rx_status = '0;
  logic       thre = 1'b0, temt = 1'b0;
  int         checks = 0, failures = 0;
  int         n_thr_we = 0, n_rhr_re = 0, n_lsr_re = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (thr_we) n_thr_we++;
    if (rhr_re) n_rhr_re++;
    if (lsr_re) n_lsr_re++;
    if (err_we) n_err_we++;
  end

  uart_host_if u_dut (
    .clk(clk), .rst(rst), .cs_n(cs_n), .rw(rw), .addr(addr), .data_in(data_in),
    .data_out(data_out), .data_oe(data_oe), .ack_n(ack_n), .irq(irq),
    .cts_n(cts_n), .dsr_n(dsr_n), .ri_n(ri_n), .dcd_n(dcd_n),
    .dtr_n(dtr_n), .rts_n(rts_n), .out1_n(out1_n), .out2_n(out2_n),
    .lcr(lcr), .divisor(divisor), .loop(loop), .thr_we(thr_we), .rhr_re(rhr_re),
    .lsr_re(lsr_re), .err_we(err_we), .rhr(rhr), .rx_status(rx_status), .thre(thre), .temt(temt));

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

  task automatic bus_write(logic [3:0] a, logic [7:0] d);
    @(negedge clk);
    cs_n = 1'b0; rw = 1'b0; addr = a; data_in = d;
    @(negedge clk);
    check("write ack", int'(ack_n), 0);
    @(negedge clk);
    cs_n = 1'b1; rw = 1'b1;
    @(negedge clk);
    check("ack released", int'(ack_n), 1);
  endtask

  task automatic bus_read(logic [3:0] a, output logic [7:0] d);
    @(negedge clk);
    cs_n = 1'b0; rw = 1'b1; addr = a;
    @(negedge clk);
    check("read ack", int'(ack_n), 0);
    check("read drives bus", int'(data_oe), 1);
    d = data_out;
    @(negedge clk);
    cs_n = 1'b1;
    @(negedge clk);
    check("bus released", int'(data_oe), 0);
  endtask

  initial begin
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check("lcr reset 8N1", int'(lcr), 8'h03);
    check("modem pins idle", int'({dtr_n, rts_n, out1_n, out2_n}), 4'hF);
    check("irq idle", int'(irq), 0);

    bus_write(ADDR_LCR, 8'h1B);
    check("lcr written", int'(lcr), 8'h1B);
    bus_read(ADDR_LCR, d);
    check("lcr readback", int'(d), 8'h1B);
    bus_write(ADDR_DLL, 8'd22);
    bus_write(ADDR_DLM, 8'h01);
    check("divisor", int'(divisor), 16'h0116);
    bus_read(ADDR_DLM, d);
    check("dlm readback", int'(d), 8'h01);

    // Data register.
    bus_write(ADDR_DAT, 8'hC4);
    check("one THR write", n_thr_we, 1);
    bus_read(ADDR_DAT, d);
    check("RHR value", int'(d), 8'h5A);
    check("one RHR read", n_rhr_re, 1);

    // Line status.
    rx_status = '{dr: 1'b1, oe: 1'b0, pe: 1'b1, fe: 1'b0, bi: 1'b0};
    thre = 1'b1; temt = 1'b1;
    bus_read(ADDR_LSR, d);
    check("lsr", int'(d), 8'b0110_0101);
    check("one LSR read", n_lsr_re, 1);

    // Modem control pins: DTR, RTS, OUT1 (bit 2), OUT2 (bit 3).
    bus_write(ADDR_MCR, 8'h05);
    check("dtr and out1 low", int'({dtr_n, rts_n, out1_n, out2_n}), 4'b0101);
    bus_write(ADDR_MCR, 8'h0A);
    check("rts and out2 low", int'({dtr_n, rts_n, out1_n, out2_n}), 4'b1010);

    // Modem status: assert cts and dcd.
    @(negedge clk) cts_n = 1'b0; dcd_n = 1'b0;
    repeat (2) @(negedge clk);
    bus_read(ADDR_MSR, d);
    check("msr cts dcd with deltas", int'(d), 8'b1001_1001);
    bus_read(ADDR_MSR, d);
    check("msr deltas cleared", int'(d), 8'b1001_0000);
    // Ring indicator end.
    @(negedge clk) ri_n = 1'b0;
    repeat (2) @(negedge clk);
    ri_n = 1'b1;
    repeat (2) @(negedge clk);
    bus_read(ADDR_MSR, d);
    check("msr trailing ring", int'(d), 8'b1001_0100);

    // Loopback: modem outputs inactive, MSR reads MCR bits.
    bus_write(ADDR_MCR, 8'h1F);
    check("loop flag", int'(loop), 1);
    check("loop pins inactive", int'({dtr_n, rts_n, out1_n, out2_n}), 4'hF);
    bus_read(ADDR_MSR, d);
    check("loop msr state", int'(d[7:4]), 4'hF);
    bus_write(ADDR_LSR, 8'h1E);
    check("LSR write in loopback", n_err_we, 1);
    bus_write(ADDR_MCR, 8'h00);
    bus_write(ADDR_LSR, 8'h1E);
    check("LSR write ignored outside loopback", n_err_we, 1);

    // Interrupts.
    rx_status = '0; thre = 1'b0; temt = 1'b0;
    bus_read(ADDR_MSR, d);
    bus_write(ADDR_IER, 8'h0F);
    check("no source, no irq", int'(irq), 0);
    @(negedge clk) rx_status.dr = 1'b1;
    repeat (2) @(negedge clk);
    check("rx irq", int'(irq), 1);
    bus_read(ADDR_ISR, d);
    check("isr rx", int'(d), 8'h01);
    @(negedge clk) rx_status.dr = 1'b0; thre = 1'b1;
    repeat (2) @(negedge clk);
    bus_read(ADDR_ISR, d);
    check("isr thre", int'(d), 8'h02);
    bus_write(ADDR_IER, 8'h0D);
    check("thre masked", int'(irq), 0);
    @(negedge clk) rx_status.fe = 1'b1;
    repeat (2) @(negedge clk);
    check("line status irq", int'(irq), 1);
    @(negedge clk) rx_status.fe = 1'b0; cts_n = 1'b1;
    repeat (2) @(negedge clk);
    bus_read(ADDR_ISR, d);
    check("isr modem", int'(d), 8'h08);

    // A long cs low is a single access.
    @(negedge clk);
    cs_n = 1'b0; rw = 1'b0; addr = ADDR_DAT; data_in = 8'h11;
    repeat (6) @(negedge clk);
    cs_n = 1'b1;
    @(negedge clk);
    check("single THR write for long cs", n_thr_we, 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

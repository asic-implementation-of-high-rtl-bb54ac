// tb_octalynx: end-to-end test of the OctaLynx chip with all parameters at
// their defaults (64k-word program memory); this is also the full-size test.
//
// The bench is the board: an external memory model on the memory pins (program
// memory, RAM and a small device on the led-out main bus), three clock
// sources, a PC acting as SPI master for the programmer, and observers on the
// GPIO, PWM, USART and SPI pins.
//   1. Power-on with the reset line low: programming mode.  Read the three
//      signature bytes, erase the whole program memory (65536 cycles, polled
//      with the status command), write the test program word by word and
//      read two words back.
//   2. Release reset: the program runs from address 0.  It drives port C,
//      multiplies, stores and loads through X with post-increment, calls a
//      subroutine, writes and reads the led-out bus, takes a T/C0 overflow
//      interrupt (the handler stops the timer and returns with RETI), starts
//      PWM on T/C1, sends a byte on the USART asynchronously and one in
//      synchronous master mode (XCK on PC0), makes an SPI master transfer
//      looped back from MOSI to MISO, then writes a done mark to port C.
//      Meanwhile the bench switches the clock to the internal source, then
//      the DPM source, stops it and switches back to the external clock.
//   3. Two external devices request vectors 15 and 31 at once; both handlers
//      run, lowest vector first, and each device gets its acknowledge.
// Each mechanism is counted and a mechanism that never happened is a
// failure.  Timing checks: PWM period 256 cycles with 64 high, USART bit
// time 16 cycles at UBRR 0, XCK period 8 cycles at UBRR 3, erase length one word per cycle, the clock
// periods after each switch, and no clock edges while stopped.
`timescale 1ns/1ps
module tb_octalynx;
  import octalynx_pkg::*;
  import olx_asm_pkg::*;
  logic clk_ext = 0, clk_int = 0, clk_dpm = 0, stop = 0, por_n = 0, rst_n = 0;
  logic [1:0] sel = 0;
  logic [15:0] maddr, mdo, moe, mdi; logic [3:0] mctl;
  logic [7:0] pa_o, pa_oe, pb_o, pb_oe, pc_o, pc_oe;
  logic sck_o, sck_oe, mosi_o, mosi_oe, miso_o, miso_oe, txd;
  logic h_sck = 0, h_mosi = 0, h_ss_n = 1;
  logic [16:0] xirq = '0, xack;
  int xack_order [$];
  logic [15:0] prog [$];
  int checks = 0, failures = 0;
  // mechanism counters
  int m_sig = 0, m_erase = 0, m_pwrite = 0, m_pread = 0, m_irq = 0, m_ack = 0, m_call = 0,
      m_flush = 0, m_stall = 0, m_ldst = 0, m_xbus = 0, m_gpio = 0, m_pwm = 0, m_uart = 0,
      m_spi = 0, m_usync = 0, m_xirq = 0, m_clk_int = 0, m_clk_dpm = 0, m_stop = 0, m_done = 0;

  octalynx dut (.clk_ext_i(clk_ext), .clk_int_i(clk_int), .clk_dpm_i(clk_dpm), .clk_sel_i(sel),
    .clk_stop_i(stop), .por_ni(por_n), .rst_ni(rst_n),
    .mem_addr_o(maddr), .mem_data_o(mdo), .mem_data_oe_o(moe), .mem_data_i(mdi), .mem_ctl_o(mctl),
    .pa_o, .pa_oe_o(pa_oe), .pa_i(8'h00), .pb_o, .pb_oe_o(pb_oe), .pb_i(8'h00),
    .pc_o, .pc_oe_o(pc_oe), .pc_i(8'h00),
    .sck_o, .sck_oe_o(sck_oe), .sck_i(h_sck), .mosi_o, .mosi_oe_o(mosi_oe), .mosi_i(h_mosi),
    .miso_o, .miso_oe_o(miso_oe), .miso_i(rst_n ? mosi_o : 1'b0), .ss_ni(h_ss_n),
    .txd_o(txd), .rxd_i(1'b1), .xirq_i(xirq), .xack_o(xack));

  // external devices: hold the request until the acknowledge
  always @(posedge dut.clk) if (rst_n) for (int k = 0; k < 17; k++) if (xack[k]) begin xirq[k] <= 1'b0; xack_order.push_back(15 + k); end

  ext_memory_model mem (.clk_i(dut.clk), .addr_i(maddr), .data_i(mdo), .data_oe_i(moe),
    .ctl_i(mctl), .data_o(mdi));

  always #5 clk_ext = !clk_ext;
  always #7 clk_int = !clk_int;
  always #3 clk_dpm = !clk_dpm;
  initial begin #3000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", w, got, exp); end
  endtask

  // ---------------------------------------------------------------- SPI host
  task automatic spi_byte(logic [7:0] tx, output logic [7:0] rx);
    for (int i = 7; i >= 0; i--) begin
      h_mosi = tx[i];
      repeat (8) @(posedge clk_ext);
      h_sck = 1; rx[i] = miso_o;
      repeat (8) @(posedge clk_ext);
      h_sck = 0;
    end
    repeat (8) @(posedge clk_ext);
  endtask
  task automatic frame(logic [7:0] c, logic [15:0] a, logic [15:0] d, output logic [15:0] res);
    logic [7:0] r [5];
    h_ss_n = 0; repeat (8) @(posedge clk_ext);
    spi_byte(c, r[0]); spi_byte(a[15:8], r[1]); spi_byte(a[7:0], r[2]);
    spi_byte(d[15:8], r[3]); spi_byte(d[7:0], r[4]);
    h_ss_n = 1; repeat (8) @(posedge clk_ext);
    chk("programmer echo", {r[1], r[2]}, {c, a[15:8]});
    res = {r[3], r[4]};
  endtask

  // ---------------------------------------------------------------- program
  function automatic void at(int a, logic [15:0] w);
    while (prog.size() <= a) prog.push_back(16'h0000);
    prog[a] = w;
  endfunction
  int pa;
  function automatic void e(logic [15:0] w); at(pa, w); pa++; endfunction

  task automatic build();
    pa = 0;   e(RJMP(32 - 1));                 // reset -> main
    pa = V_T0_OVF; e(RJMP(120 - (V_T0_OVF + 1)));
    pa = 15;  e(RJMP(130 - 16));                                   // external device, vector 15
    pa = 31;  e(RJMP(140 - 32));                                   // external device, vector 31
    pa = 32;
    e(LDI(16, 8'hFF)); e(OUT(A_DDRC, 16)); e(LDI(17, 8'h5A)); e(OUT(A_PORTC, 17));
    e(LDI(18, 7)); e(LDI(19, 6)); e(MUL(18, 19));                  // R0 = 42
    e(LDI(26, 8'h00)); e(LDI(27, 8'h03));                          // X = 0x0300
    e(ST(1, 0, 1)); e(ST(1, 17)); e(SBW(1, 1));                    // RAM[300]=42, [301]=5A
    e(LD(20, 1, 1)); e(LD(21, 1));                                 // R20=42, R21=5A, X=301
    e(RCALL(100 - (pa + 1)));                                      // R21 = 5B
    e(OUT(6'h22, 21)); e(IN(22, 6'h23));                           // led-out bus
    e(ST(1, 22, 1));                                               // RAM[301] = A1
    e(LDI(16, 8'h08)); e(OUT(A_TIMSK, 16));
    e(LDI(16, 8'hFF)); e(OUT(A_TCNT0H, 16)); e(LDI(16, 8'hC0)); e(OUT(A_TCNT0L, 16));
    e(LDI(16, 1)); e(OUT(A_TCCR0, 16)); e(SEI());
    e(CPI(23, 1)); e(BR(NE, -2));                                  // wait for the handler
    e(LDI(16, 64)); e(OUT(A_OCR1, 16)); e(LDI(16, 8'h11)); e(OUT(A_TCCR1, 16));
    e(LDI(16, 0)); e(OUT(A_UBRR, 16)); e(LDI(16, 8'h08)); e(OUT(A_UCSRB, 16));
    e(LDI(16, 8'h55)); e(OUT(A_UDR, 16));
    e(LDI(16, 8'h50)); e(OUT(A_SPCR, 16)); e(LDI(16, 8'h3C)); e(OUT(A_SPDR, 16));
    e(IN(16, A_SPSR)); e(ANDI(16, 8'h80)); e(BR(EQ, -3));
    e(IN(24, A_SPDR)); e(ST(1, 24, 1));                            // RAM[302] = 3C
    e(IN(16, A_UCSRA)); e(ANDI(16, 8'h40)); e(BR(EQ, -3));         // wait TXC
    e(LDI(16, 8'h40)); e(OUT(A_UCSRA, 16));                        // clear TXC
    e(LDI(16, 3)); e(OUT(A_UBRR, 16)); e(LDI(16, 8'h0E)); e(OUT(A_UCSRB, 16)); // sync master
    e(LDI(16, 8'hA5)); e(OUT(A_UDR, 16));
    e(IN(16, A_UCSRA)); e(ANDI(16, 8'h40)); e(BR(EQ, -3));         // wait TXC
    e(LDI(16, 8'hD0)); e(OUT(A_PORTC, 16)); e(RJMP(-1));
    if (pa > 100) $display("program overlaps subroutine");
    pa = 100; e(INC(21)); e(RET());
    pa = 120; e(INC(23)); e(LDI(25, 0)); e(OUT(A_TCCR0, 25)); e(RETI());
    pa = 130; e(INC(28)); e(RETI());
    pa = 140; e(MOV(29, 28)); e(RETI());                           // R29 = R28: shows the order
  endtask

  // ---------------------------------------------------------------- observers
  int cyc = 0;
  always @(posedge dut.clk) cyc++;
  always @(posedge dut.clk) if (rst_n) begin
    if (dut.u_core.ic_take) m_irq++;
    if (dut.irq_ack[V_T0_OVF]) m_ack++;
    if (dut.u_core.state == dut.u_core.S_CALL2) m_call++;
    if (dut.u_core.state == dut.u_core.S_RUN && dut.u_core.pc_load) m_flush++;
    if (!dut.u_core.fetch_en) m_stall++;
    if (mctl[3] && (mctl[0] || mctl[1])) m_ldst++;
    if (!mctl[2] && !mctl[3] && (mctl[0] || mctl[1])) m_xbus++;
    if (pc_oe == 8'hFF && pc_o == 8'h5A) m_gpio++;
  end

  // USART: decode one frame, bit time counted in chip clocks
  initial begin
    logic [9:0] f;
    wait (rst_n);
    @(negedge txd);
    repeat (8) @(posedge dut.clk);
    for (int i = 0; i < 10; i++) begin f[i] = txd; repeat (16) @(posedge dut.clk); end
    chk("usart frame (16-cycle bits)", f, {1'b1, 8'h55, 1'b0});
    if (f == {1'b1, 8'h55, 1'b0}) m_uart++;
    // synchronous master: XCK on PC0, TXD read on rising XCK edges
    wait (pc_oe[0] && pb_oe[1]);
    begin
      int c0, c1, k; logic q [$];
      @(posedge pc_o[0]); c0 = cyc; q.push_back(txd); @(posedge pc_o[0]); c1 = cyc; q.push_back(txd);
      chk("usart XCK period 2*(UBRR+1)", c1 - c0, 8);
      repeat (30) begin @(posedge pc_o[0]); q.push_back(txd); end
      k = 0; while (k < 20 && q[k]) k++;
      for (int i = 0; i < 10; i++) f[i] = q[k + i];
      chk("usart synchronous frame", f, {1'b1, 8'hA5, 1'b0});
      if (f == {1'b1, 8'hA5, 1'b0} && c1 - c0 == 8) m_usync++;
    end
  end

  initial begin
    logic [15:0] r; int t0, t1, cnt;
    build();
    #23 por_n = 1;
    repeat (10) @(posedge clk_ext);
    // --- programming mode
    for (int i = 0; i < 3; i++) begin
      frame(8'h30, 16'(i), 0, r);
      chk("signature", r[7:0], i == 0 ? 8'h4F : i == 1 ? 8'h4C : 8'h58);
      if (r[7:0] == (i == 0 ? 8'h4F : i == 1 ? 8'h4C : 8'h58)) m_sig++;
    end
    t0 = mem.pm_writes;
    frame(8'h80, 0, 0, r);
    do frame(8'hF0, 0, 0, r); while (r[0]);
    t1 = mem.pm_writes;
    chk("erase wrote every word", t1 - t0, 65536);
    begin
      int bad = 0;
      for (int i = 0; i < 65536; i += 97) if (mem.pm[i] !== 16'hFFFF) bad++;
      chk("erased", bad, 0);
      if (bad == 0 && t1 - t0 == 65536) m_erase++;
    end
    foreach (prog[i]) if (prog[i] != 16'h0000 || i < 32) begin
      frame(8'h40, 16'(i), prog[i], r); m_pwrite++;
    end
    // unwritten words in the program range must be NOPs, not erased words
    foreach (prog[i]) if (prog[i] == 16'h0000 && i >= 32) begin frame(8'h40, 16'(i), 16'h0000, r); m_pwrite++; end
    frame(8'h20, 16'd32, 0, r); chk("read back 32", r, prog[32]); if (r == prog[32]) m_pread++;
    frame(8'h20, 16'd121, 0, r); chk("read back 121", r, prog[121]); if (r == prog[121]) m_pread++;
    chk("no RAM access while programming", mem.ram_writes, 0);
    // --- run
    @(negedge clk_ext); rst_n = 1;
    fork
      begin : clocks
        #300;  sel = 1;
        #200;  t0 = $time; @(posedge dut.clk); t0 = $time; @(posedge dut.clk);
        chk("internal clock period", $time - t0, 14); if ($time - t0 == 14) m_clk_int++;
        #300;  sel = 2;
        #200;  @(posedge dut.clk); t0 = $time; @(posedge dut.clk);
        chk("dpm clock period", $time - t0, 6); if ($time - t0 == 6) m_clk_dpm++;
        #200;  stop = 1; #60; cnt = 0;
        fork begin repeat (1000) @(posedge dut.clk) cnt++; end join_none
        #500; chk("no clock while stopped", cnt, 0); if (cnt == 0) m_stop++;
        disable fork;
        stop = 0; sel = 0;
      end
    join
    wait (pc_o[7:1] == 7'(8'hD0 >> 1));
    m_done++;
    // two external devices ask at once: vector 15 must be served first
    @(negedge dut.clk); xirq[0] = 1'b1; xirq[16] = 1'b1;
    wait (xirq == 0);
    repeat (10) @(posedge dut.clk);
    chk("external vector 15 handler", dut.u_core.u_gpru.regs[28], 1);
    chk("external vector 31 after 15", dut.u_core.u_gpru.regs[29], 1);
    chk("acknowledges in priority order", xack_order.size() == 2 && xack_order[0] == 15 && xack_order[1] == 31, 1);
    if (xack_order.size() == 2) m_xirq++;
    repeat (5) @(posedge dut.clk);
    // --- results
    chk("R0 = 6*7", dut.u_core.u_gpru.regs[0], 42);
    chk("RAM[300]", mem.ram[16'h300], 42);
    chk("R20", dut.u_core.u_gpru.regs[20], 42);
    chk("R21 after call", dut.u_core.u_gpru.regs[21], 8'h5B);
    chk("xbus write", mem.xreg[0], 8'h5B);
    chk("R22 xbus read", dut.u_core.u_gpru.regs[22], 8'hA1);
    chk("RAM[301]", mem.ram[16'h301], 8'hA1);
    chk("RAM[302] SPI loop-back", mem.ram[16'h302], 8'h3C); if (mem.ram[16'h302] == 8'h3C) m_spi++;
    chk("handler ran once", dut.u_core.u_gpru.regs[23], 1);
    chk("SP back at top", dut.u_core.sp, 16'hFFFF);
    chk("I set after RETI", dut.u_core.sr[SR_I], 1);
    // PWM: period 256, high 64, sampled on the chip clock
    begin
      int per = 0, hi = 0; logic prev;
      prev = 1;
      while (!(pb_o[1] && !prev)) begin prev = pb_o[1]; @(posedge dut.clk); end
      do begin prev = pb_o[1]; hi += int'(pb_o[1]); per++; @(posedge dut.clk); end
      while (!(pb_o[1] && !prev) && per < 1000);
      chk("pwm period", per, 256); chk("pwm high", hi, 64);
      if (per == 256 && hi == 64) m_pwm++;
    end
    $display("mechanisms: sig=%0d erase=%0d pwrite=%0d pread=%0d irq=%0d ack=%0d call=%0d flush=%0d stall=%0d ldst=%0d xbus=%0d gpio=%0d pwm=%0d uart=%0d usync=%0d spi=%0d clk_int=%0d clk_dpm=%0d stop=%0d done=%0d xirq=%0d",
      m_sig, m_erase, m_pwrite, m_pread, m_irq, m_ack, m_call, m_flush, m_stall, m_ldst, m_xbus, m_gpio, m_pwm, m_uart, m_usync, m_spi, m_clk_int, m_clk_dpm, m_stop, m_done, m_xirq);
    begin
      int m [21];
      m = '{m_sig, m_erase, m_pwrite, m_pread, m_irq, m_ack, m_call, m_flush, m_stall, m_ldst,
              m_xbus, m_gpio, m_pwm, m_uart, m_usync, m_spi, m_clk_int, m_clk_dpm, m_stop, m_done, m_xirq};
      foreach (m[i]) chk($sformatf("mechanism %0d happened", i), m[i] > 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

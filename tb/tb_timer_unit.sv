// tb_timer_unit: self-checking test of the timers/counters unit through its
// main-bus registers.  Checks: T/C1 at clk/8 in CTO overflows after 256 x 8
// cycles (flag, masked interrupt request, clear by acknowledge); T/C2 in CTC
// with compare value 99 at clk/1 raises its compare flag every 100 cycles;
// T/C0 counts rising edges of the external pin and captures its count on a
// capture-pin edge; PWM mode drives the PWM enable and duty; write-1-to-clear
// of TIFR.
module tb_timer_unit;
  import octalynx_pkg::*;
  logic clk = 0, rst_n = 0; mbus_req_t b; logic [7:0] rd; logic hit;
  logic tpin, icp; logic [7:0] irq, ack; logic [2:0] pen, pwm;
  int checks = 0, failures = 0, cyc = 0, t2cmp = 0, pwm_hi = 0;
  timer_unit dut (.clk_i(clk), .rst_ni(rst_n), .bus_i(b), .rdata_o(rd), .hit_o(hit), .t_pin_i(tpin),
    .icp_pin_i(icp), .irq_o(irq), .ack_i(ack), .pwm_en_o(pen), .pwm_o(pwm));
  always #5 clk = !clk;
  always @(posedge clk) cyc++;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h t=%0d", w, got, exp, cyc); end
  endtask
  task automatic wr(logic [5:0] a, logic [7:0] d);
    @(negedge clk); b = '{addr: a, wdata: d, rd: 0, wr: 1}; @(negedge clk); b = '0;
  endtask
  task automatic rdreg(logic [5:0] a, output logic [7:0] d);
    @(negedge clk); b = '{addr: a, wdata: 0, rd: 1, wr: 0}; #1 d = rd; @(negedge clk); b = '0;
  endtask
  initial begin
    logic [7:0] d; int t0;
    b = '0; tpin = 0; icp = 0; ack = 0;
    #12 rst_n = 1;
    // T/C1: clk/8, CTO, overflow interrupt enabled
    wr(A_TIMSK, 8'b0010_0000);
    wr(A_TCCR1, 8'd2); t0 = cyc;
    wait (irq[5]); 
    chk("T1 overflow time", cyc - t0 inside {[256*8 - 8 : 256*8 + 8]}, 1);
    rdreg(A_TIFR, d); chk("TIFR T1 ovf", d[5], 1);
    @(negedge clk) ack = 8'b0010_0000; @(negedge clk) ack = 0;
    chk("ack clears", irq[5], 0);
    wr(A_TCCR1, 8'd0);
    // T/C2 in CTC with OCR2 = 99 at clk/1 (flag only, request masked)
    wr(A_OCR2, 8'd99); wr(A_TCCR2, 8'b000_01_001);
    fork
      repeat (1000) @(posedge clk) if (dut.ev[6]) t2cmp++;
    join
    chk("T2 CTC compare rate", t2cmp, 10);
    chk("masked", irq[6], 0);
    rdreg(A_TIFR, d); chk("TIFR T2 cmp", d[6], 1);
    wr(A_TIFR, 8'b0100_0000); rdreg(A_TIFR, d); chk("w1c", d[6], 0);
    wr(A_TCCR2, 0);
    // T/C0 counts rising edges of the external pin
    wr(A_TCNT0L, 0); wr(A_TCNT0H, 0); wr(A_TCCR0, 8'b1_00_111);
    repeat (37) begin @(negedge clk) tpin = 1; repeat (2) @(negedge clk); tpin = 0; repeat (2) @(negedge clk); end
    rdreg(A_TCNT0L, d); chk("T0 ext count", d, 37);
    // capture on a rising edge of the capture pin
    @(negedge clk) icp = 1; repeat (3) @(negedge clk);
    rdreg(A_ICR0L, d); chk("ICR0", d, 37);
    rdreg(A_TIFR, d); chk("capture flag", d[0], 1);
    // PWM on T/C1: OCR1 = 64 -> high for 64 of every 256 cycles
    wr(A_OCR1, 8'd64); wr(A_TCCR1, 8'b000_10_001);
    chk("pwm enable", pen, 3'b010);
    repeat (2560) @(posedge clk) if (pwm[1]) pwm_hi++;
    chk("pwm duty", pwm_hi, 640);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

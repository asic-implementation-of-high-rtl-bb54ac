// tb_timer_counter: self-checking test of the timer/counter in both sizes.
// A 16-bit instance (T/C0: capture, compare A and B) and an 8-bit instance
// (T/C1/T/C2) are run against a cycle-by-cycle reference model in CTO, CTC
// and PWM modes with random count strobes.  Checked every cycle: count,
// overflow, compare and capture strobes, PWM output, captured value; also
// that a CPU write to the counter wins over counting.  Rates: in CTO the
// 8-bit counter overflows once per 256 ticks, in CTC with OCRA = 9 the
// compare event repeats every 10 ticks.
module tb_timer_counter;
  import octalynx_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tick; tmode_e mode; logic [15:0] ocra, ocrb, wdat; logic we, capt;
  logic [15:0] c16, i16; logic [7:0] c8, i8;
  logic ov16, ca16, cb16, cp16, pw16, ov8, ca8, cb8, cp8, pw8;
  int checks = 0, failures = 0, ovf8_n = 0, ticks = 0, cmp_n = 0;
  logic [15:0] m16, mi16; logic [7:0] m8;

  timer_counter dut16 (.clk_i(clk), .rst_ni(rst_n), .tick_i(tick), .mode_i(mode), .ocra_i(ocra), .ocrb_i(ocrb),
    .cnt_we_i(we), .cnt_wdata_i(wdat), .capt_i(capt), .cnt_o(c16), .icr_o(i16),
    .ovf_o(ov16), .cmpa_o(ca16), .cmpb_o(cb16), .capt_o(cp16), .pwm_o(pw16));
  timer_counter #(.WIDTH(8), .HAS_CAPTURE(1'b0), .HAS_COMPB(1'b0)) dut8 (.clk_i(clk), .rst_ni(rst_n),
    .tick_i(tick), .mode_i(mode), .ocra_i(ocra[7:0]), .ocrb_i(ocrb[7:0]),
    .cnt_we_i(we), .cnt_wdata_i(wdat[7:0]), .capt_i(capt), .cnt_o(c8), .icr_o(i8),
    .ovf_o(ov8), .cmpa_o(ca8), .cmpb_o(cb8), .capt_o(cp8), .pwm_o(pw8));

  always #5 clk = !clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("FAIL %s got=%h exp=%h t=%0t", w, got, exp, $time); end
  endtask

  // reference model, checked before each edge
  always @(negedge clk) if (rst_n) begin
    #2;
    chk("c16", c16, m16); chk("c8", c8, m8); chk("i16", i16, mi16);
    chk("ov16", ov16, tick && !we && m16 == 16'hFFFF && !(mode == TM_CTC && m16 == ocra));
    chk("ov8", ov8, tick && !we && m8 == 8'hFF && !(mode == TM_CTC && m8 == ocra[7:0]));
    chk("ca16", ca16, tick && !we && m16 == ocra); chk("cb16", cb16, tick && !we && m16 == ocrb);
    chk("ca8", ca8, tick && !we && m8 == ocra[7:0]); chk("cb8", cb8, 0);
    chk("cp16", cp16, capt); chk("cp8", cp8, 0);
    chk("pw16", pw16, mode == TM_PWM && m16 < ocra); chk("pw8", pw8, mode == TM_PWM && m8 < ocra[7:0]);
    if (ov8) ovf8_n++;
    if (ca8) cmp_n++;
    if (tick) ticks++;
  end
  always @(posedge clk) if (rst_n) begin
    if (capt) mi16 = m16;
    if (we) begin m16 = wdat; m8 = wdat[7:0]; end
    else if (tick) begin
      m16 = (mode == TM_CTC && m16 == ocra) ? 0 : m16 + 1;
      m8  = (mode == TM_CTC && m8 == ocra[7:0]) ? 0 : m8 + 1;
    end
  end

  initial begin
    tick = 0; mode = TM_CTO; ocra = 16'h0040; ocrb = 16'h0010; wdat = 0; we = 0; capt = 0;
    m16 = 0; m8 = 0; mi16 = 0;
    #12 rst_n = 1;
    // CTO, tick every cycle: the 8-bit counter overflows every 256 ticks
    @(negedge clk) tick = 1;
    repeat (1024) @(negedge clk);
    chk("8-bit overflow rate", ovf8_n, 4);
    // CTC with OCRA = 9: compare every 10 ticks, counter restarts
    tick = 0; we = 1; wdat = 0; mode = TM_CTC; ocra = 9; @(negedge clk); we = 0;
    cmp_n = 0; tick = 1;
    repeat (100) @(negedge clk);
    chk("CTC compare rate", cmp_n, 10);
    // random ticks, modes, writes and captures
    for (int n = 0; n < 20000; n++) begin
      tick = $urandom % 3 != 0; we = $urandom % 200 == 0; wdat = $urandom; capt = $urandom % 50 == 0;
      if (n % 2500 == 0) begin mode = tmode_e'($urandom % 3); ocra = $urandom % 300; ocrb = $urandom % 300; end
      @(negedge clk);
    end
    // long CTO run to see the 16-bit overflow
    mode = TM_CTO; we = 1; wdat = 16'hFFF0; capt = 0; tick = 1; @(negedge clk); we = 0;
    repeat (40) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

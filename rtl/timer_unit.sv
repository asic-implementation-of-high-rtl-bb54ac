// timer_unit: the timers/counters unit of the OctaLynx peripherals.
//
// One 16-bit timer/counter T/C0 with input capture and compare registers A
// and B, two 8-bit timer/counters T/C1 and T/C2 with one compare register
// each, and the shared 10-bit prescaler.  Each timer counts either prescaled
// system clock (divide by 1, 8, 64, 256, 1024) or edges on the external count
// pin (port A bit 2); T/C0 captures on edges of the capture pin (port A bit 3).
//
// Registers (main-bus address, bits):
//   0x10 TCCR0  [2:0] clock select  [4:3] mode (0 CTO, 1 CTC, 2 PWM)
//               [5] capture edge (1 rising, 0 falling)
//   0x11/0x12 TCNT0 L/H   0x13/0x14 OCR0A L/H   0x15/0x16 OCR0B L/H
//   0x17/0x18 ICR0 L/H (read only)
//   0x19 TCCR1  0x1A TCNT1  0x1B OCR1      0x1C TCCR2  0x1D TCNT2  0x1E OCR2
//   0x1F TIMSK  interrupt enables, 0x20 TIFR  event flags, same bit order:
//        0 T0 capture, 1 T0 compare A, 2 T0 compare B, 3 T0 overflow,
//        4 T1 compare, 5 T1 overflow, 6 T2 compare, 7 T2 overflow
// Clock select: 0 stopped, 1 clk, 2 clk/8, 3 clk/64, 4 clk/256, 5 clk/1024,
// 6 falling and 7 rising edge of the external pin.  16-bit registers are
// written a byte at a time, each byte taking effect at once.
// Interrupt requests irq_o = TIFR & TIMSK go to vectors 3..10 in the bit order
// above.  A flag is cleared by the acknowledge after the return from its
// interrupt, or by writing 1 to it in TIFR.  After reset all timers are
// stopped (clock select 0) and the prescaler is idle.
//
// The timer set, widths, modes, external pin A2, the 10-bit prescaler and the
// interrupt list follow the document; the register map, divisors, the
// capture pin and the flag handling are this design's own choices.
module timer_unit
  import octalynx_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  mbus_req_t   bus_i,
  output logic [7:0]  rdata_o,
  output logic        hit_o,
  input  logic        t_pin_i,     // synchronised external count pin (A2)
  input  logic        icp_pin_i,   // synchronised capture pin (A3)
  output logic [7:0]  irq_o,
  input  logic [7:0]  ack_i,
  output logic [2:0]  pwm_en_o,
  output logic [2:0]  pwm_o
);
  logic [7:0]  tccr [3];
  logic [15:0] ocr0a, ocr0b, cnt0, icr0;
  logic [7:0]  ocr1, ocr2, cnt1, cnt2, timsk, tifr;
  logic [4:0]  ptick;
  logic        t_q, icp_q, t_rise, t_fall, icp_edge;
  logic [2:0]  tick;
  logic [7:0]  ev;
  logic        we0, we1, we2;
  logic [15:0] wd0;

  assign t_rise = t_pin_i && !t_q;
  assign t_fall = !t_pin_i && t_q;
  assign icp_edge = tccr[0][5] ? (icp_pin_i && !icp_q) : (!icp_pin_i && icp_q);

  function automatic logic sel_tick(logic [2:0] cs, logic [4:0] pt, logic rise, logic fall);
    unique case (cs)
      3'd0: return 1'b0;
      3'd1: return pt[0];
      3'd2: return pt[1];
      3'd3: return pt[2];
      3'd4: return pt[3];
      3'd5: return pt[4];
      3'd6: return fall;
      default: return rise;
    endcase
  endfunction

  logic pre_en;
  always_comb begin
    pre_en = 1'b0;
    for (int t = 0; t < 3; t++) begin
      tick[t] = sel_tick(tccr[t][2:0], ptick, t_rise, t_fall);
      if (tccr[t][2:0] inside {[3'd1:3'd5]}) pre_en = 1'b1;
    end
  end

  timer_prescaler u_pre (.clk_i, .rst_ni, .en_i(pre_en), .tick_o(ptick));

  // byte-wise writes to the counters
  assign we0 = bus_i.wr && (bus_i.addr == A_TCNT0L || bus_i.addr == A_TCNT0H);
  assign wd0 = (bus_i.addr == A_TCNT0L) ? {cnt0[15:8], bus_i.wdata} : {bus_i.wdata, cnt0[7:0]};
  assign we1 = bus_i.wr && bus_i.addr == A_TCNT1;
  assign we2 = bus_i.wr && bus_i.addr == A_TCNT2;

  timer_counter #(.WIDTH(16), .HAS_CAPTURE(1'b1), .HAS_COMPB(1'b1)) u_t0 (
    .clk_i, .rst_ni, .tick_i(tick[0]), .mode_i(tmode_e'(tccr[0][4:3])), .ocra_i(ocr0a), .ocrb_i(ocr0b),
    .cnt_we_i(we0), .cnt_wdata_i(wd0), .capt_i(icp_edge), .cnt_o(cnt0), .icr_o(icr0),
    .ovf_o(ev[3]), .cmpa_o(ev[1]), .cmpb_o(ev[2]), .capt_o(ev[0]), .pwm_o(pwm_o[0]));
  timer_counter #(.WIDTH(8), .HAS_CAPTURE(1'b0), .HAS_COMPB(1'b0)) u_t1 (
    .clk_i, .rst_ni, .tick_i(tick[1]), .mode_i(tmode_e'(tccr[1][4:3])), .ocra_i(ocr1), .ocrb_i(8'h00),
    .cnt_we_i(we1), .cnt_wdata_i(bus_i.wdata), .capt_i(1'b0), .cnt_o(cnt1), .icr_o(),
    .ovf_o(ev[5]), .cmpa_o(ev[4]), .cmpb_o(), .capt_o(), .pwm_o(pwm_o[1]));
  timer_counter #(.WIDTH(8), .HAS_CAPTURE(1'b0), .HAS_COMPB(1'b0)) u_t2 (
    .clk_i, .rst_ni, .tick_i(tick[2]), .mode_i(tmode_e'(tccr[2][4:3])), .ocra_i(ocr2), .ocrb_i(8'h00),
    .cnt_we_i(we2), .cnt_wdata_i(bus_i.wdata), .capt_i(1'b0), .cnt_o(cnt2), .icr_o(),
    .ovf_o(ev[7]), .cmpa_o(ev[6]), .cmpb_o(), .capt_o(), .pwm_o(pwm_o[2]));

  for (genvar t = 0; t < 3; t++) begin : g_pwm
    assign pwm_en_o[t] = tccr[t][4:3] == 2'(TM_PWM);
  end

  assign irq_o = tifr & timsk;
  assign hit_o = (bus_i.rd || bus_i.wr) && bus_i.addr >= A_TCCR0 && bus_i.addr <= A_TIFR;

  always_comb begin
    unique case (bus_i.addr)
      A_TCCR0:  rdata_o = tccr[0];
      A_TCNT0L: rdata_o = cnt0[7:0];
      A_TCNT0H: rdata_o = cnt0[15:8];
      A_OCR0AL: rdata_o = ocr0a[7:0];
      A_OCR0AH: rdata_o = ocr0a[15:8];
      A_OCR0BL: rdata_o = ocr0b[7:0];
      A_OCR0BH: rdata_o = ocr0b[15:8];
      A_ICR0L:  rdata_o = icr0[7:0];
      A_ICR0H:  rdata_o = icr0[15:8];
      A_TCCR1:  rdata_o = tccr[1];
      A_TCNT1:  rdata_o = cnt1;
      A_OCR1:   rdata_o = ocr1;
      A_TCCR2:  rdata_o = tccr[2];
      A_TCNT2:  rdata_o = cnt2;
      A_OCR2:   rdata_o = ocr2;
      A_TIMSK:  rdata_o = timsk;
      A_TIFR:   rdata_o = tifr;
      default:  rdata_o = '0;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int t = 0; t < 3; t++) tccr[t] <= '0;
      ocr0a <= '0; ocr0b <= '0; ocr1 <= '0; ocr2 <= '0; timsk <= '0; tifr <= '0;
      t_q <= 1'b0; icp_q <= 1'b0;
    end else begin
      t_q <= t_pin_i; icp_q <= icp_pin_i;
      if (bus_i.wr) begin
        unique case (bus_i.addr)
          A_TCCR0:  tccr[0] <= bus_i.wdata;
          A_TCCR1:  tccr[1] <= bus_i.wdata;
          A_TCCR2:  tccr[2] <= bus_i.wdata;
          A_OCR0AL: ocr0a[7:0]  <= bus_i.wdata;
          A_OCR0AH: ocr0a[15:8] <= bus_i.wdata;
          A_OCR0BL: ocr0b[7:0]  <= bus_i.wdata;
          A_OCR0BH: ocr0b[15:8] <= bus_i.wdata;
          A_OCR1:   ocr1  <= bus_i.wdata;
          A_OCR2:   ocr2  <= bus_i.wdata;
          A_TIMSK:  timsk <= bus_i.wdata;
          default: ;
        endcase
      end
      tifr <= (tifr | ev) & ~ack_i & ~((bus_i.wr && bus_i.addr == A_TIFR) ? bus_i.wdata : 8'h00);
    end
  end
endmodule

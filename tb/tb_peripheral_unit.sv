// tb_peripheral_unit: self-checking test of the peripherals together on the
// main bus.  The bench is the bus master.  Checked: each unit answers at its
// own addresses and only one unit claims a read; GPIO ports drive their pins;
// each unit's interrupt reaches its vector bit (INT0 -> 1, T/C0 overflow ->
// 6, SPI -> 11, USART UDRE -> 13) and is dropped after the acknowledge; a
// timer in PWM mode takes over port B bit 0; SPI master loop-back (MOSI tied
// to MISO) returns the byte sent after 8 SCK periods; the USART sends a
// frame on TXD; the ordinary reset clears registers.
module tb_peripheral_unit;
  import octalynx_pkg::*;
  logic clk = 0, por_n = 0, rst_n = 0;
  mbus_req_t bus; logic [7:0] rdata; logic hit;
  logic [NIRQ-1:0] irq, ack;
  logic [7:0] pa_o, pa_oe, pa_i, pb_o, pb_oe, pc_o, pc_oe;
  logic sck_o, sck_oe, mosi_o, mosi_oe, miso_o, miso_oe, txd;
  logic [7:0] prx; logic prxv;
  int checks = 0, failures = 0;
  peripheral_unit dut (.clk_i(clk), .por_ni(por_n), .rst_ni(rst_n), .bus_i(bus), .rdata_o(rdata),
    .hit_o(hit), .irq_o(irq), .ack_i(ack), .pa_o, .pa_oe_o(pa_oe), .pa_i, .pb_o, .pb_oe_o(pb_oe),
    .pb_i(8'h00), .pc_o, .pc_oe_o(pc_oe), .pc_i(8'h5A), .sck_o, .sck_oe_o(sck_oe), .sck_i(1'b0),
    .mosi_o, .mosi_oe_o(mosi_oe), .mosi_i(1'b0), .miso_o, .miso_oe_o(miso_oe), .miso_i(mosi_o),
    .ss_ni(1'b1), .txd_o(txd), .rxd_i(1'b1), .prog_i(1'b0), .prog_rx_o(prx), .prog_rx_valid_o(prxv),
    .prog_tx_we_i(1'b0), .prog_tx_i(8'h00));
  always #5 clk = !clk;
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", w, got, exp); end
  endtask
  task automatic wr(logic [5:0] a, logic [7:0] d);
    @(negedge clk); bus = '{addr: a, wdata: d, rd: 1'b0, wr: 1'b1}; @(negedge clk); bus = '0;
  endtask
  task automatic rd(logic [5:0] a, output logic [7:0] d);
    @(negedge clk); bus = '{addr: a, wdata: 8'h00, rd: 1'b1, wr: 1'b0}; #1 d = rdata;
    chk($sformatf("hit %h", a), hit, 1); @(negedge clk); bus = '0;
  endtask
  task automatic pulse_ack(int v);
    @(negedge clk); ack = NIRQ'(1) << v; @(negedge clk); ack = '0;
  endtask
  initial begin
    logic [7:0] d; int t0, n; logic [9:0] frame;
    bus = '0; ack = '0; pa_i = 8'h00;
    #12 por_n = 1; rst_n = 1;
    // GPIO
    wr(A_DDRA, 8'hF0); wr(A_PORTA, 8'hA5); chk("pa oe", pa_oe, 8'hF0); chk("pa out", pa_o, 8'hA5);
    wr(A_DDRC, 8'h00); repeat (3) @(negedge clk); rd(A_PINC, d); chk("pin c", d, 8'h5A);
    rd(A_PORTA, d); chk("porta readback", d, 8'hA5);
    // register readback in each unit
    wr(A_UBRR, 8'h01); rd(A_UBRR, d); chk("ubrr", d, 8'h01);
    wr(A_OCR1, 8'h77); rd(A_OCR1, d); chk("ocr1", d, 8'h77);
    wr(A_EICR, 8'h05); rd(A_EICR, d); chk("eicr", d[3:0], 4'h5);
    // addresses of the led-out range are not claimed
    @(negedge clk); bus = '{addr: 6'h25, wdata: 8'h00, rd: 1'b1, wr: 1'b0}; #1 chk("no hit ext", hit, 0);
    @(negedge clk); bus = '0;
    // INT0 rising edge on PA0
    chk("no irq yet", irq, 0);
    pa_i[0] = 1; repeat (5) @(negedge clk);
    chk("int0 -> vector 1", irq, 32'h2);
    pulse_ack(V_INT0); chk("int0 dropped", irq, 0);
    wr(A_EICR, 8'h00);
    // T/C0 overflow: count clk, load near the top
    wr(A_TIMSK, 8'h08); wr(A_TCNT0H, 8'hFF); wr(A_TCNT0L, 8'hF0); wr(A_TCCR0, 8'h01);
    repeat (20) @(negedge clk);
    chk("t0 ovf -> vector 6", irq, 32'h40);
    pulse_ack(V_T0_OVF); chk("t0 ovf dropped", irq, 0);
    wr(A_TIMSK, 8'h00); wr(A_TCCR0, 8'h00);
    // PWM on T/C1 -> PB1, duty 64/256
    wr(A_OCR1, 8'd64); wr(A_TCCR1, 8'h11);
    repeat (10) @(negedge clk);
    n = 0; for (int i = 0; i < 512; i++) begin @(negedge clk); n += pb_o[1]; end
    chk("pwm takes pb1", pb_oe[1], 1); chk("pwm duty 1/4", n, 128);
    wr(A_TCCR1, 8'h00);
    // SPI master loop-back, clk/4
    wr(A_SPCR, 8'hD0); chk("sck out", sck_oe, 1);
    t0 = $time; wr(A_SPDR, 8'h3C);
    wait (irq[V_SPI_STC]); n = ($time - t0) / 10;
    chk("spi 8 bits at clk/4", n inside {[32:36]}, 1);
    rd(A_SPDR, d); chk("spi loop-back", d, 8'h3C);
    pulse_ack(V_SPI_STC); chk("spi irq dropped", irq, 0);
    wr(A_SPCR, 8'h00);
    // USART: UDRE interrupt with TX enabled, then one frame
    wr(A_UBRR, 8'd0); wr(A_UCSRB, 8'h28);
    chk("udre -> vector 13", irq, 32'h2000);
    wr(A_UCSRB, 8'h08); wr(A_UDR, 8'hC3);
    wait (!txd); @(negedge clk); repeat (7) @(negedge clk);
    for (int i = 0; i < 10; i++) begin frame[i] = txd; repeat (16) @(negedge clk); end
    chk("usart frame", frame, {1'b1, 8'hC3, 1'b0});
    // reset line clears the registers
    @(negedge clk) rst_n = 0; @(negedge clk) rst_n = 1;
    rd(A_PORTA, d); chk("porta after reset", d, 0); rd(A_OCR1, d); chk("ocr1 after reset", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

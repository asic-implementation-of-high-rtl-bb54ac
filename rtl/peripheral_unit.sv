// peripheral_unit: the OctaLynx peripherals on the internal main bus.
//
// Three 8-bit GPIO ports (A at 0x00, B at 0x03, C at 0x06), the SPI unit, the
// timers/counters unit (T/C0 16-bit, T/C1 and T/C2 8-bit, shared 10-bit
// prescaler), the USART and the two external interrupts.  Each decodes its own
// registers; main_bus returns the read data of the one addressed.  The unit
// collects the interrupt requests into one 32-bit vector (bit v = vector v of
// the interrupt table) and hands each acknowledge back to its source.
// Pin use: port A bits 0/1 are the external interrupt inputs INT0/INT1, bit 2
// the timers' external count input, bit 3 the T/C0 capture input; port B bits
// 0/1/2 carry the PWM outputs of T/C0/T/C1/T/C2 when a timer is in PWM mode;
// port C bit 0 is the USART clock XCK (an output in synchronous master mode).
// rst_ni is the reset line (low also in programming mode); por_ni is the
// power-on reset, which alone resets the SPI shifter so that the programmer
// can use it.  After reset every peripheral is disabled.
//
// The set of peripherals, the interrupt list and the external count pin A2
// follow the document; other pin assignments are this design's own choices.
module peripheral_unit
  import octalynx_pkg::*;
(
  input  logic            clk_i,
  input  logic            por_ni,
  input  logic            rst_ni,
  input  mbus_req_t       bus_i,
  output logic [7:0]      rdata_o,
  output logic            hit_o,
  output logic [NIRQ-1:0] irq_o,
  input  logic [NIRQ-1:0] ack_i,
  // GPIO pins
  output logic [7:0]      pa_o, pa_oe_o,
  input  logic [7:0]      pa_i,
  output logic [7:0]      pb_o, pb_oe_o,
  input  logic [7:0]      pb_i,
  output logic [7:0]      pc_o, pc_oe_o,
  input  logic [7:0]      pc_i,
  // SPI pins
  output logic            sck_o, sck_oe_o,
  input  logic            sck_i,
  output logic            mosi_o, mosi_oe_o,
  input  logic            mosi_i,
  output logic            miso_o, miso_oe_o,
  input  logic            miso_i,
  input  logic            ss_ni,
  // USART pins
  output logic            txd_o,
  input  logic            rxd_i,
  // programmer hand-off through the SPI unit
  input  logic            prog_i,
  output logic [7:0]      prog_rx_o,
  output logic            prog_rx_valid_o,
  input  logic            prog_tx_we_i,
  input  logic [7:0]      prog_tx_i
);
  localparam int NS = 7;
  logic [NS-1:0] hit;
  logic [7:0]    rd [NS];
  logic [7:0]    pa_pin, pb_pin_unused, pc_pin;
  logic          xck, xck_oe;
  logic [2:0]    pwm_en, pwm;
  logic [1:0]    ext_irq;
  logic [7:0]    tim_irq;
  logic          spi_irq;
  logic [2:0]    us_irq;
  logic          rst_n;

  assign rst_n = rst_ni && por_ni;

  gpio_port #(.BASE(A_PINA)) u_pa (.clk_i, .rst_ni(rst_n), .bus_i, .rdata_o(rd[0]), .hit_o(hit[0]),
    .alt_en_i(8'h00), .alt_i(8'h00), .out_o(pa_o), .oe_o(pa_oe_o), .in_i(pa_i), .pin_o(pa_pin));
  gpio_port #(.BASE(A_PINB)) u_pb (.clk_i, .rst_ni(rst_n), .bus_i, .rdata_o(rd[1]), .hit_o(hit[1]),
    .alt_en_i({5'd0, pwm_en}), .alt_i({5'd0, pwm}), .out_o(pb_o), .oe_o(pb_oe_o), .in_i(pb_i),
    .pin_o(pb_pin_unused));
  gpio_port #(.BASE(A_PINC)) u_pc (.clk_i, .rst_ni(rst_n), .bus_i, .rdata_o(rd[2]), .hit_o(hit[2]),
    .alt_en_i({7'd0, xck_oe}), .alt_i({7'd0, xck}), .out_o(pc_o), .oe_o(pc_oe_o), .in_i(pc_i), .pin_o(pc_pin));

  spi u_spi (.clk_i, .rst_ni(por_ni), .clr_i(!rst_ni), .bus_i, .rdata_o(rd[3]), .hit_o(hit[3]),
    .irq_o(spi_irq), .ack_i(ack_i[V_SPI_STC]),
    .sck_o, .sck_oe_o, .sck_i, .mosi_o, .mosi_oe_o, .mosi_i, .miso_o, .miso_oe_o, .miso_i, .ss_ni,
    .prog_i, .prog_rx_o, .prog_rx_valid_o, .prog_tx_we_i, .prog_tx_i);

  timer_unit u_tim (.clk_i, .rst_ni(rst_n), .bus_i, .rdata_o(rd[4]), .hit_o(hit[4]),
    .t_pin_i(pa_pin[2]), .icp_pin_i(pa_pin[3]), .irq_o(tim_irq), .ack_i(ack_i[V_T2_OVF:V_T0_CAPT]),
    .pwm_en_o(pwm_en), .pwm_o(pwm));

  usart u_usart (.clk_i, .rst_ni(rst_n), .bus_i, .rdata_o(rd[5]), .hit_o(hit[5]),
    .irq_o(us_irq), .ack_i(ack_i[V_USART_TXC:V_USART_RXC]), .txd_o, .rxd_i,
    .xck_o(xck), .xck_oe_o(xck_oe), .xck_i(pc_pin[0]));

  ext_interrupt u_ext (.clk_i, .rst_ni(rst_n), .bus_i, .rdata_o(rd[6]), .hit_o(hit[6]),
    .pin_i(pa_pin[1:0]), .irq_o(ext_irq), .ack_i(ack_i[V_INT1:V_INT0]));

  main_bus #(.NSLV(NS)) u_bus (.clk_i, .rd_i(bus_i.rd), .hit_i(hit), .rdata_i(rd), .rdata_o);
  assign hit_o = |hit;

  always_comb begin
    irq_o = '0;
    irq_o[V_INT1:V_INT0]           = ext_irq;
    irq_o[V_T2_OVF:V_T0_CAPT]      = tim_irq;
    irq_o[V_SPI_STC]               = spi_irq;
    irq_o[V_USART_TXC:V_USART_RXC] = us_irq;
  end
endmodule

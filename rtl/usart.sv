// usart: serial receiver/transmitter, 8 data bits, no parity, one stop bit
// (8N1), LSB first, in asynchronous or synchronous mode.
//
// Registers on the main bus:
//   0x0C UCSRA  bit 7 RXC receive complete, bit 6 TXC transmit complete
//               (write 1 to clear), bit 5 UDRE transmit buffer empty
//   0x0D UCSRB  bit 7 RXC, bit 6 TXC, bit 5 UDRE interrupt enables,
//               bit 4 receiver enable, bit 3 transmitter enable,
//               bit 2 synchronous mode, bit 1 clock master (synchronous only)
//   0x0E UBRR   asynchronous: bit time = 16 x (UBRR + 1) clock cycles;
//               synchronous master: XCK period = 2 x (UBRR + 1) cycles
//   0x0F UDR    write: byte into the transmit buffer; read: received byte
//               (reading clears RXC)
// Asynchronous mode: a 16x baud tick.  The transmitter moves the buffer into
// its shift register when idle, then sends start bit, 8 data bits and the
// stop bit, each 16 ticks long; TXC is set when the stop bit ends and the
// buffer is empty.  The receiver waits for a low line (synchronised by two
// flip-flops), checks it again at the middle of the start bit and samples
// each bit at its middle; RXC is set at the middle of the stop bit.
// Synchronous mode: the same frame is clocked by XCK; a frame starts on a
// falling edge, so every bit lasts one full XCK period.  As master the unit
// drives XCK (toggling every UBRR + 1 cycles; use UBRR >= 2 so that data
// coming back through the input synchronisers settles in half a period); as
// slave it follows an external XCK seen through a synchroniser (at most
// clk/8).  TXD changes after a falling XCK edge, RXD is sampled on a rising
// edge; a low RXD on a rising edge while idle is the start bit.  XCK is
// brought out as xck_o / xck_oe_o / xck_i (port C bit 0 in the chip).
// Interrupt requests (vectors 12, 13, 14): RXC, UDRE and TXC, each AND its
// enable.  The acknowledge after the return from interrupt clears RXC or TXC;
// UDRE is cleared only by writing UDR.  After reset both directions are
// disabled, asynchronous mode is selected and TXD idles high.
//
// The three interrupts and the two modes follow the document, which names
// them only; frame format, register map, baud formula, clock edges and the
// XCK pin are this design's own choices.
module usart
  import octalynx_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  mbus_req_t  bus_i,
  output logic [7:0] rdata_o,
  output logic       hit_o,
  output logic [2:0] irq_o,   // {TXC, UDRE, RXC}
  input  logic [2:0] ack_i,
  output logic       txd_o,
  input  logic       rxd_i,
  output logic       xck_o,
  output logic       xck_oe_o,
  input  logic       xck_i      // synchronised XCK pin level
);
  logic [7:0] ucsrb, ubrr, udr_rx, tx_buf;
  logic       rxc, txc, udre;
  logic [7:0] bdiv;
  logic       tick;
  // transmitter
  logic       t_busy;
  logic [9:0] t_sh;
  logic [3:0] t_bit, t_ph;
  // receiver
  logic [1:0] rx_s;
  logic       r_busy;
  logic [7:0] r_sh;
  logic [3:0] r_bit, r_ph;
  // synchronous mode
  logic       sync, xck_q, xck_prev, x_rise, x_fall;

  assign hit_o = (bus_i.rd || bus_i.wr) && bus_i.addr >= A_UCSRA && bus_i.addr <= A_UDR;
  always_comb begin
    unique case (bus_i.addr)
      A_UCSRA: rdata_o = {rxc, txc, udre, 5'd0};
      A_UCSRB: rdata_o = ucsrb;
      A_UBRR:  rdata_o = ubrr;
      A_UDR:   rdata_o = udr_rx;
      default: rdata_o = '0;
    endcase
  end
  assign irq_o = {txc & ucsrb[6], udre & ucsrb[5], rxc & ucsrb[7]};
  assign tick  = (ucsrb[4] || ucsrb[3]) && bdiv == ubrr;
  assign sync  = ucsrb[2];
  assign xck_o = xck_q;
  assign xck_oe_o = sync && ucsrb[1];
  // XCK edges: own divider as master, the pin as slave
  assign x_rise = sync && (ucsrb[1] ? (tick && !xck_q) : (xck_i && !xck_prev));
  assign x_fall = sync && (ucsrb[1] ? (tick &&  xck_q) : (!xck_i && xck_prev));
  assign txd_o = !(ucsrb[3] && t_busy) || t_sh[0];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ucsrb <= '0; ubrr <= '0; udr_rx <= '0; tx_buf <= '0;
      rxc <= 1'b0; txc <= 1'b0; udre <= 1'b1; bdiv <= '0;
      t_busy <= 1'b0; t_sh <= '1; t_bit <= '0; t_ph <= '0;
      rx_s <= 2'b11; r_busy <= 1'b0; r_sh <= '0; r_bit <= '0; r_ph <= '0;
      xck_q <= 1'b0; xck_prev <= 1'b0;
    end else begin
      xck_prev <= xck_i;
      if (sync && ucsrb[1]) begin if (tick) xck_q <= !xck_q; end
      else xck_q <= 1'b0;
      rx_s <= {rx_s[0], rxd_i};
      if (ucsrb[4] || ucsrb[3]) bdiv <= tick ? 8'd0 : bdiv + 8'd1;
      else bdiv <= '0;

      // registers
      if (bus_i.wr) begin
        unique case (bus_i.addr)
          A_UCSRB: ucsrb <= bus_i.wdata;
          A_UBRR:  ubrr  <= bus_i.wdata;
          A_UDR:   begin tx_buf <= bus_i.wdata; udre <= 1'b0; end
          default: ;
        endcase
      end
      if ((bus_i.wr && bus_i.addr == A_UCSRA && bus_i.wdata[6]) || ack_i[2]) txc <= 1'b0;
      if ((bus_i.rd && bus_i.addr == A_UDR) || ack_i[0]) rxc <= 1'b0;

      // transmitter
      if (ucsrb[3]) begin
        if (!t_busy && !udre && !(bus_i.wr && bus_i.addr == A_UDR) && (!sync || x_fall)) begin
          t_busy <= 1'b1; t_sh <= {1'b1, tx_buf, 1'b0}; udre <= 1'b1;
          t_bit <= '0; t_ph <= '0;
        end else if (t_busy && (sync ? x_fall : tick)) begin
          t_ph <= t_ph + 4'd1;
          if (sync || t_ph == 4'd15) begin
            t_sh <= {1'b1, t_sh[9:1]};
            t_bit <= t_bit + 4'd1;
            if (t_bit == 4'd9) begin
              t_busy <= 1'b0;
              if (udre && !(bus_i.wr && bus_i.addr == A_UDR)) txc <= 1'b1;
            end
          end
        end
      end else t_busy <= 1'b0;

      // receiver
      if (ucsrb[4] && sync) begin
        if (x_rise) begin
          if (!r_busy) begin
            if (!rx_s[1]) begin r_busy <= 1'b1; r_bit <= 4'd1; end
          end else begin
            r_bit <= r_bit + 4'd1;
            if (r_bit <= 4'd8) r_sh <= {rx_s[1], r_sh[7:1]};
            else begin
              r_busy <= 1'b0;
              if (rx_s[1]) begin udr_rx <= r_sh; rxc <= 1'b1; end
            end
          end
        end
      end else if (ucsrb[4]) begin
        if (!r_busy) begin
          if (!rx_s[1]) begin r_busy <= 1'b1; r_ph <= '0; r_bit <= '0; end
        end else if (tick) begin
          r_ph <= r_ph + 4'd1;
          if ((r_bit == 4'd0 && r_ph == 4'd7) || (r_bit != 4'd0 && r_ph == 4'd15)) begin
            r_ph <= '0;
            r_bit <= r_bit + 4'd1;
            if (r_bit == 4'd0 && rx_s[1]) r_busy <= 1'b0;       // false start bit
            else if (r_bit >= 4'd1 && r_bit <= 4'd8) r_sh <= {rx_s[1], r_sh[7:1]};
            else if (r_bit == 4'd9) begin
              r_busy <= 1'b0;
              if (rx_s[1]) begin udr_rx <= r_sh; rxc <= 1'b1; end  // valid stop bit
            end
          end
        end
      end else r_busy <= 1'b0;
    end
  end
endmodule

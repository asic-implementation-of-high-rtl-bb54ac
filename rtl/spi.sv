// spi: Serial Peripheral Interface, master or slave, SPI mode 0, MSB first.
//
// Registers on the main bus:
//   0x09 SPCR  bit 7 interrupt enable, bit 6 SPI enable, bit 4 master,
//              bits 1:0 clock rate: SCK = clk/4, /16, /64, /128
//   0x0A SPSR  bit 7 SPIF transfer complete (cleared by the acknowledge after
//              the return from its interrupt, or by writing 1 to it)
//   0x0B SPDR  write: byte to send (a master starts the transfer at once);
//              read: last byte received
// Master: drives SCK and MOSI, samples MISO on the rising SCK edge, shifts on
// the falling edge; eight bits take 16 half periods.  Slave: SCK, MOSI and SS
// are synchronised (two flip-flops), so SCK must be at most clk/8; MISO is
// driven only while SS is low, the first bit is ready when SS falls and each
// further bit after a falling SCK edge.
// Transfer complete sets SPIF; irq_o = SPIF AND the interrupt enable (vector
// 11).  Programming mode (prog_i) forces an enabled slave whatever SPCR says
// and hands received bytes (prog_rx_o with the strobe prog_rx_valid_o) to the
// programmer, which loads the next byte to send through prog_tx_we_i.
// rst_ni resets everything (power-on); clr_i, the ordinary reset line,
// clears the registers synchronously but leaves the slave shifter running so
// the programmer can use it while the rest of the chip is held in reset.
// Pins are split into out / output-enable / in for the pads.
//
// An SPI unit with a transfer-complete interrupt, also used as the
// programmer's link to the PC, follows the document; the register map, mode 0,
// the clock rates and the programmer hand-off are this design's own choices.
module spi
  import octalynx_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       clr_i,
  input  mbus_req_t  bus_i,
  output logic [7:0] rdata_o,
  output logic       hit_o,
  output logic       irq_o,
  input  logic       ack_i,
  // pins
  output logic       sck_o,
  output logic       sck_oe_o,
  input  logic       sck_i,
  output logic       mosi_o,
  output logic       mosi_oe_o,
  input  logic       mosi_i,
  output logic       miso_o,
  output logic       miso_oe_o,
  input  logic       miso_i,
  input  logic       ss_ni,
  // programmer hand-off
  input  logic       prog_i,
  output logic [7:0] prog_rx_o,
  output logic       prog_rx_valid_o,
  input  logic       prog_tx_we_i,
  input  logic [7:0] prog_tx_i
);
  logic [7:0] spcr, rx_buf, tx_buf;
  logic       spif;
  logic       en, master, slave;
  // master state
  logic       m_busy, m_mi;
  logic [7:0] m_sh;
  logic [2:0] m_bit;
  logic [6:0] m_div, m_half;
  // slave state
  logic [1:0] sck_s, mosi_s, ss_s;
  logic       sck_q, ss_q;
  logic [7:0] s_rx, s_tx;
  logic [2:0] s_bit;
  logic       s_rise, s_fall, s_sel, s_done;
  logic       wr_spdr;

  assign en     = prog_i || spcr[6];
  assign master = en && spcr[4] && !prog_i;
  assign slave  = en && !master;
  assign wr_spdr = bus_i.wr && bus_i.addr == A_SPDR;

  always_comb begin
    unique case (spcr[1:0])
      2'd0:    m_half = 7'd2;
      2'd1:    m_half = 7'd8;
      2'd2:    m_half = 7'd32;
      default: m_half = 7'd64;
    endcase
  end

  // bus side
  assign hit_o = (bus_i.rd || bus_i.wr) && bus_i.addr >= A_SPCR && bus_i.addr <= A_SPDR;
  always_comb begin
    unique case (bus_i.addr)
      A_SPCR:  rdata_o = spcr;
      A_SPSR:  rdata_o = {spif, 7'd0};
      A_SPDR:  rdata_o = rx_buf;
      default: rdata_o = '0;
    endcase
  end
  assign irq_o = spif && spcr[7];

  // pins
  assign sck_oe_o  = master;
  assign mosi_oe_o = master;
  assign sck_o     = master && m_busy && sck_q;
  assign mosi_o    = master && m_sh[7];
  assign s_sel     = slave && !ss_s[1];
  assign miso_oe_o = s_sel;
  assign miso_o    = s_sel && s_tx[7];

  // slave edge detection
  assign s_rise = s_sel && sck_s[1] && !sck_q;
  assign s_fall = s_sel && !sck_s[1] && sck_q;
  assign s_done = s_rise && s_bit == 3'd7;
  assign prog_rx_o = {s_rx[6:0], mosi_s[1]};
  assign prog_rx_valid_o = prog_i && s_done;

  logic m_done;
  assign m_done = master && m_busy && m_div == m_half - 7'd1 && sck_q && m_bit == 3'd7;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      spcr <= '0; rx_buf <= '0; tx_buf <= '0; spif <= 1'b0;
      m_busy <= 1'b0; m_mi <= 1'b0; m_sh <= '0; m_bit <= '0; m_div <= '0;
      sck_s <= '0; mosi_s <= '0; ss_s <= 2'b11; sck_q <= 1'b0; ss_q <= 1'b1;
      s_rx <= '0; s_tx <= '0; s_bit <= '0;
    end else begin
      // synchronisers (the slave view of the pins)
      sck_s <= {sck_s[0], sck_i}; mosi_s <= {mosi_s[0], mosi_i}; ss_s <= {ss_s[0], ss_ni};
      ss_q <= ss_s[1];
      if (clr_i) begin
        spcr <= '0; spif <= 1'b0; m_busy <= 1'b0;
      end else if (bus_i.wr) begin
        if (bus_i.addr == A_SPCR) spcr <= bus_i.wdata;
      end
      if (wr_spdr) tx_buf <= bus_i.wdata;
      if (prog_tx_we_i) tx_buf <= prog_tx_i;

      // ---- master
      if (master) begin
        if (!m_busy) begin
          sck_q <= 1'b0; m_div <= '0;
          if (wr_spdr) begin m_busy <= 1'b1; m_sh <= bus_i.wdata; m_bit <= '0; end
        end else if (m_div == m_half - 7'd1) begin
          m_div <= '0;
          sck_q <= !sck_q;
          if (!sck_q) m_mi <= miso_i;                    // rising edge: sample
          else begin                                     // falling edge: shift
            m_sh  <= {m_sh[6:0], m_mi};
            m_bit <= m_bit + 3'd1;
            if (m_bit == 3'd7) begin m_busy <= 1'b0; rx_buf <= {m_sh[6:0], m_mi}; end
          end
        end else m_div <= m_div + 7'd1;
      end else begin
        sck_q <= sck_s[1];
        m_busy <= 1'b0;
        // ---- slave
        if (slave && ss_q && !ss_s[1]) begin s_tx <= tx_buf; s_bit <= '0; end
        if (s_rise) begin
          s_rx <= {s_rx[6:0], mosi_s[1]};
          s_bit <= s_bit + 3'd1;
          if (s_done) rx_buf <= {s_rx[6:0], mosi_s[1]};
        end
        if (s_fall) s_tx <= (s_bit == 3'd0) ? (prog_tx_we_i ? prog_tx_i : tx_buf) : {s_tx[6:0], 1'b0};
      end

      if ((m_done || s_done) && !clr_i) spif <= 1'b1;
      else if (ack_i || (bus_i.wr && bus_i.addr == A_SPSR && bus_i.wdata[7])) spif <= 1'b0;
    end
  end
endmodule

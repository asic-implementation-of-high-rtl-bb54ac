// octalynx: top level of the OctaLynx 8-bit RISC microcontroller.
//
// Four units share the internal main bus (8-bit data, 6-bit address, read and
// write lines): the core, which masters the bus; the peripheral unit (three
// GPIO ports, SPI, timers/counters, USART, external interrupts); the memory
// driver, which reaches the external program memory (64k x 16) and RAM
// (64k x 8) over one multiplexed set of pins and also leads the main bus out
// for external devices; and the programmer, which loads program memory over
// SPI while the reset line is low.  The clock multiplexer picks the clock of
// the whole chip from the external pin, the internal generator or the DPM
// system, and can stop it.
//
// Reset: por_ni is the power-on reset.  rst_ni is the chip's reset line; while
// it is low the core and the peripherals are held in reset and the chip is
// in programming mode (the programmer owns SPI and the memory pins).  When it
// rises, the core starts at program word 0, the RESET vector.
// Bidirectional pins are split into _o / _oe_o / _i for the pads; the
// internal generator and the DPM system are outside this RTL and enter as
// clock and stop inputs.
// External devices on the led-out bus may also request interrupts at the
// vectors 0x0F-0x1F left free for them: xirq_i[k] is vector 15 + k, held
// until the one-cycle acknowledge xack_o[k] that follows the handler's RETI
// (synchronous to the selected clock, like the memory pins).
//
// The block structure and the bus follow the document; see each unit's
// header for what is its own and what is this design's choice.
module octalynx
  import octalynx_pkg::*;
(
  // clocking and reset
  input  logic        clk_ext_i,
  input  logic        clk_int_i,
  input  logic        clk_dpm_i,
  input  logic [1:0]  clk_sel_i,
  input  logic        clk_stop_i,
  input  logic        por_ni,
  input  logic        rst_ni,
  // external memory / led-out main bus
  output logic [15:0] mem_addr_o,
  output logic [15:0] mem_data_o,
  output logic [15:0] mem_data_oe_o,
  input  logic [15:0] mem_data_i,
  output logic [3:0]  mem_ctl_o,
  // GPIO
  output logic [7:0]  pa_o, pa_oe_o,
  input  logic [7:0]  pa_i,
  output logic [7:0]  pb_o, pb_oe_o,
  input  logic [7:0]  pb_i,
  output logic [7:0]  pc_o, pc_oe_o,
  input  logic [7:0]  pc_i,
  // SPI
  output logic        sck_o, sck_oe_o,
  input  logic        sck_i,
  output logic        mosi_o, mosi_oe_o,
  input  logic        mosi_i,
  output logic        miso_o, miso_oe_o,
  input  logic        miso_i,
  input  logic        ss_ni,
  // USART
  output logic        txd_o,
  input  logic        rxd_i,
  // interrupts of external devices, vectors 15..31
  input  logic [NIRQ-16:0] xirq_i,
  output logic [NIRQ-16:0] xack_o
);
  logic            clk, core_rst_n, prog;
  mdop_e           md_op;
  logic [15:0]     md_addr, md_rdata;
  logic [7:0]      md_wdata, xbus_rdata, per_rdata, bus_rdata;
  mbus_req_t       mbus;
  logic            per_hit;
  logic [1:0]      bus_hit;
  logic [7:0]      bus_rd [2];
  logic [NIRQ-1:0] irq_req, irq_ack, per_irq;
  logic [7:0]      prog_rx, prog_tx;
  logic            prog_rx_valid, prog_tx_we, prog_rd, prog_wr;
  logic [15:0]     prog_addr, prog_wdata, prog_rdata;

  assign core_rst_n = por_ni && rst_ni;
  assign prog       = !rst_ni;

  cmux u_cmux (.por_ni, .clk_i({clk_dpm_i, clk_int_i, clk_ext_i}), .sel_i(clk_sel_i),
               .stop_i(clk_stop_i), .clk_o(clk));

  core u_core (.clk_i(clk), .rst_ni(core_rst_n),
               .md_op_o(md_op), .md_addr_o(md_addr), .md_wdata_o(md_wdata), .md_rdata_i(md_rdata),
               .mbus_o(mbus), .mbus_rdata_i(bus_rdata), .irq_req_i(irq_req), .irq_ack_o(irq_ack),
               .pc_o(), .sreg_o(), .sp_o());

  peripheral_unit u_per (.clk_i(clk), .por_ni, .rst_ni(core_rst_n), .bus_i(mbus),
               .rdata_o(per_rdata), .hit_o(per_hit), .irq_o(per_irq), .ack_i(irq_ack),
               .pa_o, .pa_oe_o, .pa_i, .pb_o, .pb_oe_o, .pb_i, .pc_o, .pc_oe_o, .pc_i,
               .sck_o, .sck_oe_o, .sck_i, .mosi_o, .mosi_oe_o, .mosi_i, .miso_o, .miso_oe_o,
               .miso_i, .ss_ni, .txd_o, .rxd_i,
               .prog_i(prog), .prog_rx_o(prog_rx), .prog_rx_valid_o(prog_rx_valid),
               .prog_tx_we_i(prog_tx_we), .prog_tx_i(prog_tx));

  programmer u_prog (.clk_i(clk), .rst_ni(por_ni), .prog_i(prog),
               .rx_i(prog_rx), .rx_valid_i(prog_rx_valid), .tx_we_o(prog_tx_we), .tx_o(prog_tx),
               .mem_rd_o(prog_rd), .mem_wr_o(prog_wr), .mem_addr_o(prog_addr),
               .mem_wdata_o(prog_wdata), .mem_rdata_i(prog_rdata), .busy_o());

  memory_driver u_md (.md_op_i(md_op), .md_addr_i(md_addr), .md_wdata_i(md_wdata),
               .md_rdata_o(md_rdata), .mbus_i(mbus), .xbus_rdata_o(xbus_rdata),
               .prog_en_i(prog), .prog_rd_i(prog_rd), .prog_wr_i(prog_wr), .prog_addr_i(prog_addr),
               .prog_wdata_i(prog_wdata), .prog_rdata_o(prog_rdata),
               .addr_o(mem_addr_o), .data_o(mem_data_o), .data_oe_o(mem_data_oe_o),
               .data_i(mem_data_i), .ctl_o(mem_ctl_o));

  // the peripherals use vectors 1..14, external devices 15..31
  assign irq_req = {xirq_i, per_irq[14:0]};
  assign xack_o  = irq_ack[NIRQ-1:15];

  // main bus return path: on-chip peripherals or the led-out bus
  assign bus_hit = {(mbus.rd || mbus.wr) && is_ext_addr(mbus.addr), per_hit};
  assign bus_rd[0] = per_rdata;
  assign bus_rd[1] = xbus_rdata;
  main_bus #(.NSLV(2)) u_bus (.clk_i(clk), .rd_i(mbus.rd), .hit_i(bus_hit), .rdata_i(bus_rd),
               .rdata_o(bus_rdata));
endmodule

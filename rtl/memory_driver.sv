// memory_driver: OctaLynx external memory interface.
//
// Program memory (64k x 16-bit words), RAM (64k x 8 bits) and the led-out
// internal main bus share one 16-bit address output, one 16-bit bidirectional
// data bus and four control lines, so the pins are time-multiplexed: in each
// clock cycle the driver performs exactly one of
//   program fetch  : addr = PC,      ctl = RD|PM,   data bus input (16 bits)
//   RAM read       : addr = pointer, ctl = RD|RAM,  data[7:0] input
//   RAM write      : addr = pointer, ctl = WR|RAM,  data[7:0] output
//   main bus cycle : addr = 0,       ctl = RD or WR alone,
//                    data = {wr, rd, 6-bit address, 8-bit data}, where the
//                    8-bit data field is an output for a write, an input for
//                    a read, and the upper 8 bits are always outputs.
// In programming mode (prog_en_i) the programmer takes the pins instead of the
// core and can read or write program-memory words.
// Control lines: ctl_o[0] RD, [1] WR, [2] PM select, [3] RAM select, active
// high.  The bidirectional bus is given as data_o / data_oe_o / data_i; the pad
// joins them.  Purely combinational: the external memories are expected to
// answer within the cycle (asynchronous SRAM timing).  The read data returned
// to the core and to the programmer is the data pins passed straight through:
// each side takes from it only what its own cycle asked for.
//
// The bus widths, the number of control lines and the multiplexing follow the
// document; the cycle types, the control-line meaning and the layout of the
// led-out main bus are this design's own choices.
module memory_driver
  import octalynx_pkg::*;
(
  // core side
  input  mdop_e        md_op_i,
  input  logic [15:0]  md_addr_i,
  input  logic [7:0]   md_wdata_i,
  output logic [15:0]  md_rdata_o,
  input  mbus_req_t    mbus_i,
  output logic [7:0]   xbus_rdata_o,
  // programmer side
  input  logic         prog_en_i,
  input  logic         prog_rd_i,
  input  logic         prog_wr_i,
  input  logic [15:0]  prog_addr_i,
  input  logic [15:0]  prog_wdata_i,
  output logic [15:0]  prog_rdata_o,
  // pins
  output logic [15:0]  addr_o,
  output logic [15:0]  data_o,
  output logic [15:0]  data_oe_o,
  input  logic [15:0]  data_i,
  output logic [3:0]   ctl_o
);
  assign md_rdata_o   = data_i;
  assign prog_rdata_o = data_i;
  assign xbus_rdata_o = data_i[7:0];

  always_comb begin
    addr_o = '0; data_o = '0; data_oe_o = '0; ctl_o = '0;
    if (prog_en_i) begin
      addr_o = prog_addr_i;
      ctl_o[MC_PM] = prog_rd_i || prog_wr_i;
      ctl_o[MC_RD] = prog_rd_i && !prog_wr_i;
      ctl_o[MC_WR] = prog_wr_i;
      if (prog_wr_i) begin data_o = prog_wdata_i; data_oe_o = 16'hFFFF; end
    end else begin
      unique case (md_op_i)
        MD_FETCH:  begin addr_o = md_addr_i; ctl_o[MC_RD] = 1'b1; ctl_o[MC_PM] = 1'b1; end
        MD_RAM_RD: begin addr_o = md_addr_i; ctl_o[MC_RD] = 1'b1; ctl_o[MC_RAM] = 1'b1; end
        MD_RAM_WR: begin
          addr_o = md_addr_i; ctl_o[MC_WR] = 1'b1; ctl_o[MC_RAM] = 1'b1;
          data_o = {8'h00, md_wdata_i}; data_oe_o = 16'h00FF;
        end
        MD_XBUS: begin
          ctl_o[MC_RD] = mbus_i.rd; ctl_o[MC_WR] = mbus_i.wr;
          data_o = {mbus_i.wr, mbus_i.rd, mbus_i.addr, mbus_i.wdata};
          data_oe_o = mbus_i.wr ? 16'hFFFF : 16'hFF00;
        end
        default: ;
      endcase
    end
  end
endmodule

// main_bus: read-data return path of the OctaLynx internal main bus.
//
// The main bus carries an 8-bit data field, a 6-bit control-register address
// and two control lines (read, write), driven by the core.  Every slave decodes
// the address itself and raises hit_i when the address is one of its
// registers; this module returns the read data of the slave that hit, or 0 if
// none did.  Combinational.  New slaves are added by widening NSLV.
//
// The bus fields follow the document; the hit/return scheme is this design's
// own choice.  An assertion checks that at most one slave answers a read.
module main_bus #(
  parameter int unsigned NSLV = 2
) (
  input  logic             clk_i,
  input  logic             rd_i,      // read strobe of the main bus
  input  logic [NSLV-1:0]  hit_i,
  input  logic [7:0]       rdata_i [NSLV],
  output logic [7:0]       rdata_o
);
  always_comb begin
    rdata_o = '0;
    for (int s = 0; s < NSLV; s++)
      if (hit_i[s]) rdata_o = rdata_o | rdata_i[s];
  end

  a_one_slave: assert property (@(posedge clk_i) rd_i |-> $onehot0(hit_i));
endmodule

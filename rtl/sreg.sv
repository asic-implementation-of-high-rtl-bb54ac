// sreg: status register of the OctaLynx core.
//
// Holds the ALU flags C (bit 0), Z (1), N (2), V (3) and the global interrupt
// enable I (bit 7); bits 6..4 read as zero.  It sits at address 0x3F, the last
// address of the 6-bit control-register space, and can be read and written
// over the main bus like any control register.
//
// Priority on a clock edge: bus write, then flag update from the ALU (per
// flag, selected by flag_we_i), then I set/clear from the control unit.
// Bus reads are combinational.  Resets to 0 (interrupts disabled).
//
// Its place at 0x3F and its attachment to the ALU follow the document; the
// bit layout and update priority are this design's own choices.
module sreg
  import octalynx_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  flags_t     flags_i,
  input  logic [3:0] flag_we_i,   // {v,n,z,c}
  input  logic       i_set_i,
  input  logic       i_clr_i,
  input  logic       bus_we_i,
  input  logic [7:0] bus_wdata_i,
  output logic [7:0] q_o
);
  logic [7:0] q;
  assign q_o = q & 8'h8F;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) q <= '0;
    else if (bus_we_i) q <= bus_wdata_i & 8'h8F;
    else begin
      if (flag_we_i[0]) q[SR_C] <= flags_i.c;
      if (flag_we_i[1]) q[SR_Z] <= flags_i.z;
      if (flag_we_i[2]) q[SR_N] <= flags_i.n;
      if (flag_we_i[3]) q[SR_V] <= flags_i.v;
      if (i_set_i) q[SR_I] <= 1'b1;
      else if (i_clr_i) q[SR_I] <= 1'b0;
    end
  end
endmodule

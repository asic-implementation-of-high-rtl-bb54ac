// alu_logic: logic unit of the OctaLynx ALU.
//
// AND, OR, XOR, NOT, clear byte (0x00), set byte (0xFF) and register move.
// Combinational.  AND/OR/XOR/NOT/CLR update Z and N and clear V; SET and MOV
// leave the flags alone.  The operation list follows the document; the flag
// rules are this design's own choice.
module alu_logic
  import octalynx_pkg::*;
(
  input  aluop_e     op_i,
  input  logic [7:0] a_i,
  input  logic [7:0] b_i,
  output logic [7:0] r_o,
  output flags_t     f_o,
  output logic [3:0] fmask_o
);
  always_comb begin
    r_o = '0; fmask_o = 4'b1110;
    unique case (op_i)
      OP_AND: r_o = a_i & b_i;
      OP_OR:  r_o = a_i | b_i;
      OP_XOR: r_o = a_i ^ b_i;
      OP_NOT: r_o = ~a_i;
      OP_CLR: r_o = 8'h00;
      OP_SER: begin r_o = 8'hFF; fmask_o = 4'b0000; end
      OP_MOV: begin r_o = b_i;   fmask_o = 4'b0000; end
      default: fmask_o = 4'b0000;
    endcase
    f_o = '{v: 1'b0, n: r_o[7], z: r_o == 0, c: 1'b0};
  end
endmodule

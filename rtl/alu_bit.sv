// alu_bit: bit-operation unit of the OctaLynx ALU.
//
// Shifts and rotates (LSL, LSR, ROL, ROR through carry, ASR), clear or set of
// one bit (bit number in b_i), SWAP of the two nibbles and MIR, which
// reverses the bit order (bit n goes to bit 7-n).  Combinational.  Shifts
// update C, Z, N and V = N xor C; the other operations leave the flags.
// The operation list follows the document; the flag rules are this design's
// own choice.
module alu_bit
  import octalynx_pkg::*;
(
  input  aluop_e     op_i,
  input  logic [7:0] a_i,
  input  logic [2:0] b_i,   // bit number for BCLR/BSET
  input  logic       c_i,
  output logic [7:0] r_o,
  output flags_t     f_o,
  output logic [3:0] fmask_o
);
  logic co;
  always_comb begin
    r_o = '0; co = 1'b0; fmask_o = 4'b1111;
    unique case (op_i)
      OP_LSL: {co, r_o} = {a_i, 1'b0};
      OP_LSR: {r_o, co} = {1'b0, a_i};
      OP_ROL: {co, r_o} = {a_i, c_i};
      OP_ROR: {r_o, co} = {c_i, a_i};
      OP_ASR: {r_o, co} = {a_i[7], a_i};
      OP_BCLR: begin r_o = a_i & ~(8'h01 << b_i); fmask_o = 4'b0000; end
      OP_BSET: begin r_o = a_i |  (8'h01 << b_i); fmask_o = 4'b0000; end
      OP_SWAP: begin r_o = {a_i[3:0], a_i[7:4]};       fmask_o = 4'b0000; end
      OP_MIR:  begin
        for (int i = 0; i < 8; i++) r_o[i] = a_i[7-i];
        fmask_o = 4'b0000;
      end
      default: fmask_o = 4'b0000;
    endcase
    f_o = '{v: r_o[7] ^ co, n: r_o[7], z: r_o == 0, c: co};
  end
endmodule

// alu_arith: arithmetic unit of the OctaLynx ALU.
//
// Addition and subtraction with and without carry, increment, decrement,
// 8 x 8 unsigned multiplication (16-bit result) and 16-bit add/subtract of a
// small constant to a register pair (pointer arithmetic on the 16-bit buses).
// Purely combinational.  The enclosing alu gates the operands to zero when
// this unit is not selected, so its logic does not toggle.
//
// The set of operations (addition, subtraction, multiplication, 16-bit
// operations) follows the document; flag rules follow common 8-bit practice
// and are this design's own choice.
module alu_arith
  import octalynx_pkg::*;
(
  input  aluop_e      op_i,
  input  logic [7:0]  a_i,
  input  logic [7:0]  b_i,
  input  logic [15:0] a16_i,
  input  logic        c_i,
  output logic [7:0]  r_o,
  output logic [15:0] r16_o,
  output flags_t      f_o,
  output logic [3:0]  fmask_o   // {v,n,z,c}: which flags this operation updates
);
  logic [8:0]  s9;
  logic [16:0] s17;
  always_comb begin
    s9 = '0; s17 = '0; r_o = '0; r16_o = '0; f_o = '0; fmask_o = 4'b0000;
    unique case (op_i)
      OP_ADD, OP_ADC: begin
        s9  = {1'b0, a_i} + {1'b0, b_i} + 9'((op_i == OP_ADC) & c_i);
        r_o = s9[7:0];
        f_o = '{v: (a_i[7] == b_i[7]) && (r_o[7] != a_i[7]), n: r_o[7], z: r_o == 0, c: s9[8]};
        fmask_o = 4'b1111;
      end
      OP_SUB, OP_SBC: begin
        s9  = {1'b0, a_i} - {1'b0, b_i} - 9'((op_i == OP_SBC) & c_i);
        r_o = s9[7:0];
        f_o = '{v: (a_i[7] != b_i[7]) && (r_o[7] != a_i[7]), n: r_o[7], z: r_o == 0, c: s9[8]};
        fmask_o = 4'b1111;
      end
      OP_INC, OP_DEC: begin
        r_o = (op_i == OP_INC) ? a_i + 8'd1 : a_i - 8'd1;
        f_o = '{v: (op_i == OP_INC) ? (a_i == 8'h7F) : (a_i == 8'h80), n: r_o[7], z: r_o == 0, c: 1'b0};
        fmask_o = 4'b1110;
      end
      OP_MUL: begin
        r16_o = 16'(a_i) * 16'(b_i);
        r_o   = r16_o[7:0];
        f_o   = '{v: 1'b0, n: 1'b0, z: r16_o == 0, c: r16_o[15]};
        fmask_o = 4'b0011;
      end
      OP_ADW, OP_SBW: begin
        s17   = (op_i == OP_ADW) ? {1'b0, a16_i} + 17'(b_i) : {1'b0, a16_i} - 17'(b_i);
        r16_o = s17[15:0];
        r_o   = r16_o[7:0];
        f_o   = '{v: 1'b0, n: r16_o[15], z: r16_o == 0, c: s17[16]};
        fmask_o = 4'b0111;
      end
      default: ;
    endcase
  end
endmodule

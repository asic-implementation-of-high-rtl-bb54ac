// alu: OctaLynx arithmetic logic unit.
//
// Three independent units (arithmetic, logic, bit operations).  The document
// builds the ALU this way to save power: only the unit that executes the
// current operation is active, the others see constant-zero operands and are
// disconnected from the result bus.  Here each unit's inputs are AND-gated with
// its select, and the result is taken from the selected unit only.
//
// Interface: op_i selects the operation (octalynx_pkg::aluop_e), en_i says an
// operation is executed this cycle; a_i/b_i come from the GPRU's two 8-bit
// read buses, a16_i from its 16-bit read bus, c_i is the carry flag.  r_o goes
// to the 8-bit write bus, r16_o to the 16-bit write bus (multiply result,
// pointer arithmetic).  f_o/fmask_o are the new flags and which of them to
// update in SREG.  Combinational, no latency.
module alu
  import octalynx_pkg::*;
(
  input  logic        en_i,
  input  aluop_e      op_i,
  input  logic [7:0]  a_i,
  input  logic [7:0]  b_i,
  input  logic [15:0] a16_i,
  input  logic        c_i,
  output logic [7:0]  r_o,
  output logic [15:0] r16_o,
  output flags_t      f_o,
  output logic [3:0]  fmask_o
);
  aunit_e sel;
  logic en_ar, en_lg, en_bt;
  logic [7:0] r_ar, r_lg, r_bt;
  logic [15:0] r16_ar;
  flags_t f_ar, f_lg, f_bt;
  logic [3:0] m_ar, m_lg, m_bt;

  assign sel   = en_i ? unit_of(op_i) : U_NONE;
  assign en_ar = (sel == U_ARITH);
  assign en_lg = (sel == U_LOGIC);
  assign en_bt = (sel == U_BIT);

  alu_arith u_arith (.op_i(en_ar ? op_i : OP_ADD), .a_i(a_i & {8{en_ar}}), .b_i(b_i & {8{en_ar}}),
                     .a16_i(a16_i & {16{en_ar}}), .c_i(c_i & en_ar),
                     .r_o(r_ar), .r16_o(r16_ar), .f_o(f_ar), .fmask_o(m_ar));
  alu_logic u_logic (.op_i(en_lg ? op_i : OP_AND), .a_i(a_i & {8{en_lg}}), .b_i(b_i & {8{en_lg}}),
                     .r_o(r_lg), .f_o(f_lg), .fmask_o(m_lg));
  alu_bit   u_bit   (.op_i(en_bt ? op_i : OP_SWAP), .a_i(a_i & {8{en_bt}}), .b_i(b_i[2:0] & {3{en_bt}}),
                     .c_i(c_i & en_bt), .r_o(r_bt), .f_o(f_bt), .fmask_o(m_bt));

  always_comb begin
    r_o = '0; r16_o = '0; f_o = '0; fmask_o = '0;
    unique case (sel)
      U_ARITH: begin r_o = r_ar; r16_o = r16_ar; f_o = f_ar; fmask_o = m_ar; end
      U_LOGIC: begin r_o = r_lg; f_o = f_lg; fmask_o = m_lg; end
      U_BIT:   begin r_o = r_bt; f_o = f_bt; fmask_o = m_bt; end
      default: ;
    endcase
  end
endmodule

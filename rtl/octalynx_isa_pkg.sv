// octalynx_isa_pkg: instruction classes and the decoded-instruction record
// passed from the instruction decoder to the execute stage of the core.
//
// The document lists the instruction groups (arithmetic, logic, bit
// operations, jumps, subroutine call, return from interrupt, indirect access
// through X, Y, Z) but not their encoding; the encoding and this record are
// this design's own.
package octalynx_isa_pkg;
  import octalynx_pkg::*;

  typedef enum logic [4:0] {
    K_NOP, K_ALU, K_ALU16, K_MUL, K_LD, K_ST, K_IN, K_OUT, K_PUSH, K_POP,
    K_RJMP, K_RCALL, K_BR, K_RET, K_RETI, K_SEI, K_CLI, K_IJMP
  } kind_e;

  typedef struct packed {
    kind_e        kind;
    aluop_e       op;
    logic [4:0]   rd;       // destination / first operand / stored register
    logic [4:0]   rr;       // second operand register
    logic         use_imm;  // second operand is imm instead of R[rr]
    logic [7:0]   imm;
    logic         wb;       // write the 8-bit result back to R[rd]
    logic [3:0]   pair;     // register pair for 16-bit operations and pointers
    logic         postinc;  // LD/ST: increment the pointer afterwards
    logic [5:0]   io;       // IN/OUT control-register address
    logic [15:0]  offs;     // sign-extended jump / branch offset
    logic [2:0]   cond;     // branch condition
  } dec_t;
endpackage

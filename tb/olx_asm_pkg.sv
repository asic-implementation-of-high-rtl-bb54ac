// olx_asm_pkg: instruction encoders for OctaLynx test programs.
// Each function returns the 16-bit word of one instruction, following the
// encoding table in instruction_decoder.sv.  Pointer codes: 1 X, 2 Y, 3 Z.
package olx_asm_pkg;
  function automatic logic [15:0] rr(logic [5:0] opc, int d, int r);
    return {opc, 1'(r >> 4), 5'(d), 4'(r)};
  endfunction
  function automatic logic [15:0] NOP();            return 16'h0000; endfunction
  function automatic logic [15:0] RET();            return 16'h0001; endfunction
  function automatic logic [15:0] RETI();           return 16'h0002; endfunction
  function automatic logic [15:0] SEI();            return 16'h0003; endfunction
  function automatic logic [15:0] CLI();            return 16'h0004; endfunction
  function automatic logic [15:0] IJMP();           return 16'h0005; endfunction
  function automatic logic [15:0] ADD(int d, int r); return rr(6'o01, d, r); endfunction
  function automatic logic [15:0] ADC(int d, int r); return rr(6'o02, d, r); endfunction
  function automatic logic [15:0] SUB(int d, int r); return rr(6'o03, d, r); endfunction
  function automatic logic [15:0] SBC(int d, int r); return rr(6'o04, d, r); endfunction
  function automatic logic [15:0] AND(int d, int r); return rr(6'o05, d, r); endfunction
  function automatic logic [15:0] OR (int d, int r); return rr(6'o06, d, r); endfunction
  function automatic logic [15:0] XOR(int d, int r); return rr(6'o07, d, r); endfunction
  function automatic logic [15:0] MOV(int d, int r); return rr(6'o10, d, r); endfunction
  function automatic logic [15:0] CP (int d, int r); return rr(6'o11, d, r); endfunction
  function automatic logic [15:0] MUL(int d, int r); return rr(6'o12, d, r); endfunction
  function automatic logic [15:0] ONE(int d, int o); return {7'b0100_010, 5'(d), 4'(o)}; endfunction
  function automatic logic [15:0] NOT (int d); return ONE(d, 0); endfunction
  function automatic logic [15:0] CLR (int d); return ONE(d, 1); endfunction
  function automatic logic [15:0] SER (int d); return ONE(d, 2); endfunction
  function automatic logic [15:0] LSL (int d); return ONE(d, 3); endfunction
  function automatic logic [15:0] LSR (int d); return ONE(d, 4); endfunction
  function automatic logic [15:0] ROL (int d); return ONE(d, 5); endfunction
  function automatic logic [15:0] ROR (int d); return ONE(d, 6); endfunction
  function automatic logic [15:0] ASR (int d); return ONE(d, 7); endfunction
  function automatic logic [15:0] SWAP(int d); return ONE(d, 8); endfunction
  function automatic logic [15:0] MIR (int d); return ONE(d, 9); endfunction
  function automatic logic [15:0] INC (int d); return ONE(d, 10); endfunction
  function automatic logic [15:0] DEC (int d); return ONE(d, 11); endfunction
  function automatic logic [15:0] PUSH(int d); return ONE(d, 12); endfunction
  function automatic logic [15:0] POP (int d); return ONE(d, 13); endfunction
  function automatic logic [15:0] BCLR(int d, int b); return {7'b0100_011, 5'(d), 1'b0, 3'(b)}; endfunction
  function automatic logic [15:0] BSET(int d, int b); return {7'b0100_011, 5'(d), 1'b1, 3'(b)}; endfunction
  function automatic logic [15:0] LD(int d, int p, bit inc = 0);  return {7'b0100_100, 5'(d), 1'b0, inc, 2'(p)}; endfunction
  function automatic logic [15:0] ST(int p, int r, bit inc = 0);  return {7'b0100_101, 5'(r), 1'b0, inc, 2'(p)}; endfunction
  function automatic logic [15:0] ADW(int p, int k); return {8'b0100_1100, 2'(k >> 4), 2'(p), 4'(k)}; endfunction
  function automatic logic [15:0] SBW(int p, int k); return {8'b0100_1101, 2'(k >> 4), 2'(p), 4'(k)}; endfunction
  function automatic logic [15:0] IMM(logic [3:0] c, int d, int k); return {c, 4'(k >> 4), 4'(d - 16), 4'(k)}; endfunction
  function automatic logic [15:0] LDI (int d, int k); return IMM(4'h5, d, k); endfunction
  function automatic logic [15:0] SUBI(int d, int k); return IMM(4'h6, d, k); endfunction
  function automatic logic [15:0] ANDI(int d, int k); return IMM(4'h7, d, k); endfunction
  function automatic logic [15:0] ORI (int d, int k); return IMM(4'h8, d, k); endfunction
  function automatic logic [15:0] CPI (int d, int k); return IMM(4'h9, d, k); endfunction
  function automatic logic [15:0] ADDI(int d, int k); return IMM(4'hA, d, k); endfunction
  function automatic logic [15:0] IN (int d, int a); return {5'b1011_0, 2'(a >> 4), 5'(d), 4'(a)}; endfunction
  function automatic logic [15:0] OUT(int a, int r); return {5'b1011_1, 2'(a >> 4), 5'(r), 4'(a)}; endfunction
  // relative jumps: offset counted from the word after the jump
  function automatic logic [15:0] RJMP (int off); return {4'hC, 12'(off)}; endfunction
  function automatic logic [15:0] RCALL(int off); return {4'hD, 12'(off)}; endfunction
  function automatic logic [15:0] BR(int c, int off); return {5'b1111_0, 3'(c), 8'(off)}; endfunction
  localparam int EQ = 0, NE = 1, CS = 2, CC = 3, MI = 4, PL = 5, VS = 6, VC = 7;
endpackage

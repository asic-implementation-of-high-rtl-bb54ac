// instruction_decoder: OctaLynx instruction decoder.
//
// Turns a 16-bit program word into the decoded record octalynx_isa_pkg::dec_t.
// It is purely combinational and sits in the fetch stage: the core registers
// its output, so decoding the next instruction overlaps the execution of the
// current one, as the document describes (the decoder is about as slow as the
// ALU, so the two are kept in separate pipeline stages).
//
// Encoding (this design's own; the document gives none).  d/r are register
// numbers, K immediate bits, k offset bits, A control-register address bits,
// p a pointer pair (01 X=R27:26, 10 Y=R29:28, 11 Z=R31:30, 00 R25:24 for
// ADW/SBW only):
//   0000 0000 0000 0000  NOP        0x0001 RET   0x0002 RETI
//   0x0003 SEI   0x0004 CLI   0x0005 IJMP (jump to Z)
//   oooo oord dddd rrrr  register-register, r = {bit9, bits3..0}, oooooo:
//     000001 ADD  000010 ADC  000011 SUB  000100 SBC  000101 AND
//     000110 OR   000111 XOR  001000 MOV  001001 CP   001010 MUL (R1:R0)
//   0100 010d dddd oooo  one-register: 0 NOT 1 CLR 2 SER 3 LSL 4 LSR 5 ROL
//                        6 ROR 7 ASR 8 SWAP 9 MIR A INC B DEC C PUSH D POP
//   0100 011d dddd sbbb  s=0 clear bit b, s=1 set bit b of Rd
//   0100 100d dddd 0ipp  LD Rd,(p)   i = post-increment
//   0100 101r rrrr 0ipp  ST (p),Rr
//   0100 1100 KKpp KKKK  ADW pair,K (16-bit add of 6-bit K)
//   0100 1101 KKpp KKKK  SBW pair,K
//   cccc KKKK dddd KKKK  immediate on R16..R31: 0101 LDI 0110 SUBI
//                        0111 ANDI 1000 ORI 1001 CPI 1010 ADDI
//   1011 0AAd dddd AAAA  IN Rd,A     1011 1AAr rrrr AAAA  OUT A,Rr
//   1100 kkkk kkkk kkkk  RJMP  (target = address of next word + k)
//   1101 kkkk kkkk kkkk  RCALL
//   1111 0ccc kkkk kkkk  branch if c: 0 EQ 1 NE 2 CS 3 CC 4 MI 5 PL 6 VS 7 VC
// Every other word decodes as NOP.
module instruction_decoder
  import octalynx_pkg::*;
  import octalynx_isa_pkg::*;
(
  input  logic [15:0] ins_i,
  output dec_t        dec_o
);
  logic [4:0] d5, r5;
  logic [7:0] k8;
  assign d5 = ins_i[8:4];
  assign r5 = {ins_i[9], ins_i[3:0]};
  assign k8 = {ins_i[11:8], ins_i[3:0]};

  always_comb begin
    dec_o = '{kind: K_NOP, op: OP_ADD, default: '0};
    priority casez (ins_i)
      16'h0001: dec_o.kind = K_RET;
      16'h0002: dec_o.kind = K_RETI;
      16'h0003: dec_o.kind = K_SEI;
      16'h0004: dec_o.kind = K_CLI;
      16'h0005: begin dec_o.kind = K_IJMP; dec_o.pair = 4'd15; end
      16'b00????_??????????: begin
        dec_o.rd = d5; dec_o.rr = r5; dec_o.kind = K_ALU; dec_o.wb = 1'b1;
        unique case (ins_i[15:10])
          6'o01: dec_o.op = OP_ADD;
          6'o02: dec_o.op = OP_ADC;
          6'o03: dec_o.op = OP_SUB;
          6'o04: dec_o.op = OP_SBC;
          6'o05: dec_o.op = OP_AND;
          6'o06: dec_o.op = OP_OR;
          6'o07: dec_o.op = OP_XOR;
          6'o10: dec_o.op = OP_MOV;
          6'o11: begin dec_o.op = OP_SUB; dec_o.wb = 1'b0; end
          6'o12: begin dec_o.op = OP_MUL; dec_o.kind = K_MUL; dec_o.wb = 1'b0; end
          default: begin dec_o.kind = K_NOP; dec_o.wb = 1'b0; end
        endcase
      end
      16'b0100_010?_????_????: begin
        dec_o.rd = d5; dec_o.kind = K_ALU; dec_o.wb = 1'b1;
        unique case (ins_i[3:0])
          4'h0: dec_o.op = OP_NOT;
          4'h1: dec_o.op = OP_CLR;
          4'h2: dec_o.op = OP_SER;
          4'h3: dec_o.op = OP_LSL;
          4'h4: dec_o.op = OP_LSR;
          4'h5: dec_o.op = OP_ROL;
          4'h6: dec_o.op = OP_ROR;
          4'h7: dec_o.op = OP_ASR;
          4'h8: dec_o.op = OP_SWAP;
          4'h9: dec_o.op = OP_MIR;
          4'hA: dec_o.op = OP_INC;
          4'hB: dec_o.op = OP_DEC;
          4'hC: begin dec_o.kind = K_PUSH; dec_o.wb = 1'b0; end
          4'hD: begin dec_o.kind = K_POP; end
          default: begin dec_o.kind = K_NOP; dec_o.wb = 1'b0; end
        endcase
      end
      16'b0100_011?_????_????: begin
        dec_o.rd = d5; dec_o.kind = K_ALU; dec_o.wb = 1'b1;
        dec_o.op = ins_i[3] ? OP_BSET : OP_BCLR;
        dec_o.use_imm = 1'b1; dec_o.imm = {5'd0, ins_i[2:0]};
      end
      16'b0100_10??_????_0???: begin
        if (ins_i[1:0] != 2'b00) begin
          dec_o.kind = ins_i[9] ? K_ST : K_LD;
          dec_o.rd = d5; dec_o.wb = !ins_i[9];
          dec_o.pair = {2'b11, ins_i[1:0]};
          dec_o.postinc = ins_i[2];
          dec_o.use_imm = 1'b1; dec_o.imm = 8'd1;   // pointer step
        end
      end
      16'b0100_110?_????_????: begin
        dec_o.kind = K_ALU16;
        dec_o.op   = ins_i[8] ? OP_SBW : OP_ADW;
        dec_o.pair = {2'b11, ins_i[5:4]};
        dec_o.use_imm = 1'b1; dec_o.imm = {2'b00, ins_i[7:6], ins_i[3:0]};
      end
      16'b0101_????_????_????, 16'b0110_????_????_????, 16'b0111_????_????_????,
      16'b1000_????_????_????, 16'b1001_????_????_????, 16'b1010_????_????_????: begin
        dec_o.kind = K_ALU; dec_o.rd = {1'b1, ins_i[7:4]};
        dec_o.use_imm = 1'b1; dec_o.imm = k8; dec_o.wb = 1'b1;
        unique case (ins_i[15:12])
          4'h5: dec_o.op = OP_MOV;
          4'h6: dec_o.op = OP_SUB;
          4'h7: dec_o.op = OP_AND;
          4'h8: dec_o.op = OP_OR;
          4'h9: begin dec_o.op = OP_SUB; dec_o.wb = 1'b0; end
          default: dec_o.op = OP_ADD;
        endcase
      end
      16'b1011_????_????_????: begin
        dec_o.kind = ins_i[11] ? K_OUT : K_IN;
        dec_o.rd = d5; dec_o.wb = !ins_i[11];
        dec_o.io = {ins_i[10:9], ins_i[3:0]};
      end
      16'b110?_????_????_????: begin
        dec_o.kind = ins_i[12] ? K_RCALL : K_RJMP;
        dec_o.offs = {{4{ins_i[11]}}, ins_i[11:0]};
      end
      16'b1111_0???_????_????: begin
        dec_o.kind = K_BR;
        dec_o.cond = ins_i[10:8];
        dec_o.offs = {{8{ins_i[7]}}, ins_i[7:0]};
      end
      default: ;
    endcase
  end
endmodule

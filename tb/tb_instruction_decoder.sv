// tb_instruction_decoder: self-checking test of the instruction decoder.
// Each instruction class is encoded by hand from the encoding table and the
// decoded record is compared field by field.
module tb_instruction_decoder;
  import octalynx_pkg::*;
  import octalynx_isa_pkg::*;
  logic [15:0] ins; dec_t d;
  int checks = 0, failures = 0;
  instruction_decoder dut (.ins_i(ins), .dec_o(d));
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s ins=%h got=%h exp=%h", w, ins, got, exp); end
  endtask

  initial begin
    ins = 16'h0000; #1 chk("nop", d.kind, K_NOP);
    ins = 16'h0001; #1 chk("ret", d.kind, K_RET);
    ins = 16'h0002; #1 chk("reti", d.kind, K_RETI);
    ins = 16'h0003; #1 chk("sei", d.kind, K_SEI);
    ins = 16'h0004; #1 chk("cli", d.kind, K_CLI);
    ins = 16'h0005; #1 chk("ijmp", d.kind, K_IJMP); chk("ijmp z", d.pair, 15);
    // ADD R17, R25: 000001 r4=1 d=10001 r=1001
    ins = 16'b000001_1_10001_1001; #1
    chk("add k", d.kind, K_ALU); chk("add op", d.op, OP_ADD); chk("add rd", d.rd, 17); chk("add rr", d.rr, 25);
    chk("add wb", d.wb, 1); chk("add imm", d.use_imm, 0);
    ins = 16'b001001_0_00011_0100; #1 chk("cp op", d.op, OP_SUB); chk("cp wb", d.wb, 0); chk("cp rr", d.rr, 4);
    ins = 16'b001010_0_00010_0011; #1 chk("mul", d.kind, K_MUL); chk("mul rd", d.rd, 2); chk("mul rr", d.rr, 3);
    ins = 16'b000111_0_00001_0001; #1 chk("xor", d.op, OP_XOR);
    ins = 16'b001000_0_00001_0010; #1 chk("mov", d.op, OP_MOV);
    // one-register ops on R5
    ins = 16'b0100_010_00101_1001; #1 chk("mir", d.op, OP_MIR); chk("mir rd", d.rd, 5); chk("mir wb", d.wb, 1);
    ins = 16'b0100_010_00101_1000; #1 chk("swap", d.op, OP_SWAP);
    ins = 16'b0100_010_00101_0001; #1 chk("clr", d.op, OP_CLR);
    ins = 16'b0100_010_00101_0010; #1 chk("ser", d.op, OP_SER);
    ins = 16'b0100_010_00101_1100; #1 chk("push", d.kind, K_PUSH); chk("push wb", d.wb, 0);
    ins = 16'b0100_010_00101_1101; #1 chk("pop", d.kind, K_POP); chk("pop wb", d.wb, 1);
    // set bit 6 of R9
    ins = 16'b0100_011_01001_1110; #1 chk("bset", d.op, OP_BSET); chk("bset n", d.imm, 6); chk("bset rd", d.rd, 9);
    ins = 16'b0100_011_01001_0010; #1 chk("bclr", d.op, OP_BCLR); chk("bclr n", d.imm, 2);
    // LD R3,(Y+)  ST (Z),R4
    ins = 16'b0100_100_00011_0110; #1 chk("ld", d.kind, K_LD); chk("ld pair", d.pair, 14); chk("ld inc", d.postinc, 1); chk("ld rd", d.rd, 3);
    ins = 16'b0100_101_00100_0011; #1 chk("st", d.kind, K_ST); chk("st pair", d.pair, 15); chk("st inc", d.postinc, 0); chk("st wb", d.wb, 0);
    // ADW X,0x2A : K=101010 -> bits 7:6 = 10, bits 3:0 = 1010, pp=01
    ins = 16'b0100_1100_10_01_1010; #1 chk("adw", d.kind, K_ALU16); chk("adw op", d.op, OP_ADW); chk("adw k", d.imm, 8'h2A); chk("adw pair", d.pair, 13);
    ins = 16'b0100_1101_00_00_0001; #1 chk("sbw op", d.op, OP_SBW); chk("sbw pair", d.pair, 12);
    // LDI R20,0xA5
    ins = 16'h5A45; #1 chk("ldi", d.op, OP_MOV); chk("ldi rd", d.rd, 20); chk("ldi k", d.imm, 8'hA5);
    ins = 16'h9F0F; #1 chk("cpi wb", d.wb, 0); chk("cpi k", d.imm, 8'hFF); chk("cpi rd", d.rd, 16);
    ins = 16'hA123; #1 chk("addi", d.op, OP_ADD); chk("addi k", d.imm, 8'h13); chk("addi rd", d.rd, 18);
    // IN R7,0x3F : 1011 0 11 00111 1111
    ins = 16'b1011_0_11_00111_1111; #1 chk("in", d.kind, K_IN); chk("in io", d.io, 6'h3F); chk("in rd", d.rd, 7);
    ins = 16'b1011_1_00_01000_0101; #1 chk("out", d.kind, K_OUT); chk("out io", d.io, 6'h05); chk("out wb", d.wb, 0);
    ins = 16'hCFFE; #1 chk("rjmp", d.kind, K_RJMP); chk("rjmp off", d.offs, 16'hFFFE);
    ins = 16'hD010; #1 chk("rcall", d.kind, K_RCALL); chk("rcall off", d.offs, 16'h0010);
    ins = 16'hF1F0; #1 chk("brne", d.kind, K_BR); chk("br cond", d.cond, 1); chk("br off", d.offs, 16'hFFF0);
    ins = 16'hE000; #1 chk("resv", d.kind, K_NOP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

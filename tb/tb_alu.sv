// tb_alu: self-checking test of the ALU.
// Drives every operation with random operands (and the corner values 0x00,
// 0x7F, 0x80, 0xFF) and compares the 8-bit and 16-bit results and the
// updated flags with a reference model written independently in the bench.
// Also checks that with en_i low every output is zero (no unit active).
module tb_alu;
  import octalynx_pkg::*;
  logic en; aluop_e op; logic [7:0] a, b; logic [15:0] a16; logic c;
  logic [7:0] r; logic [15:0] r16; flags_t f; logic [3:0] m;
  int checks = 0, failures = 0;

  alu dut (.en_i(en), .op_i(op), .a_i(a), .b_i(b), .a16_i(a16), .c_i(c),
           .r_o(r), .r16_o(r16), .f_o(f), .fmask_o(m));

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s op=%s a=%h b=%h c=%b got=%h exp=%h", what, op.name(), a, b, c, got, exp); end
  endtask

  task automatic ref_check();
    logic [8:0] s; logic [7:0] e; logic [15:0] e16; logic co; logic [16:0] s17;
    e16 = 'x;
    case (op)
      OP_ADD, OP_ADC: begin s = a + b + ((op == OP_ADC) ? c : 0); e = s[7:0];
        chk("r", r, 32'(8'(e))); chk("c", f.c, s[8]); chk("z", f.z, e == 0); chk("n", f.n, e[7]);
        chk("v", f.v, (a[7] & b[7] & ~e[7]) | (~a[7] & ~b[7] & e[7])); chk("m", m, 4'hF); end
      OP_SUB, OP_SBC: begin s = a - b - ((op == OP_SBC) ? c : 0); e = s[7:0];
        chk("r", r, 32'(8'(e))); chk("c", f.c, a < b + ((op == OP_SBC) ? c : 0)); chk("z", f.z, e == 0);
        chk("v", f.v, (a[7] & ~b[7] & ~e[7]) | (~a[7] & b[7] & e[7])); chk("m", m, 4'hF); end
      OP_INC: begin chk("r", r, 32'(8'(a + 8'd1))); chk("v", f.v, a == 8'h7F); chk("m", m, 4'b1110); end
      OP_DEC: begin chk("r", r, 32'(8'(a - 8'd1))); chk("v", f.v, a == 8'h80); chk("m", m, 4'b1110); end
      OP_MUL: begin e16 = a * b; chk("r16", r16, e16); chk("c", f.c, e16[15]); chk("z", f.z, e16 == 0); end
      OP_ADW: begin s17 = a16 + b; chk("r16", r16, s17[15:0]); chk("c", f.c, s17[16]); end
      OP_SBW: begin s17 = {1'b0, a16} - b; chk("r16", r16, s17[15:0]); chk("c", f.c, a16 < b); end
      OP_AND: begin chk("r", r, 32'(8'(a & b))); chk("z", f.z, (a & b) == 0); chk("m", m, 4'b1110); end
      OP_OR:  chk("r", r, 32'(8'(a | b)));
      OP_XOR: chk("r", r, 32'(8'(a ^ b)));
      OP_NOT: chk("r", r, 32'(8'(~a)));
      OP_CLR: begin chk("r", r, 32'(8'(8'h00))); chk("z", f.z, 1); end
      OP_SER: begin chk("r", r, 32'(8'(8'hFF))); chk("m", m, 0); end
      OP_MOV: begin chk("r", r, 32'(8'(b))); chk("m", m, 0); end
      OP_LSL: begin chk("r", r, 32'(8'(a << 1))); chk("c", f.c, a[7]); end
      OP_LSR: begin chk("r", r, 32'(8'(a >> 1))); chk("c", f.c, a[0]); end
      OP_ROL: begin chk("r", r, 32'(8'((a << 1) | c))); chk("c", f.c, a[7]); end
      OP_ROR: begin chk("r", r, 32'(8'((a >> 1) | (c << 7)))); chk("c", f.c, a[0]); end
      OP_ASR: begin chk("r", r, 32'({a[7], a[7:1]})); chk("c", f.c, a[0]); end
      OP_BCLR: begin e = a; e[b[2:0]] = 0; chk("r", r, 32'(8'(e))); end
      OP_BSET: begin e = a; e[b[2:0]] = 1; chk("r", r, 32'(8'(e))); end
      OP_SWAP: chk("r", r, 32'(8'({a[3:0], a[7:4]})));
      OP_MIR: begin for (int i = 0; i < 8; i++) e[i] = a[7-i]; chk("r", r, 32'(8'(e))); end
      default: ;
    endcase
  endtask

  localparam logic [7:0] CORNER [4] = '{8'h00, 8'h7F, 8'h80, 8'hFF};

  initial begin
    en = 1;
    for (int o = 0; o <= OP_MIR; o++) begin
      op = aluop_e'(o);
      for (int i = 0; i < 16; i++) begin
        a = CORNER[i % 4]; b = CORNER[i / 4]; c = i[0]; a16 = {$urandom} % 65536;
        #1 ref_check();
      end
      for (int i = 0; i < 200; i++) begin
        a = $urandom; b = $urandom; c = $urandom; a16 = $urandom;
        if (op == OP_ADW || op == OP_SBW) b = b & 8'h3F;
        #1 ref_check();
      end
    end
    #1 en = 0; op = OP_ADD; a = 8'h55; b = 8'h22; #1;
    chk("idle r", r, 0); chk("idle m", m, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

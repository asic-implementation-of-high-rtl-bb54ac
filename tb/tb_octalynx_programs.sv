// tb_octalynx_programs: the chip running test programs that use every
// instruction and raise every interrupt source, at default parameters.
//
// Program memory is loaded straight into the external memory model (the
// programmer path is covered by tb_octalynx).  Two phases:
//   1. Instructions.  For each register, immediate, one-register and bit
//      instruction the program sets R16/R17 and SREG, executes the
//      instruction, and stores the result and the new SREG to RAM through X
//      with post-increment.  The bench computes the expected result, Z and C
//      with its own reference functions.  Branches are run once per
//      condition with a chosen SREG, a taken branch skipping an LDI.  MUL,
//      ADW/SBW, MOV, LD/ST, PUSH/POP, IN/OUT, RJMP, RCALL/RET, IJMP, NOP,
//      SEI/CLI are checked through their effects.
//   2. Interrupts.  All 14 sources are enabled: INT0/INT1 and the T/C0
//      capture by bench edges on PA0, PA1 and PA3, the T/C0 compare A/B and
//      overflow and T/C1, T/C2 compare and overflow by the running timers, SPI
//      by a master transfer, and USART receive complete, buffer empty and
//      transmit complete by a byte looped from TXD to RXD.  Each handler
//      saves SREG, writes its vector number to the led-out bus and returns
//      with RETI; the bench checks that every vector 1..14 was served.
// Checks per result, per vector (a vector never served is a failure), the
// stack pointer back at its reset value, and 10 clock cycles between the
// result stores of consecutive ALU cases (cycle table in core.sv).
`timescale 1ns/1ps
module tb_octalynx_programs;
  import octalynx_pkg::*;
  import olx_asm_pkg::*;
  logic clk = 0, por_n = 0, rst_n = 0;
  logic [15:0] maddr, mdo, moe, mdi; logic [3:0] mctl;
  logic [7:0] pa_i = 0, pa_o, pa_oe, pb_o, pb_oe, pc_o, pc_oe;
  logic sck_o, sck_oe, mosi_o, mosi_oe, miso_o, miso_oe, txd;
  logic [16:0] xack;
  int checks = 0, failures = 0;
  int seen [15];

  octalynx dut (.clk_ext_i(clk), .clk_int_i(1'b0), .clk_dpm_i(1'b0), .clk_sel_i(2'd0),
    .clk_stop_i(1'b0), .por_ni(por_n), .rst_ni(rst_n),
    .mem_addr_o(maddr), .mem_data_o(mdo), .mem_data_oe_o(moe), .mem_data_i(mdi), .mem_ctl_o(mctl),
    .pa_o, .pa_oe_o(pa_oe), .pa_i, .pb_o, .pb_oe_o(pb_oe), .pb_i(8'h00), .pc_o, .pc_oe_o(pc_oe), .pc_i(8'h00),
    .sck_o, .sck_oe_o(sck_oe), .sck_i(1'b0), .mosi_o, .mosi_oe_o(mosi_oe), .mosi_i(1'b0),
    .miso_o, .miso_oe_o(miso_oe), .miso_i(mosi_o), .ss_ni(1'b1), .txd_o(txd), .rxd_i(txd),
    .xirq_i(17'd0), .xack_o(xack));
  ext_memory_model mem (.clk_i(clk), .addr_i(maddr), .data_i(mdo), .data_oe_i(moe), .ctl_i(mctl), .data_o(mdi));

  always #5 clk = !clk;
  initial begin #20000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", w, got, exp); end
  endtask

  // handlers write their vector number to led-out address 0x22
  always @(posedge clk) if (rst_n && mctl == 4'b0010 && mdo[13:8] == 6'h22 && mdo[7:0] < 15) seen[mdo[7:0]]++;

  // cycle of each result store, for the timing check (10 cycles per ALU case:
  // four LDI/OUT, the instruction, IN, two 2-cycle stores)
  int cyc = 0, st_cyc [int];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && mctl == 4'b1010 && maddr >= 16'h0400 && maddr < 16'h0500 && !st_cyc.exists(maddr)) st_cyc[maddr] = cyc;
  end

  // ------------------------------------------------------------ reference
  typedef enum {T_ADD, T_ADC, T_SUB, T_SBC, T_AND, T_OR, T_XOR, T_CP, T_NOT, T_CLR, T_SER, T_LSL, T_LSR,
                T_ROL, T_ROR, T_ASR, T_SWAP, T_MIR, T_INC, T_DEC, T_BCLR, T_BSET,
                T_SUBI, T_ANDI, T_ORI, T_CPI, T_ADDI} top_e;
  typedef struct { top_e op; logic [7:0] a, b; logic c; } tcase_t;
  tcase_t tc [$];

  function automatic logic [15:0] enc(top_e op, logic [7:0] b);
    case (op)
      T_ADD: return ADD(16, 17);  T_ADC: return ADC(16, 17); T_SUB: return SUB(16, 17);
      T_SBC: return SBC(16, 17);  T_AND: return AND(16, 17); T_OR: return OR(16, 17);
      T_XOR: return XOR(16, 17);  T_CP: return CP(16, 17);   T_NOT: return NOT(16);
      T_CLR: return CLR(16);      T_SER: return SER(16);     T_LSL: return LSL(16);
      T_LSR: return LSR(16);      T_ROL: return ROL(16);     T_ROR: return ROR(16);
      T_ASR: return ASR(16);      T_SWAP: return SWAP(16);   T_MIR: return MIR(16);
      T_INC: return INC(16);      T_DEC: return DEC(16);     T_BCLR: return BCLR(16, b[2:0]);
      T_BSET: return BSET(16, b[2:0]); T_SUBI: return SUBI(16, b); T_ANDI: return ANDI(16, b);
      T_ORI: return ORI(16, b);   T_CPI: return CPI(16, b);  default: return ADDI(16, b);
    endcase
  endfunction

  // expected result; zc = 1 if Z is defined by the op, cexp = -1 if C is not checked
  function automatic void model(tcase_t t, output logic [7:0] r, output bit zc, output int cexp);
    logic [8:0] w; logic [7:0] a, b; a = t.a; b = t.b; zc = 1; cexp = -1;
    case (t.op)
      T_ADD, T_ADDI: begin w = a + b; r = w[7:0]; cexp = w[8]; end
      T_ADC: begin w = a + b + t.c; r = w[7:0]; cexp = w[8]; end
      T_SUB, T_SUBI: begin r = a - b; cexp = a < b; end
      T_SBC: begin r = a - b - t.c; cexp = (a < b + t.c) || (b == 8'hFF && t.c); end
      T_CP, T_CPI: begin r = a; zc = 0; cexp = a < b; end
      T_AND, T_ANDI: r = a & b;
      T_OR, T_ORI: r = a | b;
      T_XOR: r = a ^ b;
      T_NOT: r = ~a;
      T_CLR: r = 0;
      T_SER: begin r = 8'hFF; zc = 0; end
      T_LSL: begin r = a << 1; cexp = a[7]; end
      T_LSR: begin r = a >> 1; cexp = a[0]; end
      T_ROL: begin r = {a[6:0], t.c}; cexp = a[7]; end
      T_ROR: begin r = {t.c, a[7:1]}; cexp = a[0]; end
      T_ASR: begin r = {a[7], a[7:1]}; cexp = a[0]; end
      T_SWAP: begin r = {a[3:0], a[7:4]}; zc = 0; end
      T_MIR: begin for (int i = 0; i < 8; i++) r[i] = a[7 - i]; zc = 0; end
      T_INC: r = a + 1;
      T_DEC: r = a - 1;
      T_BCLR: begin r = a & ~(8'd1 << b[2:0]); zc = 0; end
      default: begin r = a | (8'd1 << b[2:0]); zc = 0; end   // T_BSET
    endcase
  endfunction

  // ------------------------------------------------------------ program
  int pa;
  function automatic void e(logic [15:0] w); mem.pm[pa] = w; pa++; endfunction
  localparam int NBR = 16;
  logic [7:0] br_sreg [NBR];

  task automatic build();
    int sub, hnd;
    foreach (mem.pm[i]) if (i < 4096) mem.pm[i] = 16'h0000;
    pa = 0; e(RJMP(63));                                  // -> 64
    pa = 64;
    e(LDI(26, 8'h00)); e(LDI(27, 8'h04));                 // X = 0x0400: results
    // --- ALU instructions, one case each
    foreach (tc[i]) begin
      e(LDI(16, tc[i].a)); e(LDI(17, tc[i].b));
      e(LDI(19, tc[i].c ? 8'h01 : 8'h00)); e(OUT(A_SREG, 19));
      e(enc(tc[i].op, tc[i].b));
      e(IN(18, A_SREG)); e(ST(1, 16, 1)); e(ST(1, 18, 1));
    end
    // --- branches: R20 = 0, set SREG, branch over "LDI R20,1", store R20
    for (int i = 0; i < NBR; i++) begin
      e(LDI(20, 0)); e(LDI(19, br_sreg[i])); e(OUT(A_SREG, 19));
      e(BR(i % 8, 1)); e(LDI(20, 1)); e(ST(1, 20, 1));
    end
    // --- the rest, results from R0 on stored at 0x0500
    e(LDI(26, 8'h00)); e(LDI(27, 8'h05));
    e(LDI(16, 8'hC8)); e(LDI(17, 8'h0D)); e(MUL(16, 17)); e(ST(1, 0, 1)); e(ST(1, 1, 1)); // A28 -> 28 0A
    e(MOV(2, 16)); e(ST(1, 2, 1));                                  // C8
    e(LDI(24, 8'hF0)); e(LDI(25, 8'h12)); e(ADW(0, 8'h25)); e(ST(1, 24, 1)); e(ST(1, 25, 1)); // 1315
    e(SBW(0, 8'h3F)); e(ST(1, 24, 1)); e(ST(1, 25, 1));             // 12D6
    e(LDI(16, 8'h6B)); e(PUSH(16)); e(LDI(16, 0)); e(POP(17)); e(ST(1, 17, 1)); // 6B
    e(LDI(28, 8'h00)); e(LDI(29, 8'h05)); e(LD(3, 2, 1)); e(LD(4, 2)); e(ST(1, 3, 1)); e(ST(1, 4, 1)); // 28 0A
    e(LDI(16, 8'h81)); e(OUT(A_UBRR, 16)); e(IN(5, A_UBRR)); e(ST(1, 5, 1));                // 81
    e(LDI(21, 0)); e(RJMP(1)); e(LDI(21, 8'hEE)); e(ST(1, 21, 1));                             // 00
    e(LDI(22, 0)); sub = pa + 200; e(RCALL(sub - (pa + 1))); e(ST(1, 22, 1));                                  // 5A
    e(LDI(30, 8'h00)); e(LDI(31, 8'h00)); e(ADW(3, 0));                                        // Z = 0 below
    begin
      int tgt; tgt = pa + 6;
      e(LDI(30, 8'(tgt))); e(LDI(31, 8'(tgt >> 8))); e(LDI(23, 0)); e(IJMP()); e(LDI(23, 8'hEE)); e(NOP());
      // tgt:
      e(ST(1, 23, 1));                                                                          // 00
    end
    e(SEI()); e(IN(6, A_SREG)); e(CLI()); e(IN(7, A_SREG)); e(ST(1, 6, 1)); e(ST(1, 7, 1));    // 80 00
    e(LDI(16, 8'hAA)); e(OUT(6'h22, 16));                                                       // phase 1 done
    // --- phase 2: every interrupt source
    e(LDI(16, 8'h0F)); e(OUT(A_EICR, 16));                        // INT0/1 rising
    e(LDI(16, 8'hFF)); e(OUT(A_TIMSK, 16));
    e(LDI(16, 8'hFF)); e(OUT(A_OCR0AH, 16)); e(OUT(A_OCR0BH, 16)); e(OUT(A_TCNT0H, 16));
    e(LDI(16, 8'h40)); e(OUT(A_OCR0AL, 16)); e(LDI(16, 8'h80)); e(OUT(A_OCR0BL, 16));
    e(LDI(16, 8'h00)); e(OUT(A_TCNT0L, 16));
    e(LDI(16, 8'h60)); e(OUT(A_OCR1, 16)); e(LDI(16, 8'h30)); e(OUT(A_OCR2, 16));
    e(LDI(16, 8'h00)); e(OUT(A_UBRR, 16)); e(LDI(16, 8'hD8)); e(OUT(A_UCSRB, 16));
    e(SEI());
    e(LDI(16, 8'h21)); e(OUT(A_TCCR0, 16));                       // clk/1, CTO, capture rising
    e(LDI(16, 8'h01)); e(OUT(A_TCCR1, 16)); e(OUT(A_TCCR2, 16));
    e(LDI(16, 8'hD0)); e(OUT(A_SPCR, 16)); e(LDI(16, 8'h99)); e(OUT(A_SPDR, 16));
    e(LDI(16, 8'h77)); e(OUT(A_UDR, 16));
    e(LDI(16, 8'hF8)); e(OUT(A_UCSRB, 16));                       // + UDRE interrupt
    e(RJMP(-1));
    if (pa >= sub) $display("program overlaps subroutine");
    pa = sub; e(LDI(22, 8'h5A)); e(RET());
    hnd = sub + 16;
    for (int v = 1; v <= 14; v++) begin pa = v; e(RJMP(hnd + 16 * v - (v + 1))); end
    // handlers: save R16 and SREG, report the vector, silence level sources
    for (int v = 1; v <= 14; v++) begin
      pa = hnd + 16 * v;
      e(PUSH(16)); e(IN(16, A_SREG)); e(PUSH(16));
      e(LDI(16, v)); e(OUT(6'h22, 16));
      if (v == V_T0_OVF) begin e(LDI(16, 8'h20)); e(OUT(A_TCCR0, 16)); end   // stop, keep capture
      if (v == V_T1_OVF) begin e(LDI(16, 0)); e(OUT(A_TCCR1, 16)); end
      if (v == V_T2_OVF) begin e(LDI(16, 0)); e(OUT(A_TCCR2, 16)); end
      if (v == V_USART_UDRE) begin e(LDI(16, 8'hD8)); e(OUT(A_UCSRB, 16)); end
      if (v == V_USART_RXC) e(IN(16, A_UDR));
      e(POP(16)); e(OUT(A_SREG, 16)); e(POP(16)); e(RETI());
    end
  endtask

  initial begin
    logic [7:0] r; bit zc; int cexp; int k;
    logic [7:0] vals [8] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFF, 8'h3C, 8'hA5, 8'h5A};
    for (int op = 0; op <= int'(T_ADDI); op++)
      for (int n = 0; n < 4; n++) begin
        tcase_t t;
        t.op = top_e'(op); t.a = vals[$urandom_range(0, 7)]; t.b = vals[$urandom_range(0, 7)];
        if (n == 0) t.b = t.a;
        t.c = n[0];
        tc.push_back(t);
      end
    for (int i = 0; i < NBR; i++) br_sreg[i] = 8'($urandom) & 8'h0F;
    #1 build();
    #23 por_n = 1; repeat (3) @(posedge clk); rst_n = 1;
    while (mem.xreg[0] !== 8'hAA) @(posedge clk);
    // ---- phase 1 results
    k = 16'h0400;
    foreach (tc[i]) begin
      model(tc[i], r, zc, cexp);
      chk($sformatf("%s a=%h b=%h c=%0d result", tc[i].op.name(), tc[i].a, tc[i].b, tc[i].c), mem.ram[k], r);
      if (zc) chk($sformatf("%s Z", tc[i].op.name()), mem.ram[k + 1][SR_Z], r == 0);
      if (cexp >= 0) chk($sformatf("%s a=%h b=%h C", tc[i].op.name(), tc[i].a, tc[i].b), mem.ram[k + 1][SR_C], cexp == 1);
      k += 2;
    end
    for (int i = 1; i < tc.size(); i++)
      chk($sformatf("cycles of ALU case %0d", i), st_cyc[16'h0400 + 2 * i] - st_cyc[16'h0400 + 2 * i - 2], 10);
    for (int i = 0; i < NBR; i++) begin
      bit taken; logic [7:0] s; s = br_sreg[i];
      case (i % 8)
        0: taken = s[SR_Z]; 1: taken = !s[SR_Z]; 2: taken = s[SR_C]; 3: taken = !s[SR_C];
        4: taken = s[SR_N]; 5: taken = !s[SR_N]; 6: taken = s[SR_V]; default: taken = !s[SR_V];
      endcase
      chk($sformatf("branch cond %0d sreg %h", i % 8, s), mem.ram[k], taken ? 0 : 1);
      k++;
    end
    begin
      logic [7:0] exp [16] = '{8'h28, 8'h0A, 8'hC8, 8'h15, 8'h13, 8'hD6, 8'h12, 8'h6B, 8'h28, 8'h0A,
                               8'h81, 8'h00, 8'h5A, 8'h00, 8'h80, 8'h00};
      string nm [16] = '{"MUL lo", "MUL hi", "MOV", "ADW lo", "ADW hi", "SBW lo", "SBW hi", "PUSH/POP",
                         "LD Y+", "LD Y", "OUT/IN", "RJMP skip", "RCALL/RET", "IJMP", "SEI", "CLI"};
      for (int i = 0; i < 14; i++) chk(nm[i], mem.ram[16'h0500 + i], exp[i]);
      for (int i = 14; i < 16; i++) chk(nm[i], mem.ram[16'h0500 + i] & 8'h80, exp[i]);
    end
    // ---- phase 2: pins for the external sources, then wait for all vectors
    repeat (200) @(posedge clk);
    pa_i[0] = 1; repeat (50) @(posedge clk); pa_i[1] = 1; repeat (50) @(posedge clk); pa_i[3] = 1;
    begin
      int t = 0;
      while (t < 200000) begin
        bit all = 1;
        for (int v = 1; v <= 14; v++) if (seen[v] == 0) all = 0;
        if (all) break;
        @(posedge clk); t++;
      end
    end
    repeat (100) @(posedge clk);
    for (int v = 1; v <= 14; v++) chk($sformatf("vector %0d served", v), seen[v] > 0, 1);
    chk("SP balanced", dut.u_core.sp, 16'hFFFF);
    $display("instruction cases %0d, branch cases %0d, vectors served %p", tc.size(), NBR, seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_core: self-checking test of the OctaLynx core on its own.
// The bench answers the core's memory requests from a program array and a
// RAM array (asynchronous reads, writes on the clock edge) and acts as a
// main-bus slave with 64 byte registers.  A hand-assembled program exercises
// the ALU groups, MUL, the X pointer with post-increment and ADW/SBW-style
// pointer arithmetic, the stack (PUSH/POP, RCALL/RET), branches, IN/OUT, an
// interrupt with its acknowledge, and an access to the led-out bus range.
// Expected register and memory contents were worked out by hand.  The cycle
// count of a timed block (4 ALU ops, LD, RJMP) is checked against the timing
// table: 1+1+1+1+2+2 cycles.
module tb_core;
  import octalynx_pkg::*;
  import olx_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  mdop_e md_op; logic [15:0] md_addr, md_rdata; logic [7:0] md_wdata;
  mbus_req_t mbus; logic [7:0] mbus_rdata;
  logic [NIRQ-1:0] irq_req, irq_ack;
  logic [15:0] pc, sp; logic [7:0] sr;
  logic [15:0] pm [256];
  logic [7:0]  ram [65536];
  logic [7:0]  ioreg [64];
  int checks = 0, failures = 0, cyc = 0, n = 0, xbus_cycles = 0, acks = 0;
  int mark_t [$];

  core dut (.clk_i(clk), .rst_ni(rst_n), .md_op_o(md_op), .md_addr_o(md_addr), .md_wdata_o(md_wdata),
            .md_rdata_i(md_rdata), .mbus_o(mbus), .mbus_rdata_i(mbus_rdata),
            .irq_req_i(irq_req), .irq_ack_o(irq_ack), .pc_o(pc), .sreg_o(sr), .sp_o(sp));

  always #5 clk = !clk;
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // memory and bus responders
  always_comb begin
    md_rdata = 16'h0000;
    if (md_op == MD_FETCH) md_rdata = pm[md_addr[7:0]];
    else if (md_op == MD_RAM_RD) md_rdata = {8'h00, ram[md_addr]};
  end
  assign mbus_rdata = mbus.rd ? ioreg[mbus.addr] : 8'h00;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (md_op == MD_RAM_WR) ram[md_addr] <= md_wdata;
    if (md_op == MD_XBUS) xbus_cycles <= xbus_cycles + 1;
    if (mbus.wr) ioreg[mbus.addr] <= mbus.wdata;
    if (mbus.wr && mbus.addr == 6'h07) mark_t.push_back(cyc);
    if (irq_ack[5]) irq_req[5] <= 1'b0;
  end

  always @(posedge irq_ack[5]) acks++;

  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", w, got, exp); end
  endtask

  function automatic void emit(logic [15:0] w); pm[n] = w; n++; endfunction

  initial begin
    foreach (pm[i]) pm[i] = 16'h0000;
    foreach (ioreg[i]) ioreg[i] = 8'h00;
    for (int i = 0; i < 65536; i++) ram[i] = 8'h00;
    irq_req = '0;
    // vector table
    n = 0;  emit(RJMP(15));          // 0: RESET -> 16
    n = 5;  emit(RJMP(120 - 6));     // 5: vector 5 -> 120 (handler)
    // main program at 16
    n = 16;
    emit(LDI(16, 8'h35)); emit(LDI(17, 8'h4C));
    emit(ADD(16, 17));                       // R16 = 0x81, N=1 V=1
    emit(IN(2, 6'h3F));                      // R2 = SREG
    emit(LDI(18, 8'h0F)); emit(MUL(16, 18)); // R1:R0 = 0x078F
    emit(LDI(26, 8'h00)); emit(LDI(27, 8'h02));
    emit(ST(1, 16, 1)); emit(ST(1, 0, 1));   // RAM[200]=81, RAM[201]=8F, X=202
    emit(SBW(1, 2));                         // X = 200
    emit(LD(19, 1, 1)); emit(LD(20, 1));     // R19=81, R20=8F, X=201
    emit(SWAP(20)); emit(MIR(20));           // R20 = F8 -> 1F
    emit(OUT(6'h05, 20)); emit(IN(21, 6'h05));
    emit(RCALL(100 - (n + 1)));              // call the subroutine at 100
    emit(LDI(22, 3)); emit(DEC(22)); emit(BR(NE, -2));
    emit(LDI(24, 8'h5A)); emit(PUSH(24)); emit(CLR(24)); emit(POP(25));
    emit(BSET(25, 0)); emit(LSR(25)); emit(ROL(25));   // 5B -> 2D (C=1) -> 5B
    emit(CPI(16, 8'h81)); emit(BR(EQ, 1)); emit(LDI(28, 8'hEE)); emit(LDI(29, 8'h11));
    emit(OUT(6'h07, 25));                    // timing mark 1
    emit(ADDI(16, 1)); emit(SUBI(16, 1)); emit(ANDI(16, 8'hFF)); emit(ORI(16, 0));
    emit(LD(30, 1)); emit(RJMP(0));
    emit(OUT(6'h07, 25));                    // timing mark 2
    emit(OUT(6'h22, 29)); emit(IN(31, 6'h23)); // led-out bus range
    emit(SEI());
    emit(NOP()); emit(NOP());
    emit(OUT(6'h08, 23));                    // done mark
    emit(RJMP(-1));
    if (n > 100) $display("program overlaps subroutine");
    n = 100; emit(INC(21)); emit(RET());
    n = 120; emit(LDI(23, 8'h77)); emit(OUT(6'h06, 23)); emit(RETI());
    ioreg[6'h23] = 8'h3C;

    repeat (2) @(posedge clk);
    #1 rst_n = 1; irq_req[5] = 1'b1;
    wait (ioreg[8] == 8'h77);
    repeat (3) @(posedge clk);
    chk("R16", dut.u_gpru.regs[16], 8'h81);
    chk("R2 sreg", dut.u_gpru.regs[2], 8'h0C);
    chk("R1", dut.u_gpru.regs[1], 8'h07); chk("R0", dut.u_gpru.regs[0], 8'h8F);
    chk("RAM200", ram[16'h200], 8'h81); chk("RAM201", ram[16'h201], 8'h8F);
    chk("R19", dut.u_gpru.regs[19], 8'h81); chk("R20", dut.u_gpru.regs[20], 8'h1F);
    chk("X", {dut.u_gpru.regs[27], dut.u_gpru.regs[26]}, 16'h0201);
    chk("io5", ioreg[5], 8'h1F); chk("R21", dut.u_gpru.regs[21], 8'h20);
    chk("R22", dut.u_gpru.regs[22], 8'h00);
    chk("R24", dut.u_gpru.regs[24], 8'h00); chk("R25", dut.u_gpru.regs[25], 8'h5B);
    chk("R28 skipped", dut.u_gpru.regs[28], 8'h00); chk("R29", dut.u_gpru.regs[29], 8'h11);
    chk("R30", dut.u_gpru.regs[30], 8'h8F);
    chk("xbus write", ioreg[6'h22], 8'h11); chk("R31 xbus read", dut.u_gpru.regs[31], 8'h3C);
    chk("xbus cycles", xbus_cycles, 2);
    chk("isr ran", ioreg[6], 8'h77); chk("ack", acks, 1); chk("irq dropped", irq_req[5], 0);
    chk("I set after RETI", sr[7], 1);
    chk("SP back", sp, 16'hFFFF);
    chk("marks", mark_t.size(), 2);
    if (mark_t.size() == 2) chk("timed block cycles", mark_t[1] - mark_t[0], 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

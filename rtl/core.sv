// core: OctaLynx 8-bit RISC processor core.
//
// Holds the General Purpose Register Unit (32 x 8), the ALU with the status
// register, the stack pointer counter and the control unit (instruction
// decoder, interrupt controller, program counter).  The core is the master of
// the internal main bus (IN/OUT) and drives the memory driver, which reaches
// the external program memory and RAM over one shared set of pins.
//
// Pipeline: two stages.  In the fetch stage the word at PC is read and
// decoded, and the decoded record is registered; in the execute stage the
// registered instruction is carried out.  So while one instruction executes
// the next one is decoded, as in the document.  Timing in clock cycles:
//   ALU, immediate, MUL, ADW/SBW, IN/OUT to on-chip registers, SEI/CLI,
//   branch not taken ........................................... 1
//   RJMP, IJMP, taken branch (fetched word discarded) .......... 2
//   LD, ST, PUSH, POP, IN/OUT to the led-out bus (the pins are
//   busy with the data access, so no fetch that cycle) ......... 2
//   RCALL (two pushes), RET/RETI (two pops) .................... 3
//   interrupt entry (two pushes, jump to the vector word) ...... 3
// The ID's state machine steps through the multi-cycle sequences.  The stack
// grows down; a call pushes the return address low byte first.  Interrupt
// entry clears I; RETI sets I and makes the interrupt controller acknowledge
// the unit that asked, which then drops its request.
//
// Follows the document: register count and buses, X/Y/Z pointers, ALU
// groups, SP counter and SREG in the control-register space, overlapped
// decode and execute, multi-cycle call, interrupt request / vector /
// acknowledge-on-return.  Own choices: the instruction set encoding, cycle
// counts, stack order and the ALU carrying out pointer post-increment.
module core
  import octalynx_pkg::*;
  import octalynx_isa_pkg::*;
(
  input  logic             clk_i,
  input  logic             rst_ni,
  // memory driver
  output mdop_e            md_op_o,
  output logic [15:0]      md_addr_o,
  output logic [7:0]       md_wdata_o,
  input  logic [15:0]      md_rdata_i,
  // internal main bus (master side)
  output mbus_req_t        mbus_o,
  input  logic [7:0]       mbus_rdata_i,
  // interrupt requests from the units, acknowledges back to them
  input  logic [NIRQ-1:0]  irq_req_i,
  output logic [NIRQ-1:0]  irq_ack_o,
  // observation
  output logic [15:0]      pc_o,
  output logic [7:0]       sreg_o,
  output logic [15:0]      sp_o
);
  typedef enum logic [1:0] {S_RUN, S_CALL2, S_RET2, S_INT2} state_e;

  state_e      state, state_n;
  dec_t        dq, dec_f;
  logic        vq;
  logic [15:0] tmp16, tmp16_n;
  logic [4:0]  vecq;

  // datapath signals
  logic [7:0]  rd_a, rd_b, alu_r, io_rdata;
  logic [15:0] rd16, alu_r16, pc, pc_target, sp;
  logic [3:0]  ra16, fmask;
  flags_t      aflags;
  logic        alu_en, gp_we, gp_we16, sr_fwe, i_set, i_clr;
  aluop_e      alu_op;
  logic [7:0]  alu_b, gp_wd;
  logic [15:0] gp_wd16;
  logic        pc_load, fetch_en, sp_inc, sp_dec;
  logic        irq, ic_take, ic_reti;
  logic [4:0]  ic_vec;
  logic        cond_ok;
  logic [7:0]  sr;

  assign pc_o = pc;
  assign sreg_o = sr;
  assign sp_o = sp;

  instruction_decoder u_id (.ins_i(md_rdata_i), .dec_o(dec_f));

  program_counter u_pc (.clk_i, .rst_ni, .inc_i(fetch_en && !pc_load), .load_i(pc_load),
                        .load_addr_i(pc_target), .pc_o(pc));

  gpru u_gpru (.clk_i, .rst_ni, .ra_a_i(dq.rd), .ra_b_i(dq.rr), .rd_a_o(rd_a), .rd_b_o(rd_b),
               .we_i(gp_we), .wa_i(dq.rd), .wd_i(gp_wd),
               .ra16_i(ra16), .rd16_o(rd16), .we16_i(gp_we16),
               .wa16_i(dq.kind == K_MUL ? 4'd0 : dq.pair), .wd16_i(gp_wd16));

  assign alu_b = dq.use_imm ? dq.imm : rd_b;
  alu u_alu (.en_i(alu_en), .op_i(alu_op), .a_i(rd_a), .b_i(alu_b), .a16_i(rd16), .c_i(sr[SR_C]),
             .r_o(alu_r), .r16_o(alu_r16), .f_o(aflags), .fmask_o(fmask));

  sreg u_sreg (.clk_i, .rst_ni, .flags_i(aflags), .flag_we_i(sr_fwe ? fmask : 4'b0),
               .i_set_i(i_set), .i_clr_i(i_clr),
               .bus_we_i(mbus_o.wr && mbus_o.addr == A_SREG), .bus_wdata_i(mbus_o.wdata), .q_o(sr));

  sp_counter u_sp (.clk_i, .rst_ni, .inc_i(sp_inc), .dec_i(sp_dec),
                   .we_hi_i(mbus_o.wr && mbus_o.addr == A_SPH),
                   .we_lo_i(mbus_o.wr && mbus_o.addr == A_SPL),
                   .wdata_i(mbus_o.wdata), .sp_o(sp));

  interrupt_controller #(.NIRQ(NIRQ)) u_ic (.clk_i, .rst_ni, .req_i(irq_req_i), .ie_i(sr[SR_I]),
                   .irq_o(irq), .vec_o(ic_vec), .take_i(ic_take), .reti_i(ic_reti),
                   .ack_o(irq_ack_o));

  always_comb begin
    unique case (dq.cond)
      3'd0: cond_ok =  sr[SR_Z];
      3'd1: cond_ok = !sr[SR_Z];
      3'd2: cond_ok =  sr[SR_C];
      3'd3: cond_ok = !sr[SR_C];
      3'd4: cond_ok =  sr[SR_N];
      3'd5: cond_ok = !sr[SR_N];
      3'd6: cond_ok =  sr[SR_V];
      default: cond_ok = !sr[SR_V];
    endcase
  end

  always_comb begin
    unique case (dq.io)
      A_SPH:   io_rdata = sp[15:8];
      A_SPL:   io_rdata = sp[7:0];
      A_SREG:  io_rdata = sr;
      default: io_rdata = mbus_rdata_i;
    endcase
  end

  always_comb begin
    state_n = state; tmp16_n = tmp16;
    fetch_en = 1'b1; pc_load = 1'b0; pc_target = '0;
    md_op_o = MD_FETCH; md_addr_o = pc; md_wdata_o = '0;
    mbus_o = '0; mbus_o.addr = dq.io; mbus_o.wdata = rd_a;
    alu_en = 1'b0; alu_op = dq.op; sr_fwe = 1'b0; i_set = 1'b0; i_clr = 1'b0;
    gp_we = 1'b0; gp_wd = alu_r; gp_we16 = 1'b0; gp_wd16 = alu_r16; ra16 = dq.pair;
    sp_inc = 1'b0; sp_dec = 1'b0; ic_take = 1'b0; ic_reti = 1'b0;

    unique case (state)
      S_RUN: if (vq && irq) begin
        // interrupt entry: the instruction in the execute stage is not executed
        ic_take = 1'b1; i_clr = 1'b1; fetch_en = 1'b0;
        tmp16_n = pc - 16'd1;
        md_op_o = MD_RAM_WR; md_addr_o = sp; md_wdata_o = tmp16_n[7:0]; sp_dec = 1'b1;
        state_n = S_INT2;
      end else if (vq) begin
        unique case (dq.kind)
          K_ALU: begin
            alu_en = 1'b1; sr_fwe = 1'b1; gp_we = dq.wb;
          end
          K_MUL, K_ALU16: begin
            alu_en = 1'b1; sr_fwe = 1'b1; gp_we16 = 1'b1;
          end
          K_LD, K_ST: begin
            fetch_en = 1'b0; md_addr_o = rd16;
            if (dq.kind == K_LD) begin
              md_op_o = MD_RAM_RD; gp_we = 1'b1; gp_wd = md_rdata_i[7:0];
            end else begin
              md_op_o = MD_RAM_WR; md_wdata_o = rd_a;
            end
            // post-increment: the ALU adds 1 (decoded as the immediate) on the 16-bit path
            if (dq.postinc) begin
              alu_en = 1'b1; alu_op = OP_ADW; gp_we16 = 1'b1;
            end
          end
          K_PUSH: begin
            fetch_en = 1'b0; md_op_o = MD_RAM_WR; md_addr_o = sp; md_wdata_o = rd_a; sp_dec = 1'b1;
          end
          K_POP: begin
            fetch_en = 1'b0; md_op_o = MD_RAM_RD; md_addr_o = sp + 16'd1; sp_inc = 1'b1;
            gp_we = 1'b1; gp_wd = md_rdata_i[7:0];
          end
          K_IN: begin
            mbus_o.rd = 1'b1; gp_we = 1'b1; gp_wd = io_rdata;
            if (is_ext_addr(dq.io)) begin fetch_en = 1'b0; md_op_o = MD_XBUS; end
          end
          K_OUT: begin
            mbus_o.wr = 1'b1;
            if (is_ext_addr(dq.io)) begin fetch_en = 1'b0; md_op_o = MD_XBUS; end
          end
          K_RJMP: begin
            fetch_en = 1'b0; pc_load = 1'b1; pc_target = pc + dq.offs;
          end
          K_BR: if (cond_ok) begin
            fetch_en = 1'b0; pc_load = 1'b1; pc_target = pc + dq.offs;
          end
          K_IJMP: begin
            fetch_en = 1'b0; pc_load = 1'b1; pc_target = rd16;
          end
          K_RCALL: begin
            fetch_en = 1'b0; tmp16_n = pc;
            md_op_o = MD_RAM_WR; md_addr_o = sp; md_wdata_o = pc[7:0]; sp_dec = 1'b1;
            state_n = S_CALL2;
          end
          K_RET, K_RETI: begin
            fetch_en = 1'b0; md_op_o = MD_RAM_RD; md_addr_o = sp + 16'd1; sp_inc = 1'b1;
            tmp16_n = {md_rdata_i[7:0], 8'h00};
            state_n = S_RET2;
          end
          K_SEI: i_set = 1'b1;
          K_CLI: i_clr = 1'b1;
          default: ;
        endcase
      end
      S_CALL2: begin
        fetch_en = 1'b0;
        md_op_o = MD_RAM_WR; md_addr_o = sp; md_wdata_o = tmp16[15:8]; sp_dec = 1'b1;
        pc_load = 1'b1; pc_target = tmp16 + dq.offs;
        state_n = S_RUN;
      end
      S_INT2: begin
        fetch_en = 1'b0;
        md_op_o = MD_RAM_WR; md_addr_o = sp; md_wdata_o = tmp16[15:8]; sp_dec = 1'b1;
        pc_load = 1'b1; pc_target = {11'd0, vecq};
        state_n = S_RUN;
      end
      S_RET2: begin
        fetch_en = 1'b0; md_op_o = MD_RAM_RD; md_addr_o = sp + 16'd1; sp_inc = 1'b1;
        pc_load = 1'b1; pc_target = {tmp16[15:8], md_rdata_i[7:0]};
        if (dq.kind == K_RETI) begin i_set = 1'b1; ic_reti = 1'b1; end
        state_n = S_RUN;
      end
      default: state_n = S_RUN;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state <= S_RUN; vq <= 1'b0; dq <= '{kind: K_NOP, op: OP_ADD, default: '0};
      tmp16 <= '0; vecq <= '0;
    end else begin
      state <= state_n;
      tmp16 <= tmp16_n;
      if (ic_take) vecq <= ic_vec;
      if (fetch_en) begin
        dq <= dec_f; vq <= 1'b1;
      end else if (state_n == S_RUN) begin
        vq <= 1'b0;
      end
    end
  end
endmodule

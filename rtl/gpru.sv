// gpru: General Purpose Register Unit, 32 registers of 8 bits.
//
// Two 8-bit read buses feed both ALU operands in the same cycle, one 8-bit
// write bus stores the ALU result.  A 16-bit read bus and a 16-bit write bus
// serve 16-bit operations on register pairs (pair p = R(2p+1):R(2p)).  Pairs
// 13, 14 and 15 (R27:R26, R29:R28, R31:R30) are the address pointers X, Y and
// Z; the 16-bit read bus doubles as the RAM address for indirect access.
//
// Reads are combinational, writes happen on the rising clock edge.  When the
// 8-bit and the 16-bit write hit the same register in one cycle, the 8-bit
// write wins.  All registers clear on reset.
//
// The register count, the bus structure and the existence of X/Y/Z follow the
// document; which pairs are X/Y/Z, the write priority and the reset are this
// design's own choices.
module gpru #(
  parameter int unsigned NREGS = 32
) (
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  logic [$clog2(NREGS)-1:0]  ra_a_i,
  input  logic [$clog2(NREGS)-1:0]  ra_b_i,
  output logic [7:0]                rd_a_o,
  output logic [7:0]                rd_b_o,
  input  logic                      we_i,
  input  logic [$clog2(NREGS)-1:0]  wa_i,
  input  logic [7:0]                wd_i,
  input  logic [$clog2(NREGS)-2:0]  ra16_i,
  output logic [15:0]               rd16_o,
  input  logic                      we16_i,
  input  logic [$clog2(NREGS)-2:0]  wa16_i,
  input  logic [15:0]               wd16_i
);
  logic [7:0] regs [NREGS];

  assign rd_a_o = regs[ra_a_i];
  assign rd_b_o = regs[ra_b_i];
  assign rd16_o = {regs[{ra16_i, 1'b1}], regs[{ra16_i, 1'b0}]};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      if (we16_i) begin
        regs[{wa16_i, 1'b0}] <= wd16_i[7:0];
        regs[{wa16_i, 1'b1}] <= wd16_i[15:8];
      end
      if (we_i) regs[wa_i] <= wd_i;
    end
  end
endmodule

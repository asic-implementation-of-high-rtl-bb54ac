// sp_counter: 16-bit stack pointer of the OctaLynx core.
//
// The stack lives in the 64 kB RAM space and grows downwards: a push writes
// RAM[SP] and then decrements SP, a pop increments SP and then reads RAM[SP].
// The control unit asks for one step per cycle (inc_i / dec_i).  The pointer
// is visible on the main bus as two bytes, high byte at 0x3D and low byte at
// 0x3E, just below the status register.  Resets to 0xFFFF, the top of RAM.
//
// A stack pointer counter next to the status register at the end of the
// control-register space follows the document; the width, growth direction,
// reset value and byte addresses are this design's own choices.
module sp_counter #(
  parameter logic [15:0] RESET_VALUE = 16'hFFFF
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        inc_i,
  input  logic        dec_i,
  input  logic        we_hi_i,
  input  logic        we_lo_i,
  input  logic [7:0]  wdata_i,
  output logic [15:0] sp_o
);
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) sp_o <= RESET_VALUE;
    else if (we_hi_i) sp_o[15:8] <= wdata_i;
    else if (we_lo_i) sp_o[7:0]  <= wdata_i;
    else if (inc_i)   sp_o <= sp_o + 16'd1;
    else if (dec_i)   sp_o <= sp_o - 16'd1;
  end
endmodule

// program_counter: 16-bit program counter of the OctaLynx control unit.
//
// Addresses 16-bit words of program memory.  On reset it points at word 0,
// the RESET vector.  Each cycle it may hold, step to the next word or load a
// new address (jump, branch, call, return, interrupt vector); load wins over
// increment.  Registered; pc_o is the address fetched in the current cycle.
//
// A program counter inside the control unit and the RESET vector at 0x00
// follow the document; the rest is this design's own choice.
module program_counter (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        inc_i,
  input  logic        load_i,
  input  logic [15:0] load_addr_i,
  output logic [15:0] pc_o
);
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)     pc_o <= '0;
    else if (load_i) pc_o <= load_addr_i;
    else if (inc_i)  pc_o <= pc_o + 16'd1;
  end
endmodule

// ext_memory_model: behavioural model of the parts outside the chip on the
// memory pins: a 64k x 16 program memory, a 64k x 8 RAM and a small device
// on the led-out main bus (XREGS byte registers from address 0x22 up).
// Reads are asynchronous (data follows address and control in the same
// cycle); writes happen on the rising clock edge.  Control lines as in the
// memory driver: ctl[0] RD, [1] WR, [2] PM select, [3] RAM select.
// Not synthesizable, for testbenches only.
module ext_memory_model #(
  parameter int unsigned PM_WORDS = 65536,
  parameter int unsigned RAM_BYTES = 65536,
  parameter int unsigned XREGS = 4
) (
  input  logic        clk_i,
  input  logic [15:0] addr_i,
  input  logic [15:0] data_i,      // chip -> memory
  input  logic [15:0] data_oe_i,
  input  logic [3:0]  ctl_i,
  output logic [15:0] data_o       // memory -> chip
);
  logic [15:0] pm  [PM_WORDS];
  logic [7:0]  ram [RAM_BYTES];
  logic [7:0]  xreg [XREGS];
  int          pm_writes = 0, ram_writes = 0, x_reads = 0, x_writes = 0;
  logic [5:0]  xa;

  initial begin
    foreach (pm[i]) pm[i] = 16'h0000;
    foreach (ram[i]) ram[i] = 8'h00;
    foreach (xreg[i]) xreg[i] = 8'(8'hA0 + i);
  end

  assign xa = data_i[13:8] - 6'h22;

  always_comb begin
    data_o = 16'h0000;
    if (ctl_i[0] && ctl_i[2])                      data_o = pm[addr_i % PM_WORDS];
    else if (ctl_i[0] && ctl_i[3])                 data_o = {8'h00, ram[addr_i % RAM_BYTES]};
    else if (ctl_i[0] && !ctl_i[2] && !ctl_i[3])   data_o = {8'h00, (xa < XREGS) ? xreg[xa] : 8'h00};
  end

  always @(posedge clk_i) begin
    if (ctl_i[1] && ctl_i[2]) begin
      pm[addr_i % PM_WORDS] <= data_i; pm_writes++;
      if (data_oe_i != 16'hFFFF) $display("MEMORY: PM write without driven data");
    end
    if (ctl_i[1] && ctl_i[3]) begin ram[addr_i % RAM_BYTES] <= data_i[7:0]; ram_writes++; end
    if (ctl_i[1] && !ctl_i[2] && !ctl_i[3]) begin
      if (xa < XREGS) xreg[xa] <= data_i[7:0];
      x_writes++;
    end
    if (ctl_i[0] && !ctl_i[2] && !ctl_i[3]) x_reads++;
  end
endmodule

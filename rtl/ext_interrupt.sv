// ext_interrupt: external interrupts 0 and 1.
//
// Watches two synchronised pin levels (port A bits 0 and 1) for an edge and
// raises interrupt requests for vectors 1 and 2.  One control register EICR at
// main-bus address 0x21:
//   bit 0/1  enable INT0 / INT1
//   bit 2/3  edge for INT0 / INT1 (1 rising, 0 falling)
//   bit 4/5  INT0 / INT1 flag: set by the edge, cleared by the acknowledge
//            after the return from the interrupt or by writing 1 to it
// The request to the interrupt controller is flag AND enable.  Edges are seen
// one cycle after the synchronised level changes.  Reset clears everything.
//
// Two external interrupts at vectors 1 and 2 follow the document; pins, edge
// choice and register are this design's own choices.
module ext_interrupt
  import octalynx_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  mbus_req_t  bus_i,
  output logic [7:0] rdata_o,
  output logic       hit_o,
  input  logic [1:0] pin_i,
  output logic [1:0] irq_o,
  input  logic [1:0] ack_i
);
  logic [3:0] ctl;
  logic [1:0] flag, q, edge_s;

  for (genvar i = 0; i < 2; i++) begin : g_edge
    assign edge_s[i] = ctl[2+i] ? (pin_i[i] && !q[i]) : (!pin_i[i] && q[i]);
  end
  assign irq_o   = flag & ctl[1:0];
  assign hit_o   = (bus_i.rd || bus_i.wr) && bus_i.addr == A_EICR;
  assign rdata_o = {2'b00, flag, ctl};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ctl <= '0; flag <= '0; q <= '0;
    end else begin
      q <= pin_i;
      if (bus_i.wr && bus_i.addr == A_EICR) ctl <= bus_i.wdata[3:0];
      flag <= (flag | edge_s) & ~ack_i & ~((bus_i.wr && bus_i.addr == A_EICR) ? bus_i.wdata[5:4] : 2'b00);
    end
  end
endmodule

// interrupt_controller: OctaLynx interrupt control (IC) unit.
//
// Each interrupting unit raises a level request on req_i[v], v being its
// vector number (program word address, RESET = 0 is not a request).  When the
// global enable ie_i is set and no interrupt is in service, the IC presents
// irq_o with the vector vec_o of the lowest-numbered pending request to the
// instruction decoder.  When the decoder starts the interrupt sequence it
// pulses take_i; the IC latches the vector as "in service".  When the decoder
// executes the return from interrupt it pulses reti_i; the IC then pulses
// ack_o[v] for exactly one cycle to the unit that asked, and that unit drops
// its request.
//
// The request / vector / acknowledge-on-return handshake and the vector table
// follow the document.  It states that the IC chooses among simultaneous
// requests but not how; fixed priority by vector number, one interrupt in
// service at a time (no nesting), are this design's own choices.
module interrupt_controller #(
  parameter int unsigned NIRQ = 32
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  input  logic [NIRQ-1:0]          req_i,
  input  logic                     ie_i,
  output logic                     irq_o,
  output logic [$clog2(NIRQ)-1:0]  vec_o,
  input  logic                     take_i,
  input  logic                     reti_i,
  output logic [NIRQ-1:0]          ack_o
);
  logic                    busy;
  logic [$clog2(NIRQ)-1:0] active;
  logic                    any;

  always_comb begin
    any = 1'b0; vec_o = '0;
    for (int v = NIRQ - 1; v >= 1; v--)
      if (req_i[v]) begin any = 1'b1; vec_o = v[$clog2(NIRQ)-1:0]; end
  end
  assign irq_o = ie_i && any && !busy;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy <= 1'b0; active <= '0; ack_o <= '0;
    end else begin
      ack_o <= '0;
      // A take without a pending request is a decoder error.
      a_take_needs_irq: assert (!take_i || irq_o);
      if (take_i && irq_o) begin
        busy <= 1'b1; active <= vec_o;
      end else if (reti_i && busy) begin
        busy <= 1'b0;
        ack_o[active] <= 1'b1;
      end
    end
  end
endmodule

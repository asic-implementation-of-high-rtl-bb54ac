// cmux: clock multiplexer of the OctaLynx chip.
//
// Chooses the processor clock from three sources: the external clock pin
// (sel 0), the internal generator (sel 1) or the dynamic power management
// (DPM) system (sel 2; sel 3 selects nothing).  stop_i, driven by the DPM
// system, gates the clock off entirely, so the processor can be held stopped
// (for example until the chip has cooled) and restarted without losing state.
//
// Switching is glitch-free: each source has an enable that is synchronised in
// that source's own clock domain (a rising-edge flip-flop followed by a
// falling-edge one) and is only raised after the enables of all other
// sources have dropped.  The output is the OR of each clock ANDed with its
// enable; since an enable changes only while its clock is low, no shortened
// pulse reaches clk_o.  A switch takes about two cycles of the old clock to
// release and two of the new one to take over; stop_i takes effect within
// two cycles of the running clock.
//
// Selecting among external, internal and DPM clocks follows the document; the
// glitch-free structure, the encoding of sel_i and the stop input are this
// design's own choices.  The AND/OR gating of clocks is deliberate: this
// module is clock logic.
module cmux (
  input  logic       por_ni,
  input  logic [2:0] clk_i,     // {dpm, internal, external}
  input  logic [1:0] sel_i,
  input  logic       stop_i,
  output logic       clk_o
);
  logic [2:0] en;

  for (genvar i = 0; i < 3; i++) begin : g_src
    logic want, s1_q, en_q;
    assign want = (sel_i == 2'(i)) && !stop_i && ((en & ~(3'b1 << i)) == 3'b000);
    always_ff @(posedge clk_i[i] or negedge por_ni) begin
      if (!por_ni) s1_q <= 1'b0;
      else         s1_q <= want;
    end
    always_ff @(negedge clk_i[i] or negedge por_ni) begin
      if (!por_ni) en_q <= 1'b0;
      else         en_q <= s1_q;
    end
    assign en[i] = en_q;
  end

  assign clk_o = |(clk_i & en);
endmodule

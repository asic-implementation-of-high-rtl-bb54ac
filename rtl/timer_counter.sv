// timer_counter: one OctaLynx timer/counter (T/C0 is 16-bit with input
// capture and two compare registers, T/C1 and T/C2 are 8-bit with one).
//
// The count advances by one in every cycle where tick_i is high (a prescaler
// strobe or an edge on the external count pin, chosen by timer_unit).  Modes:
//   CTO  clear timer on overflow: counts 0 .. 2^WIDTH-1 and wraps;
//   CTC  clear timer on compare: counts 0 .. OCRA and restarts at 0;
//   PWM  counts like CTO; pwm_o is high while the count is below OCRA.
// Event strobes, one cycle each, in the cycle the count leaves the value:
//   ovf_o  count wraps from all-ones to 0;
//   cmpa_o / cmpb_o  count equals OCRA / OCRB on a tick;
//   capt_o  capt_i arrived, the count is copied into ICR (HAS_CAPTURE only).
// A write through cnt_we_i has priority over counting.
//
// The widths, the three modes, the compare-to-clear function and the input
// capture of T/C0 follow the document; event timing and the PWM polarity are
// this design's own choices.
module timer_counter
  import octalynx_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter bit HAS_CAPTURE = 1'b1,
  parameter bit HAS_COMPB   = 1'b1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             tick_i,
  input  tmode_e           mode_i,
  input  logic [WIDTH-1:0] ocra_i,
  input  logic [WIDTH-1:0] ocrb_i,
  input  logic             cnt_we_i,
  input  logic [WIDTH-1:0] cnt_wdata_i,
  input  logic             capt_i,
  output logic [WIDTH-1:0] cnt_o,
  output logic [WIDTH-1:0] icr_o,
  output logic             ovf_o,
  output logic             cmpa_o,
  output logic             cmpb_o,
  output logic             capt_o,
  output logic             pwm_o
);
  logic ctc_clear;
  assign ctc_clear = (mode_i == TM_CTC) && (cnt_o == ocra_i);
  assign ovf_o  = tick_i && !cnt_we_i && (&cnt_o) && !ctc_clear;
  assign cmpa_o = tick_i && !cnt_we_i && (cnt_o == ocra_i);
  assign cmpb_o = HAS_COMPB && tick_i && !cnt_we_i && (cnt_o == ocrb_i);
  assign capt_o = HAS_CAPTURE && capt_i;
  assign pwm_o  = (mode_i == TM_PWM) && (cnt_o < ocra_i);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_o <= '0; icr_o <= '0;
    end else begin
      if (cnt_we_i)    cnt_o <= cnt_wdata_i;
      else if (tick_i) cnt_o <= ctc_clear ? '0 : cnt_o + 1'b1;
      if (capt_o) icr_o <= cnt_o;
    end
  end
endmodule

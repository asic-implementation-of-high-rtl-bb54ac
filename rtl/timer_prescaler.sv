// timer_prescaler: 10-bit prescaler shared by the three timer/counters.
//
// A 10-bit counter that runs while en_i is high (some timer selects a
// prescaled clock) and stays cleared otherwise, to save power.  It gives
// one-cycle count strobes tick_o for the divisors 1, 8, 64, 256 and 1024:
// tick_o[k] is high in the cycle where the low bits of the count are all ones,
// so strobe k repeats every 1, 8, 64, 256, 1024 clock cycles.
//
// A configurable 10-bit prescaler for the timers follows the document; the set
// of divisors is this design's own choice.
module timer_prescaler (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       en_i,
  output logic [4:0] tick_o
);
  logic [9:0] cnt;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)    cnt <= '0;
    else if (en_i)  cnt <= cnt + 10'd1;
    else            cnt <= '0;
  end
  assign tick_o[0] = en_i;
  assign tick_o[1] = en_i && &cnt[2:0];
  assign tick_o[2] = en_i && &cnt[5:0];
  assign tick_o[3] = en_i && &cnt[7:0];
  assign tick_o[4] = en_i && &cnt[9:0];
endmodule

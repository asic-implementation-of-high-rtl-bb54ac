// tb_cmux: self-checking test of the glitch-free clock multiplexer.
// Three free-running sources with unrelated periods (external 10 ns,
// internal 14 ns, DPM 6 ns).  The bench switches among them many times at
// random moments and stops/restarts the clock.  Checked: after each switch
// clk_o runs at the chosen source's period; the output never has a high or
// low phase shorter than the shortest source half-period (no glitch); the
// switch completes within 3 old + 3 new source cycles (the design's
// two-flop release and take-over); with stop_i or sel 3 no edge appears.
`timescale 1ns/1ps
module tb_cmux;
  logic [2:0] clk = 3'b000; logic por_n = 0, stop = 0; logic [1:0] sel = 0; logic clk_o;
  int checks = 0, failures = 0;
  real last_edge = 0, min_phase = 1000;
  function automatic real per(int i); return i == 0 ? 10.0 : i == 1 ? 14.0 : 6.0; endfunction
  cmux dut (.por_ni(por_n), .clk_i(clk), .sel_i(sel), .stop_i(stop), .clk_o);
  always #5 clk[0] = !clk[0];
  always #7 clk[1] = !clk[1];
  always #3 clk[2] = !clk[2];
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(clk_o) if (por_n) begin
    if ($realtime - last_edge < min_phase && last_edge > 0) min_phase = $realtime - last_edge;
    last_edge = $realtime;
  end
  task automatic chk(string w, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask
  int rises = 0;
  always @(posedge clk_o) rises++;
  initial begin
    int r0; real t0, tsw;
    #23 por_n = 1;
    for (int k = 0; k < 60; k++) begin
      int ns; int old;
      old = sel;
      ns = (k % 7 == 6) ? 3 : $urandom_range(0, 2);
      #($urandom_range(1, 37));
      tsw = $realtime; sel = 2'(ns);
      // allow the switch to finish
      #(3 * (old == 3 ? 0 : per(old)) + 3 * (ns == 3 ? 0 : per(ns)) + 1);
      r0 = rises; t0 = $realtime;
      #(20 * 14.0);
      if (ns == 3) chk("sel 3 gives no clock", rises == r0);
      else begin
        int expn;
        expn = int'(20 * 14.0 / per(ns));
        chk($sformatf("frequency after switch to %0d (%0d vs %0d)", ns, rises - r0, expn),
            (rises - r0) >= expn - 1 && (rises - r0) <= expn + 1);
      end
    end
    // stop and restart
    sel = 0; #200;
    stop = 1; #40; r0 = rises; #300; chk("stopped", rises == r0);
    stop = 0; #40; r0 = rises; #100; chk("restarted", rises - r0 >= 9 && rises - r0 <= 11);
    chk($sformatf("no glitch (shortest phase %0.2f ns)", min_phase), min_phase >= 2.999);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

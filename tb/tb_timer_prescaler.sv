// tb_timer_prescaler: self-checking test of the 10-bit prescaler.
// Counts the strobes of each tap over 4096 enabled cycles (expected 4096/N)
// and checks the spacing of the divide-by-8 strobes and that the prescaler
// is silent while disabled.
module tb_timer_prescaler;
  logic clk = 0, rst_n = 0, en; logic [4:0] t;
  int checks = 0, failures = 0;
  int cnt [5]; int last8 = -1, cyc = 0;
  timer_prescaler dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .tick_o(t));
  always #5 clk = !clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int k = 0; k < 5; k++) if (t[k]) cnt[k]++;
    if (t[1]) begin
      if (last8 >= 0) begin checks++; if (cyc - last8 != 8) failures++; end
      last8 = cyc;
    end
  end
  initial begin
    localparam int DIV [5] = '{1, 8, 64, 256, 1024};
    en = 0; foreach (cnt[k]) cnt[k] = 0;
    #12 rst_n = 1;
    repeat (100) @(posedge clk);
    checks++; if (cnt[0] + cnt[1] + cnt[4] != 0) failures++;
    @(negedge clk) en = 1;
    repeat (4096) @(negedge clk);
    en = 0;
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (cnt[k] != 4096 / DIV[k]) begin failures++; $display("FAIL tap %0d count %0d", k, cnt[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sp_counter: self-checking test of the stack pointer.
// Reset to 0xFFFF, push/pop steps with wrap-around, byte writes from the bus.
module tb_sp_counter;
  logic clk = 0, rst_n = 0, inc, dec, wh, wl; logic [7:0] wd; logic [15:0] sp, model;
  int checks = 0, failures = 0;
  sp_counter dut (.clk_i(clk), .rst_ni(rst_n), .inc_i(inc), .dec_i(dec), .we_hi_i(wh), .we_lo_i(wl),
                  .wdata_i(wd), .sp_o(sp));
  always #5 clk = !clk;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    inc = 0; dec = 0; wh = 0; wl = 0; wd = 0;
    #12 rst_n = 1; model = 16'hFFFF;
    checks++; if (sp !== 16'hFFFF) failures++;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      {inc, dec} = $urandom; wh = ($urandom % 10) == 0; wl = !wh && ($urandom % 10) == 0; wd = $urandom;
      if (wh) model[15:8] = wd; else if (wl) model[7:0] = wd;
      else if (inc) model++; else if (dec) model--;
      @(posedge clk); #1;
      checks++;
      if (sp !== model) begin failures++; $display("FAIL sp=%h exp=%h", sp, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

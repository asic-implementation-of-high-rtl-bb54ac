// tb_program_counter: self-checking test of the program counter.
// Reset to word 0 (RESET vector), increment, load, load priority over increment.
module tb_program_counter;
  logic clk = 0, rst_n = 0, inc, ld; logic [15:0] la, pc, model;
  int checks = 0, failures = 0;
  program_counter dut (.clk_i(clk), .rst_ni(rst_n), .inc_i(inc), .load_i(ld), .load_addr_i(la), .pc_o(pc));
  always #5 clk = !clk;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    inc = 0; ld = 0; la = 0;
    #12 rst_n = 1; model = 0;
    checks++; if (pc !== 0) failures++;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      inc = $urandom; ld = ($urandom % 6) == 0; la = $urandom;
      if (ld) model = la; else if (inc) model++;
      @(posedge clk); #1;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc=%h exp=%h", pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

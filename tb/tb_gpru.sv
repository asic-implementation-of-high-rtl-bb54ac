// tb_gpru: self-checking test of the 32 x 8 register unit.
// Random writes over the 8-bit and 16-bit write buses against a model array;
// every cycle both 8-bit read buses and the 16-bit read bus are compared
// with the model, including the X/Y/Z pairs and the rule that an 8-bit write
// wins over a 16-bit write to the same register.
module tb_gpru;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra_a, ra_b, wa; logic [3:0] ra16, wa16;
  logic [7:0] rd_a, rd_b, wd; logic [15:0] rd16, wd16; logic we, we16;
  logic [7:0] model [32];
  int checks = 0, failures = 0;

  gpru dut (.clk_i(clk), .rst_ni(rst_n), .ra_a_i(ra_a), .ra_b_i(ra_b), .rd_a_o(rd_a), .rd_b_o(rd_b),
            .we_i(we), .wa_i(wa), .wd_i(wd), .ra16_i(ra16), .rd16_o(rd16),
            .we16_i(we16), .wa16_i(wa16), .wd16_i(wd16));

  always #5 clk = !clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string w, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", w, got, exp); end
  endtask

  initial begin
    we = 0; we16 = 0; ra_a = 0; ra_b = 0; ra16 = 0; wa = 0; wa16 = 0; wd = 0; wd16 = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ra_a = $urandom; ra_b = $urandom; ra16 = (n % 4 == 0) ? 4'(13 + n % 3) : 4'($urandom);
      #1;
      chk("rd_a", rd_a, model[ra_a]); chk("rd_b", rd_b, model[ra_b]);
      chk("rd16", rd16, {model[2*ra16+1], model[2*ra16]});
      we = $urandom; wa = $urandom; wd = $urandom;
      we16 = $urandom; wa16 = (n % 5 == 0) ? wa[4:1] : 4'($urandom); wd16 = $urandom;
      @(posedge clk); #1;
      if (we16) begin model[2*wa16] = wd16[7:0]; model[2*wa16+1] = wd16[15:8]; end
      if (we) model[wa] = wd;
      we = 0; we16 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sreg: self-checking test of the status register.
// Checks reset value, per-flag update masks, I set/clear, bus write priority
// and that the unused bits 6..4 read as zero.
module tb_sreg;
  import octalynx_pkg::*;
  logic clk = 0, rst_n = 0;
  flags_t fl; logic [3:0] fwe; logic iset, iclr, bwe; logic [7:0] bwd, q, model;
  int checks = 0, failures = 0;
  sreg dut (.clk_i(clk), .rst_ni(rst_n), .flags_i(fl), .flag_we_i(fwe), .i_set_i(iset), .i_clr_i(iclr),
            .bus_we_i(bwe), .bus_wdata_i(bwd), .q_o(q));
  always #5 clk = !clk;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    fl = '0; fwe = 0; iset = 0; iclr = 0; bwe = 0; bwd = 0; model = 0;
    #12 rst_n = 1;
    checks++; if (q !== 8'h00) failures++;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      fl = flags_t'($urandom); fwe = $urandom; iset = $urandom; iclr = $urandom;
      bwe = ($urandom % 8) == 0; bwd = $urandom;
      if (bwe) model = bwd & 8'h8F;
      else begin
        if (fwe[0]) model[0] = fl.c;
        if (fwe[1]) model[1] = fl.z;
        if (fwe[2]) model[2] = fl.n;
        if (fwe[3]) model[3] = fl.v;
        if (iset) model[7] = 1; else if (iclr) model[7] = 0;
      end
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL n=%0d q=%h exp=%h", n, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

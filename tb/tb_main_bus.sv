// tb_main_bus: self-checking test of the main-bus read return path.
// Four model slaves with random data; a random single slave (or none) hits;
// the returned byte must be that slave's data (or 0).
module tb_main_bus;
  localparam int N = 4;
  logic clk = 0, rd; logic [N-1:0] hit; logic [7:0] rdi [N]; logic [7:0] rdo;
  int checks = 0, failures = 0;
  main_bus #(.NSLV(N)) dut (.clk_i(clk), .rd_i(rd), .hit_i(hit), .rdata_i(rdi), .rdata_o(rdo));
  always #5 clk = !clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 1000; n++) begin
      int s;
      @(negedge clk);
      foreach (rdi[i]) rdi[i] = $urandom;
      s = $urandom % (N + 1);
      hit = (s == N) ? '0 : N'(1) << s; rd = 1;
      #1 checks++;
      if (rdo !== ((s == N) ? 8'h00 : rdi[s])) begin failures++; $display("FAIL s=%0d got=%h", s, rdo); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

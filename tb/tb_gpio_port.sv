// tb_gpio_port: self-checking test of one GPIO port.
// Reset state (all inputs), DDR/PORT writes and read-back, PIN through the
// two-cycle synchroniser, alternate-function override, address decode.
module tb_gpio_port;
  import octalynx_pkg::*;
  logic clk = 0, rst_n = 0; mbus_req_t b; logic [7:0] rd, out, oe, in, pin, alt_en, alt; logic hit;
  int checks = 0, failures = 0;
  gpio_port #(.BASE(6'h03)) dut (.clk_i(clk), .rst_ni(rst_n), .bus_i(b), .rdata_o(rd), .hit_o(hit),
    .alt_en_i(alt_en), .alt_i(alt), .out_o(out), .oe_o(oe), .in_i(in), .pin_o(pin));
  always #5 clk = !clk;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", w, got, exp); end
  endtask
  task automatic wr(logic [5:0] a, logic [7:0] d);
    @(negedge clk); b = '{addr: a, wdata: d, rd: 0, wr: 1}; @(posedge clk); #1 b.wr = 0;
  endtask
  initial begin
    logic [7:0] d, p;
    b = '0; in = 8'h00; alt_en = 0; alt = 0;
    #12 rst_n = 1;
    chk("reset oe", oe, 0);
    for (int n = 0; n < 100; n++) begin
      d = $urandom; p = $urandom;
      wr(6'h04, d); wr(6'h05, p);
      chk("oe", oe, d); chk("out", out, p);
      b = '{addr: 6'h04, wdata: 0, rd: 1, wr: 0}; #1 chk("rd ddr", rd, d); chk("hit", hit, 1);
      b.addr = 6'h05; #1 chk("rd port", rd, p);
      b.addr = 6'h06; #1 chk("no hit", hit, 0);
      b.addr = 6'h02; #1 chk("no hit lo", hit, 0);
      in = $urandom; @(posedge clk); #1;
      @(posedge clk); #1; b.addr = 6'h03; #1 chk("pin", rd, in);
      alt_en = $urandom; alt = $urandom; #1;
      chk("alt out", out, (alt_en & alt) | (~alt_en & p)); chk("alt oe", oe, alt_en | d);
      alt_en = 0; b = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

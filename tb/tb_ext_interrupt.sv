// tb_ext_interrupt: self-checking test of the external interrupts.
// Rising/falling edge selection, enable masking, flag held until the
// acknowledge, write-1-to-clear, no flag on the wrong edge.
module tb_ext_interrupt;
  import octalynx_pkg::*;
  logic clk = 0, rst_n = 0; mbus_req_t b; logic [7:0] rd; logic hit; logic [1:0] pin, irq, ack;
  int checks = 0, failures = 0;
  ext_interrupt dut (.clk_i(clk), .rst_ni(rst_n), .bus_i(b), .rdata_o(rd), .hit_o(hit), .pin_i(pin),
                     .irq_o(irq), .ack_i(ack));
  always #5 clk = !clk;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", w, got, exp); end
  endtask
  task automatic wr(logic [7:0] d);
    @(negedge clk); b = '{addr: A_EICR, wdata: d, rd: 0, wr: 1}; @(negedge clk); b = '0;
  endtask
  initial begin
    b = '0; pin = 2'b00; ack = 0;
    #12 rst_n = 1;
    wr(8'b0000_0111);                       // INT0 rising, INT1 falling, both enabled
    repeat (2) @(negedge clk);
    chk("quiet", irq, 0);
    pin[0] = 1; repeat (2) @(negedge clk);  // rising on INT0
    chk("int0", irq, 2'b01);
    pin[0] = 0; repeat (2) @(negedge clk);  // falling on INT0: no new event
    chk("hold", irq, 2'b01);
    ack = 2'b01; @(negedge clk); ack = 0; @(negedge clk);
    chk("acked", irq, 2'b00);
    pin[1] = 1; repeat (2) @(negedge clk);
    chk("int1 rising ignored", irq, 2'b00);
    pin[1] = 0; repeat (2) @(negedge clk);
    chk("int1 falling", irq, 2'b10);
    b = '{addr: A_EICR, wdata: 0, rd: 1, wr: 0}; #1 chk("read", rd, 8'b0010_0111); chk("hit", hit, 1);
    wr(8'b0010_0111); chk("w1c", irq, 2'b00);
    wr(8'b0000_0100);                       // disable both
    pin[0] = 1; repeat (2) @(negedge clk);
    chk("masked", irq, 0);
    b = '{addr: A_EICR, wdata: 0, rd: 1, wr: 0}; #1 chk("flag while masked", rd[4], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

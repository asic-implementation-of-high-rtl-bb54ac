// tb_interrupt_controller: self-checking test of the interrupt controller.
// Model units raise requests at random and hold them until acknowledged.
// The bench plays the decoder: when irq is offered it takes it, waits a few
// cycles (the "handler") and signals the return.  Checked: the vector is the
// lowest pending one, nothing is offered while interrupts are disabled or
// one is in service, the acknowledge is a one-cycle pulse to exactly the
// unit that was taken, and every raised request is eventually served.
module tb_interrupt_controller;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, ie, take, reti, irq; logic [4:0] vec;
  logic [N-1:0] req, ack;
  int checks = 0, failures = 0, served = 0, raised = 0;
  interrupt_controller #(.NIRQ(N)) dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .ie_i(ie), .irq_o(irq),
    .vec_o(vec), .take_i(take), .reti_i(reti), .ack_o(ack));
  always #5 clk = !clk;
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h t=%0t", w, got, exp, $time); end
  endtask

  // units: drop request on acknowledge
  always @(posedge clk) if (rst_n) begin
    req <= req & ~ack;
    served <= served + $countones(ack);
  end

  initial begin
    int lowest, vtaken;
    req = 0; ie = 0; take = 0; reti = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      // raise some requests (vector 0 is RESET, never requested)
      if ($urandom % 3 == 0) begin
        int v;
        v = 1 + $urandom % 14;
        if (!req[v]) raised++;
        req[v] = 1'b1;
      end
      ie = ($urandom % 4) != 0;
      #1;
      lowest = 0;
      for (int v = N - 1; v >= 1; v--) if (req[v]) lowest = v;
      chk("irq", irq, ie && lowest != 0);
      if (irq) begin
        chk("vec", vec, lowest);
        vtaken = vec;
        take = 1; @(negedge clk); take = 0;
        // handler: interrupts disabled by the decoder; IC must not offer another
        ie = 1;
        repeat (3) begin #1 chk("busy", irq, 0); @(negedge clk); end
        reti = 1; @(posedge clk); #1 reti = 0;
        chk("ack", ack, 32'(1) << vtaken);
        @(posedge clk); #1 chk("ack pulse", ack, 0);
      end
    end
    // drain everything that is still pending
    ie = 1;
    while (req != 0) begin
      @(negedge clk);
      if (irq) begin take = 1; @(negedge clk); take = 0; reti = 1; @(negedge clk); reti = 0; end
    end
    repeat (2) @(posedge clk);
    chk("served all", served, raised);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

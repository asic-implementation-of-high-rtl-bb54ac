// tb_usart: self-checking test of the USART (asynchronous 8N1).
// Transmitter: with UBRR = 3 a bit lasts 16 x 4 = 64 cycles; the bench
// samples TXD in the middle of each bit and checks start bit, 8 data bits LSB
// first and stop bit, the UDRE and TXC flags and their interrupt requests.
// Receiver: a bench serial model sends random bytes at the same rate; UDR,
// RXC, the interrupt request, clearing by read and by acknowledge, and a
// false start bit (a short low glitch) are checked.
// Synchronous master (UBRR = 3): XCK period must be 8 cycles; the bench reads
// TXD on each rising XCK edge and sends a frame changing RXD on falling
// edges.  Synchronous slave: the bench drives XCK with a 16-cycle period and
// checks both directions the same way; XCK must then not be driven.
module tb_usart;
  import octalynx_pkg::*;
  localparam int BIT = 64;
  logic clk = 0, rst_n = 0; mbus_req_t b; logic [7:0] rd; logic hit; logic [2:0] irq, ack;
  logic txd, rxd, xck_o, xck_oe, xck_i;
  int checks = 0, failures = 0;
  usart dut (.clk_i(clk), .rst_ni(rst_n), .bus_i(b), .rdata_o(rd), .hit_o(hit), .irq_o(irq), .ack_i(ack),
             .txd_o(txd), .rxd_i(rxd), .xck_o, .xck_oe_o(xck_oe), .xck_i);
  logic xck;   // the XCK pin: chip-driven as master, bench-driven as slave
  assign xck = xck_oe ? xck_o : xck_i;
  always #5 clk = !clk;
  initial begin repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h t=%0t", w, got, exp, $time); end
  endtask
  task automatic wr(logic [5:0] a, logic [7:0] d);
    @(negedge clk); b = '{addr: a, wdata: d, rd: 0, wr: 1}; @(negedge clk); b = '0;
  endtask
  task automatic rdreg(logic [5:0] a, output logic [7:0] d);
    @(negedge clk); b = '{addr: a, wdata: 0, rd: 1, wr: 0}; #1 d = rd; @(negedge clk); b = '0;
  endtask
  task automatic send(logic [7:0] d);
    logic [9:0] f = {1'b1, d, 1'b0};
    for (int i = 0; i < 10; i++) begin rxd = f[i]; repeat (BIT) @(negedge clk); end
  endtask

  // one transmitted and one received frame in synchronous mode
  task automatic sync_both(logic [7:0] d);
    logic [9:0] f, g; logic [7:0] x;
    // transmit: read TXD on rising XCK edges, starting with the start bit
    wr(A_UDR, d);
    do @(posedge xck); while (txd);
    f[0] = txd;
    for (int i = 1; i < 10; i++) begin @(posedge xck); f[i] = txd; end
    chk("sync frame sent", f, {1'b1, d, 1'b0});
    // receive: change RXD after falling XCK edges
    g = {1'b1, 8'(~d), 1'b0};
    for (int i = 0; i < 10; i++) begin @(negedge xck); rxd = g[i]; end
    @(negedge xck); rxd = 1; repeat (4) @(negedge clk);
    chk("sync RXC", irq[0], 1);
    rdreg(A_UDR, x); chk("sync received", x, 8'(~d));
  endtask

  initial begin
    logic [7:0] d, x;
    b = '0; ack = 0; rxd = 1; xck_i = 0;
    #12 rst_n = 1;
    chk("idle high", txd, 1);
    wr(A_UBRR, 8'd3); wr(A_UCSRB, 8'b1101_1000);   // RXC, TXC ints, RX and TX on
    rdreg(A_UCSRA, x); chk("UDRE at start", x[5], 1);
    // ---------- transmit
    for (int n = 0; n < 6; n++) begin
      d = $urandom;
      wr(A_UDR, d);
      @(negedge txd);                               // start bit begins
      repeat (BIT / 2) @(negedge clk);
      chk("start", txd, 0);
      for (int i = 0; i < 8; i++) begin repeat (BIT) @(negedge clk); chk("data bit", txd, d[i]); end
      repeat (BIT) @(negedge clk); chk("stop", txd, 1);
      repeat (BIT / 2 + 4) @(negedge clk);
      chk("TXC irq", irq[2], 1);
      @(negedge clk) ack = 3'b100; @(negedge clk) ack = 0; chk("TXC acked", irq[2], 0);
    end
    // UDRE interrupt request follows the empty buffer
    wr(A_UCSRB, 8'b0011_1000); chk("UDRE irq", irq[1], 1);
    @(negedge clk); b = '{addr: A_UDR, wdata: 8'h55, rd: 0, wr: 1}; @(negedge clk); b = '0;
    chk("UDRE drops on write", irq[1] == 0 || dut.t_busy, 1);
    repeat (12 * BIT) @(negedge clk);
    wr(A_UCSRB, 8'b1001_1000);
    // ---------- receive
    for (int n = 0; n < 6; n++) begin
      d = $urandom;
      send(d);
      repeat (4) @(negedge clk);
      chk("RXC irq", irq[0], 1);
      if (n % 2 == 0) begin
        rdreg(A_UDR, x); chk("received", x, d); chk("read clears", irq[0], 0);
      end else begin
        @(negedge clk) ack = 3'b001; @(negedge clk) ack = 0; chk("ack clears", irq[0], 0);
        rdreg(A_UDR, x); chk("received", x, d);
      end
    end
    // a low glitch shorter than half a bit is not a start bit
    rxd = 0; repeat (BIT / 4) @(negedge clk); rxd = 1;
    repeat (12 * BIT) @(negedge clk);
    chk("glitch ignored", irq[0], 0);
    // ---------- synchronous master
    wr(A_UCSRB, 8'b1001_1110);
    chk("xck driven", xck_oe, 1);
    begin
      int t0, t1;
      @(posedge xck); t0 = $time; @(posedge xck); t1 = $time;
      chk("xck period 2*(UBRR+1)", (t1 - t0) / 10, 8);
    end
    sync_both(8'hA7);
    sync_both(8'h3C);
    // ---------- synchronous slave, XCK = clk/16 from the bench
    wr(A_UCSRB, 8'b1001_1100);
    chk("xck not driven", xck_oe, 0);
    fork
      begin : slave_clock
        forever begin repeat (8) @(negedge clk); xck_i = !xck_i; end
      end
      begin
        sync_both(8'h96);
        sync_both(8'h01);
      end
    join_any
    disable slave_clock;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

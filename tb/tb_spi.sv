// tb_spi: self-checking test of the SPI unit.
// Master: random bytes are sent to a mode-0 slave model in the bench, which
// answers with its own random bytes; MOSI data, received data, SPIF, the
// interrupt and the transfer time (16 half periods of SCK) are checked.
// Slave: a master model in the bench clocks bytes in with SCK = clk/8 and
// checks what the unit sends back (loaded through SPDR).  Programming mode:
// the unit acts as slave with SPCR cleared and hands bytes to the programmer
// port, and the next byte to send comes from that port.
module tb_spi;
  import octalynx_pkg::*;
  logic clk = 0, rst_n = 0, clr; mbus_req_t b; logic [7:0] rd; logic hit, irq, ack;
  logic sck_o, sck_oe, mosi_o, mosi_oe, miso_o, miso_oe; logic sck_i, mosi_i, miso_i, ss_n;
  logic prog; logic [7:0] prx, ptx; logic prv, ptwe;
  int checks = 0, failures = 0, cyc = 0;
  spi dut (.clk_i(clk), .rst_ni(rst_n), .clr_i(clr), .bus_i(b), .rdata_o(rd), .hit_o(hit), .irq_o(irq), .ack_i(ack),
    .sck_o, .sck_oe_o(sck_oe), .sck_i, .mosi_o, .mosi_oe_o(mosi_oe), .mosi_i, .miso_o, .miso_oe_o(miso_oe),
    .miso_i, .ss_ni(ss_n), .prog_i(prog), .prog_rx_o(prx), .prog_rx_valid_o(prv), .prog_tx_we_i(ptwe), .prog_tx_i(ptx));
  always #5 clk = !clk;
  always @(posedge clk) cyc++;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h t=%0d", w, got, exp, cyc); end
  endtask
  task automatic wr(logic [5:0] a, logic [7:0] d);
    @(negedge clk); b = '{addr: a, wdata: d, rd: 0, wr: 1}; @(negedge clk); b = '0;
  endtask
  task automatic rdreg(logic [5:0] a, output logic [7:0] d);
    @(negedge clk); b = '{addr: a, wdata: 0, rd: 1, wr: 0}; #1 d = rd; @(negedge clk); b = '0;
  endtask

  // slave model for the master test: mode 0
  logic [7:0] sm_tx, sm_rx; logic sm_on = 0;
  always @(posedge sck_o) if (sm_on) sm_rx = {sm_rx[6:0], mosi_o};
  always @(negedge sck_o) if (sm_on) sm_tx = {sm_tx[6:0], 1'b0};
  assign miso_i = sm_tx[7];

  // master model for the slave test: SCK period 8 clocks
  task automatic mbyte(input logic [7:0] out, output logic [7:0] in);
    for (int i = 7; i >= 0; i--) begin
      mosi_i = out[i]; repeat (4) @(negedge clk);
      sck_i = 1; in[i] = miso_o; repeat (4) @(negedge clk);
      sck_i = 0;
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    logic [7:0] d, tx, got; int t0;
    b = '0; clr = 0; ack = 0; sck_i = 0; mosi_i = 0; ss_n = 1; prog = 0; ptx = 0; ptwe = 0;
    #12 rst_n = 1;
    // ---------------- master, rate 0 (SCK = clk/4), interrupt enabled
    wr(A_SPCR, 8'b1101_0000);
    sm_on = 1;
    for (int n = 0; n < 20; n++) begin
      tx = $urandom; sm_tx = $urandom; d = sm_tx;
      @(negedge clk); b = '{addr: A_SPDR, wdata: tx, rd: 0, wr: 1}; t0 = cyc; @(negedge clk); b = '0;
      wait (irq); chk("transfer time", cyc - t0, 16 * 2 + 1);
      chk("slave got", sm_rx, tx);
      rdreg(A_SPDR, got); chk("master got", got, d);
      rdreg(A_SPSR, got); chk("SPIF", got[7], 1);
      @(negedge clk) ack = 1; @(negedge clk) ack = 0; chk("acked", irq, 0);
    end
    sm_on = 0;
    // ---------------- slave
    wr(A_SPCR, 8'b0100_0000);
    chk("slave outputs", {sck_oe, mosi_oe}, 0);
    for (int n = 0; n < 10; n++) begin
      tx = $urandom; d = $urandom;
      wr(A_SPDR, tx);
      ss_n = 0; repeat (4) @(negedge clk);
      chk("miso enabled", miso_oe, 1);
      mbyte(d, got);
      chk("slave sent", got, tx);
      rdreg(A_SPDR, got); chk("slave received", got, d);
      ss_n = 1; repeat (4) @(negedge clk);
      wr(A_SPSR, 8'h80);
    end
    // ---------------- programming mode: SPCR cleared, programmer port
    clr = 1; prog = 1; repeat (2) @(negedge clk);
    ptwe = 1; ptx = 8'h5C; @(negedge clk); ptwe = 0;
    ss_n = 0; repeat (4) @(negedge clk);
    fork
      begin mbyte(8'hA7, got); chk("prog tx byte", got, 8'h5C); end
      begin
        @(posedge clk iff prv); chk("prog rx", prx, 8'hA7);
        ptwe = 1; ptx = 8'h3E; @(negedge clk); ptwe = 0;
      end
    join
    mbyte(8'h00, got); chk("prog next byte", got, 8'h3E);
    chk("no SPIF in reset", dut.spif, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_programmer: self-checking test of the programmer's command frames.
// The bench plays the SPI unit (delivering received bytes with a strobe and
// collecting the byte to send next) and a program memory.  Checked: word
// write, word read-back in the result bytes, the three signature bytes,
// chip erase (every word 0xFFFF, one word per cycle, busy flag and status
// command), and that leaving programming mode restarts the frame.
// PM_WORDS is reduced to 256 to keep the erase short.
module tb_programmer;
  localparam int W = 256;
  logic clk = 0, rst_n = 0, prog; logic [7:0] rx, tx; logic rxv, txwe, mrd, mwr, busy;
  logic [15:0] maddr, mwd, mrdata; logic [15:0] pm [W];
  logic [7:0] last_tx;
  int checks = 0, failures = 0;
  programmer #(.PM_WORDS(W)) dut (.clk_i(clk), .rst_ni(rst_n), .prog_i(prog), .rx_i(rx), .rx_valid_i(rxv),
    .tx_we_o(txwe), .tx_o(tx), .mem_rd_o(mrd), .mem_wr_o(mwr), .mem_addr_o(maddr), .mem_wdata_o(mwd),
    .mem_rdata_i(mrdata), .busy_o(busy));
  always #5 clk = !clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  assign mrdata = mrd ? pm[maddr % W] : 16'hDEAD;
  always @(posedge clk) begin
    if (mwr) pm[maddr % W] <= mwd;
    if (txwe) last_tx <= tx;
  end
  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", w, got, exp); end
  endtask
  // one frame; returns the bytes the chip would send during bytes 3 and 4
  task automatic frame(logic [7:0] c, logic [15:0] a, logic [15:0] d, output logic [15:0] res);
    logic [7:0] by [5]; logic [7:0] answer [5];
    by = '{c, a[15:8], a[7:0], d[15:8], d[7:0]};
    answer[0] = 0;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); rx = by[i]; rxv = 1; @(negedge clk); rxv = 0;
      if (i < 4) answer[i + 1] = last_tx;
      repeat (6) @(negedge clk);
    end
    chk("echo cmd", answer[1], c); chk("echo addr", answer[2], a[15:8]);
    res = {answer[3], answer[4]};
  endtask
  initial begin
    logic [15:0] r; int t0, t1;
    prog = 0; rx = 0; rxv = 0;
    foreach (pm[i]) pm[i] = 16'(i * 3);
    #12 rst_n = 1; @(negedge clk) prog = 1;
    frame(8'h40, 16'h0012, 16'hBEEF, r); chk("written", pm[8'h12], 16'hBEEF);
    frame(8'h20, 16'h0012, 16'h0000, r); chk("read back", r, 16'hBEEF);
    frame(8'h20, 16'h0007, 16'h0000, r); chk("read other", r, 16'd21);
    for (int i = 0; i < 3; i++) begin
      frame(8'h30, 16'(i), 0, r); chk("signature", r[7:0], (i == 0) ? 8'h4F : (i == 1) ? 8'h4C : 8'h58);
    end
    frame(8'h80, 0, 0, r);
    chk("busy", busy, 1);
    t0 = $time; wait (!busy); t1 = $time;
    chk("erase takes one cycle per word", (t1 - t0) / 10 inside {[W - 60 : W]}, 1);
    begin
      int bad = 0;
      foreach (pm[i]) if (pm[i] !== 16'hFFFF) bad++;
      chk("erased", bad, 0);
    end
    frame(8'hF0, 0, 0, r); chk("status idle", r[0], 0);
    // leaving programming mode mid-frame restarts the frame
    @(negedge clk); rx = 8'h40; rxv = 1; @(negedge clk); rxv = 0;
    prog = 0; @(negedge clk); prog = 1;
    frame(8'h40, 16'h0003, 16'h1234, r); chk("restart", pm[3], 16'h1234);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

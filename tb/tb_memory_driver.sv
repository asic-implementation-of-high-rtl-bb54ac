// tb_memory_driver: self-checking test of the memory pin multiplexer.
// For each cycle type (fetch, RAM read, RAM write, led-out bus read and
// write, programmer read and write) the address, data, output-enable and
// control pins are compared with the expected pin pattern, and the data
// returned to the core and programmer is checked.
module tb_memory_driver;
  import octalynx_pkg::*;
  mdop_e op; logic [15:0] a, rdata, paddr, pwd, prd, addr, dout, doe, din; logic [7:0] wd, xrd;
  mbus_req_t mb; logic pen, prd_en, pwr; logic [3:0] ctl;
  int checks = 0, failures = 0;
  memory_driver dut (.md_op_i(op), .md_addr_i(a), .md_wdata_i(wd), .md_rdata_o(rdata), .mbus_i(mb),
    .xbus_rdata_o(xrd), .prog_en_i(pen), .prog_rd_i(prd_en), .prog_wr_i(pwr), .prog_addr_i(paddr),
    .prog_wdata_i(pwd), .prog_rdata_o(prd), .addr_o(addr), .data_o(dout), .data_oe_o(doe),
    .data_i(din), .ctl_o(ctl));
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string w, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", w, got, exp); end
  endtask
  initial begin
    for (int n = 0; n < 200; n++) begin
      a = $urandom; wd = $urandom; din = $urandom; paddr = $urandom; pwd = $urandom;
      mb = '{addr: 6'($urandom), wdata: 8'($urandom), rd: 1'b0, wr: 1'b0};
      pen = 0; prd_en = 0; pwr = 0;
      op = MD_FETCH; #1;
      chk("f addr", addr, a); chk("f ctl", ctl, 4'b0101); chk("f oe", doe, 0); chk("f data", rdata, din);
      op = MD_RAM_RD; #1; chk("rr ctl", ctl, 4'b1001); chk("rr addr", addr, a); chk("rr oe", doe, 0);
      op = MD_RAM_WR; #1; chk("rw ctl", ctl, 4'b1010); chk("rw data", dout[7:0], wd); chk("rw oe", doe, 16'h00FF);
      op = MD_XBUS; mb.wr = 1; #1;
      chk("xw ctl", ctl, 4'b0010); chk("xw data", dout, {2'b10, mb.addr, mb.wdata}); chk("xw oe", doe, 16'hFFFF);
      mb.wr = 0; mb.rd = 1; #1;
      chk("xr ctl", ctl, 4'b0001); chk("xr hi", dout[15:8], {2'b01, mb.addr}); chk("xr oe", doe, 16'hFF00);
      chk("xr data", xrd, din[7:0]);
      pen = 1; prd_en = 1; #1;
      chk("pr ctl", ctl, 4'b0101); chk("pr addr", addr, paddr); chk("pr data", prd, din); chk("pr oe", doe, 0);
      prd_en = 0; pwr = 1; #1;
      chk("pw ctl", ctl, 4'b0110); chk("pw data", dout, pwd); chk("pw oe", doe, 16'hFFFF);
      pwr = 0; #1; chk("p idle", ctl, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

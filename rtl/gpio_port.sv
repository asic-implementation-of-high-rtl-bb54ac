// gpio_port: one 8-bit general purpose I/O port (the design has three: A, B, C).
//
// Three control registers on the main bus, at BASE, BASE+1, BASE+2:
//   PIN  (read only) the pin levels, through a two-flip-flop synchroniser
//   DDR  direction, 1 = output
//   PORT output value
// A peripheral may take a pin over with alt_en_i / alt_i (used for the timer
// PWM outputs); it then drives the pin whatever DDR and PORT say.  The
// bidirectional pad is given as out_o / oe_o / in_i.  After reset DDR and PORT
// are zero, so every pin is an input and the port draws no output current.
// Register writes take effect on the next clock edge, reads are
// combinational; PIN lags the pins by two clock cycles.
//
// Three 8-bit ports on the main bus, disabled after reset, follow the
// document; the register set and addresses are this design's own choices.
module gpio_port
  import octalynx_pkg::*;
#(
  parameter logic [5:0] BASE = 6'h00
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  mbus_req_t  bus_i,
  output logic [7:0] rdata_o,
  output logic       hit_o,
  input  logic [7:0] alt_en_i,
  input  logic [7:0] alt_i,
  output logic [7:0] out_o,
  output logic [7:0] oe_o,
  input  logic [7:0] in_i,
  output logic [7:0] pin_o      // synchronised pin levels for other peripherals
);
  logic [7:0] ddr, port, s1, s2;

  assign hit_o = (bus_i.rd || bus_i.wr) && 6'(bus_i.addr - BASE) < 6'd3;
  always_comb begin
    unique case (bus_i.addr - BASE)
      6'd0:    rdata_o = s2;
      6'd1:    rdata_o = ddr;
      6'd2:    rdata_o = port;
      default: rdata_o = '0;
    endcase
  end

  assign out_o  = (alt_en_i & alt_i) | (~alt_en_i & port);
  assign oe_o   = alt_en_i | ddr;
  assign pin_o  = s2;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ddr <= '0; port <= '0; s1 <= '0; s2 <= '0;
    end else begin
      s1 <= in_i; s2 <= s1;
      if (bus_i.wr && bus_i.addr == BASE + 6'd1) ddr  <= bus_i.wdata;
      if (bus_i.wr && bus_i.addr == BASE + 6'd2) port <= bus_i.wdata;
    end
  end
endmodule

// programmer: in-system programmer for the external program memory.
//
// While the reset line is held low (prog_i high) the core is stopped and the
// programmer owns the program-memory pins.  A PC talks to it through the SPI
// unit, which then acts as a slave.  Every command is a frame of five bytes,
// sent while the programmer answers byte by byte:
//   byte   PC -> chip       chip -> PC (during that byte)
//   0      command          0
//   1      address high     command (echo)
//   2      address low      address high (echo)
//   3      data high        result high
//   4      data low         result low
// Commands: 0x20 read the program word at the address (result = word);
// 0x40 write the word {data high, data low} to the address; 0x80 erase the
// whole program memory (every word becomes 0xFFFF, one word per clock cycle,
// PM_WORDS cycles); 0x30 read signature byte (address low 0, 1, 2; result low
// = that byte of SIGNATURE); 0xF0 status (result low bit 0 = erase busy).
// A memory read happens in the cycle byte 2 arrives, a write in the cycle
// byte 4 arrives.  The frame counter restarts whenever prog_i falls.
//
// Writing, reading back, erasing and reading a signature over SPI, entered by
// a low reset line, follow the document; the frame format, the command codes
// and the signature value are this design's own choices.
module programmer #(
  parameter int unsigned PM_WORDS  = 65536,
  parameter logic [23:0] SIGNATURE = 24'h4F4C58
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        prog_i,
  // from / to the SPI unit
  input  logic [7:0]  rx_i,
  input  logic        rx_valid_i,
  output logic        tx_we_o,
  output logic [7:0]  tx_o,
  // program memory through the memory driver
  output logic        mem_rd_o,
  output logic        mem_wr_o,
  output logic [15:0] mem_addr_o,
  output logic [15:0] mem_wdata_o,
  input  logic [15:0] mem_rdata_i,
  output logic        busy_o
);
  localparam logic [7:0] C_READ = 8'h20, C_WRITE = 8'h40, C_ERASE = 8'h80,
                         C_SIG = 8'h30, C_STATUS = 8'hF0;
  logic [2:0]  idx;
  logic [7:0]  cmd, ahi, dhi, lo;
  logic [16:0] ecnt;
  logic        erasing;
  logic        frame_rd, frame_wr;
  logic [15:0] faddr;

  assign busy_o   = erasing;
  assign frame_rd = prog_i && rx_valid_i && idx == 3'd2 && cmd == C_READ;
  assign frame_wr = prog_i && rx_valid_i && idx == 3'd4 && cmd == C_WRITE;
  assign faddr    = (idx == 3'd2) ? {ahi, rx_i} : {ahi, lo};

  always_comb begin
    mem_rd_o = frame_rd; mem_wr_o = frame_wr; mem_addr_o = faddr;
    mem_wdata_o = {dhi, rx_i};
    if (!frame_rd && !frame_wr && erasing) begin
      mem_wr_o = 1'b1; mem_addr_o = ecnt[15:0]; mem_wdata_o = 16'hFFFF;
    end
  end

  always_comb begin
    tx_we_o = prog_i && rx_valid_i;
    unique case (idx)
      3'd0: tx_o = rx_i;
      3'd1: tx_o = rx_i;
      3'd2: tx_o = (cmd == C_READ) ? mem_rdata_i[15:8] : 8'h00;
      3'd3: tx_o = lo;
      default: tx_o = 8'h00;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      idx <= '0; cmd <= '0; ahi <= '0; dhi <= '0; lo <= '0; ecnt <= '0; erasing <= 1'b0;
    end else if (!prog_i) begin
      idx <= '0; erasing <= 1'b0;
    end else begin
      if (erasing && !frame_rd && !frame_wr) begin
        ecnt <= ecnt + 17'd1;
        if (ecnt == 17'(PM_WORDS - 1)) erasing <= 1'b0;
      end
      if (rx_valid_i) begin
        idx <= (idx == 3'd4) ? 3'd0 : idx + 3'd1;
        unique case (idx)
          3'd0: cmd <= rx_i;
          3'd1: ahi <= rx_i;
          3'd2: begin
            unique case (cmd)
              C_READ:   lo <= mem_rdata_i[7:0];
              C_SIG:    lo <= (rx_i[1:0] == 2'd0) ? SIGNATURE[23:16] :
                              (rx_i[1:0] == 2'd1) ? SIGNATURE[15:8] : SIGNATURE[7:0];
              C_STATUS: lo <= {7'd0, erasing};
              default:  lo <= rx_i;    // keeps the address low byte for a write
            endcase
          end
          3'd3: dhi <= rx_i;
          default: if (cmd == C_ERASE) begin erasing <= 1'b1; ecnt <= '0; end
        endcase
      end
    end
  end
endmodule

// icai_avalon_slave: Avalon-MM slave and control registers of the ICAI
// controller.
//
// Register map (word addresses):
//   0  CONFIG   R/W  configuration word sent to the ICAI
//                    ([31:7] requested 704-line blocks, [6:4] PGA, [3:0] DL)
//   1  CONTROL  W    bit 0: start a capture (one-cycle pulse); reads 0
//   2  STATUS   R    bit 0 busy, bit 1 done, bit 2 FIFO overflow,
//                    bit 3 bad end symbol
//   3  ADDRESS  R/W  SDRAM word address where the captured frame is written
//   4  LINE     R    index of the last line received
//   5  COUNT    R    number of packets received since start
// Writes take effect at the clock edge of the cycle with chipselect and
// write high (no wait state). Reads are registered: readdata is valid in the
// cycle after chipselect and read, so the master uses one wait cycle, as in
// the original design's read protocol. The STATUS and Address registers are named in
// the ICAI controller architecture; the map and the other registers are this
// design's choices.
module icai_avalon_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  address,
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  // to the controller logic
  output logic [31:0] cfg_word,
  output logic        start,
  output logic [31:0] frame_addr,
  input  logic        busy,
  input  logic        done,
  input  logic        overflow,
  input  logic        sym_err,
  input  logic [31:0] last_line,
  input  logic [31:0] line_count
);

  logic wr, rd;
  assign wr = chipselect && write;
  assign rd = chipselect && read;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_word   <= '0;
      frame_addr <= '0;
      start      <= 1'b0;
    end else begin
      start <= wr && address == 3'd1 && writedata[0];
      if (wr && address == 3'd0) cfg_word   <= writedata;
      if (wr && address == 3'd3) frame_addr <= writedata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) readdata <= '0;
    else if (rd) begin
      case (address)
        3'd0:    readdata <= cfg_word;
        3'd2:    readdata <= {28'd0, sym_err, overflow, done, busy};
        3'd3:    readdata <= frame_addr;
        3'd4:    readdata <= last_line;
        3'd5:    readdata <= line_count;
        default: readdata <= '0;
      endcase
    end
  end

  // A master never reads and writes in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(chipselect && read && write));

endmodule

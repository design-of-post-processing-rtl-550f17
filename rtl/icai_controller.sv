// icai_controller: FPGA-side driver of the ICAI chip.
//
// Made of the logic block (icai_ctrl_logic), which runs the start /
// configure / read sequence on the ICAI pins and parses returned packets,
// the FIFO RAM (fifo_ram) that buffers pixel words for the SDRAM controller,
// and the Avalon slave (icai_avalon_slave) holding the CONFIG, STATUS and
// Address registers for the CPU. The FIFO read side (show-ahead: fifo_rdata is
// valid while fifo_empty is low, fifo_rd_en pops) goes to a write port of the
// multi-port SDRAM controller; frame_addr tells that port where to write.
// Everything runs on one clock, the ICAI's HCLK. The block structure is the
// original design's; the FIFO depth is this design's choice.
module icai_controller #(
  parameter int unsigned PIX        = 704,
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon slave
  input  logic [2:0]  avs_address,
  input  logic        avs_chipselect,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // ICAI pins
  output logic        hresetn,
  output logic        hsel,
  output logic        htrans,
  output logic        hwrite,
  output logic [31:0] hwdata,
  input  logic        hready,
  input  logic [31:0] hrdata,
  // to the SDRAM controller write port
  input  logic        fifo_rd_en,
  output logic [31:0] fifo_rdata,
  output logic        fifo_empty,
  output logic [31:0] frame_addr,
  output logic        capture_start,
  output logic        capture_done
);

  logic        start, busy, overflow, sym_err, fifo_we, fifo_full;
  logic [31:0] cfg_word, last_line, line_count, fifo_wdata;

  icai_avalon_slave u_avs (
    .clk, .rst_n, .address(avs_address), .chipselect(avs_chipselect),
    .read(avs_read), .write(avs_write), .writedata(avs_writedata),
    .readdata(avs_readdata), .cfg_word, .start, .frame_addr,
    .busy, .done(capture_done), .overflow, .sym_err, .last_line, .line_count
  );

  icai_ctrl_logic #(.PIX(PIX)) u_logic (
    .clk, .rst_n, .start, .cfg_word, .hresetn, .hsel, .htrans, .hwrite, .hwdata,
    .hready, .hrdata, .fifo_we, .fifo_wdata, .fifo_full,
    .busy, .done(capture_done), .overflow, .sym_err, .last_line, .line_count
  );

  fifo_ram #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(fifo_we), .wdata(fifo_wdata), .rd_en(fifo_rd_en),
    .rdata(fifo_rdata), .full(fifo_full), .empty(fifo_empty), .count()
  );

  assign capture_start = start;

endmodule

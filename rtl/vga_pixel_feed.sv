// vga_pixel_feed: turns frame-buffer words into VGA pixels.
//
// Sits between read port 0 of the SDRAM controller (show-ahead FIFO) and the
// VGA controller. Each 32-bit frame-buffer word holds four 8-bit gray pixels
// (the pixels of sensors A, B, C, D at one position along the sensors); they
// are shown left to right in lane order. On every read_en from the VGA
// controller the next pixel is registered onto rgb (so it is valid one cycle
// after read_en, as the VGA controller expects); a new word is popped from
// the FIFO on the first pixel of each group of four. Gray level g is sent as
// R = G = B = {g, g[7:6]} on the 10-bit DAC. If the FIFO is empty when a word
// is needed the pixels are black and underflow counts the event.
// This unpacking is this design's own; the original design does not describe how
// pixels reach the VGA controller beyond the SDRAM buffer.
module vga_pixel_feed (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        read_en,
  input  logic [31:0] fifo_rdata,
  input  logic        fifo_empty,
  output logic        fifo_rd_en,
  output logic [29:0] rgb,
  output logic [15:0] underflow
);

  logic [1:0]  lane;
  logic [31:0] word;
  logic [7:0]  g;

  assign fifo_rd_en = read_en && lane == 2'd0 && !fifo_empty;

  always_comb begin
    logic [31:0] w;
    w = (lane == 2'd0) ? (fifo_empty ? 32'd0 : fifo_rdata) : word;
    g = w[8*lane +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane      <= '0;
      word      <= '0;
      rgb       <= '0;
      underflow <= '0;
    end else if (read_en) begin
      lane <= lane + 2'd1;
      rgb  <= {g, g[7:6], g, g[7:6], g, g[7:6]};
      if (lane == 2'd0) begin
        word <= fifo_empty ? 32'd0 : fifo_rdata;
        if (fifo_empty) underflow <= underflow + 1'b1;
      end
    end
  end

endmodule

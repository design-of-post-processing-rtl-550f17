// sdram_addr_gen: burst address sequencer of one SDRAM controller port.
//
// Walks a rectangular window of the SDRAM word space: ROWS lines of ROW_WORDS
// words, consecutive lines PITCH words apart, starting at BASE; after the last
// word it starts again at BASE. Each advance moves by one burst of BL words.
// load (re)starts the walk and samples the window registers; a window of zero
// lines disables the port (enabled low). BASE, ROW_WORDS
// and PITCH should be multiples of BL so no burst crosses an SDRAM row.
module sdram_addr_gen #(
  parameter int unsigned AW = 24,
  parameter int unsigned BL = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] row_words,
  input  logic [AW-1:0] pitch,
  input  logic [AW-1:0] rows,
  input  logic          advance,
  output logic [AW-1:0] addr,
  output logic          enabled    // window has at least one line
);

  logic [AW-1:0] b, rw, p, n, line_start, col, line;

  assign addr    = line_start + col;
  assign enabled = (n != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {b, rw, p, n}          <= '0;
      {line_start, col, line} <= '0;
    end else if (load) begin
      b          <= base;
      rw         <= row_words;
      p          <= pitch;
      n          <= rows;
      line_start <= base;
      col        <= '0;
      line       <= '0;
    end else if (advance) begin
      if (col + AW'(BL) >= rw) begin
        col <= '0;
        if (line + 1'b1 >= n) begin
          line       <= '0;
          line_start <= b;
        end else begin
          line       <= line + 1'b1;
          line_start <= line_start + p;
        end
      end else begin
        col <= col + AW'(BL);
      end
    end
  end

endmodule

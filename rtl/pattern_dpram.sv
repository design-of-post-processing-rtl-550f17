// pattern_dpram: one of the two dual-port pattern memories of the sensor
// emulator.
//
// Holds half of every line of the 704x704, 1-bit-per-pixel pattern image:
// BYTES_PER_LINE bytes per line (44 = half of the 88 bytes of a line), lines
// stored one after another, so byte b of line y is at address
// y * BYTES_PER_LINE + b. Two independent read ports (address a/b, output
// q_a/q_b), each with a registered output one cycle after the address.
// The content is loaded at configuration time and never written, as in the
// original design; the content here is this design's own computed test pattern (see sensor_emulator for the formula). HALF
// selects which half of each line this memory holds.
module pattern_dpram #(
  parameter int unsigned LINES          = 704,
  parameter int unsigned BYTES_PER_LINE = 44,
  parameter int unsigned HALF           = 0,
  localparam int unsigned DEPTH         = LINES * BYTES_PER_LINE,
  localparam int unsigned AW            = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  output logic [7:0]    q_a,
  output logic [7:0]    q_b
);

  logic [7:0] mem [DEPTH];

  // Test pattern: black (0) inside rectangles, white (1) elsewhere.
  // Pixel (x, y) of the full 8*2*BYTES_PER_LINE wide image is black when
  // ((x / 64) + (y / 48)) is odd and also on the main diagonal band
  // |x - y| < 8; bit 7 of a byte is its leftmost pixel.
  function automatic logic pattern_bit(input int x, input int y);
    int d;
    d = x - y;
    if (d < 0) d = -d;
    return !((((x / 64) + (y / 48)) % 2 == 1) || d < 8);
  endfunction

  initial begin
    for (int y = 0; y < int'(LINES); y++)
      for (int b = 0; b < int'(BYTES_PER_LINE); b++) begin
        logic [7:0] v;
        for (int k = 0; k < 8; k++)
          v[7-k] = pattern_bit((int'(HALF) * int'(BYTES_PER_LINE) + b) * 8 + k, y);
        mem[y * int'(BYTES_PER_LINE) + b] = v;
      end
  end

  always_ff @(posedge clk) begin
    q_a <= mem[addr_a];
    q_b <= mem[addr_b];
  end

endmodule

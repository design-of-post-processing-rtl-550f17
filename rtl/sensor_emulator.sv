// sensor_emulator: stands in for the array of four strip CMOS sensors.
//
// A ROWS x (4*PIX/SCALE) one-bit pattern (704x704 by default) is held in two
// dual-port memories, each holding one half of every line. Every pattern
// pixel is repeated SCALE times along the line and every pattern line SCALE
// times, so the emulator scans a (SCALE*ROWS)-line image of 4*PIX pixels per
// line (2816 x 2816 by default). Each STROBE makes all four virtual sensors
// read out their next line: LATENCY cycles after the strobe cycle, PDATA
// carries for PIX consecutive cycles one 8-bit pixel of each sensor
// ({D, C, B, A}; white = 8'hFF, black = 8'h00). Sensor s, pixel j shows
// pattern column s*PIX/SCALE + j/SCALE. Sensors A and B read from memory 0
// (ports a and b), C and D from memory 1, so four pattern bytes are read each
// cycle, which is why two dual-port memories are needed. CIS_RESET returns the
// scan to line 0; the scan also wraps after the last line.
// Timing: the strobe is sampled at a clock edge; the cycle after that edge is
// cycle 1, and pixel j is on PDATA in cycle LATENCY + j.
// Like the original design's emulator it does not reproduce the stagger of the real
// array: all four sensors show the same scene line. Pattern size, memory
// split, 1-bpp storage and the fourfold repetition follow the original design; the
// clock (one word per HCLK cycle), LATENCY and the pattern content are this
// design's choices.
module sensor_emulator #(
  parameter int unsigned PIX     = 704,
  parameter int unsigned ROWS    = 704,
  parameter int unsigned SCALE   = 4,
  parameter int unsigned LATENCY = 247
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cis_reset,
  input  logic        strobe,
  output logic [31:0] pdata
);

  localparam int unsigned SBYTES = PIX / SCALE / 8;         // bytes per sensor line
  localparam int unsigned HBYTES = 2 * SBYTES;              // bytes per memory line
  localparam int unsigned AW     = $clog2(ROWS * HBYTES);
  localparam int unsigned CW     = $clog2(LATENCY + PIX + 1);
  localparam int unsigned RW     = $clog2(ROWS * SCALE);

  logic          active;
  logic [CW-1:0] cnt;
  logic [RW-1:0] row;          // output line, 0 .. SCALE*ROWS-1
  logic [CW-1:0] jn;           // pixel index fetched this cycle
  logic [AW-1:0] line_base, addr_lo, addr_hi;
  logic [7:0]    q0a, q0b, q1a, q1b;
  logic [2:0]    bitsel;
  logic          fetch, valid;

  // Line readout sequencing.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      row    <= '0;
    end else if (cis_reset) begin
      active <= 1'b0;
      cnt    <= '0;
      row    <= '0;
    end else if (strobe) begin
      active <= 1'b1;
      cnt    <= CW'(1);
    end else if (active) begin
      if (cnt == CW'(LATENCY + PIX - 1)) begin
        active <= 1'b0;
        cnt    <= '0;
        row    <= (row == RW'(ROWS * SCALE - 1)) ? '0 : row + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // Fetch one cycle ahead of the output cycle.
  assign fetch     = active && (cnt + 1'b1 >= CW'(LATENCY)) && (cnt + 1'b1 < CW'(LATENCY + PIX));
  assign jn        = cnt + 1'b1 - CW'(LATENCY);
  assign line_base = AW'(row / RW'(SCALE)) * AW'(HBYTES);
  assign addr_lo   = line_base + AW'((jn / CW'(SCALE)) / CW'(8));
  assign addr_hi   = line_base + AW'(SBYTES) + AW'((jn / CW'(SCALE)) / CW'(8));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      bitsel <= '0;
    end else begin
      valid  <= fetch && !cis_reset;
      bitsel <= 3'((jn / CW'(SCALE)) % CW'(8));
    end
  end

  pattern_dpram #(.LINES(ROWS), .BYTES_PER_LINE(HBYTES), .HALF(0)) u_mem0 (
    .clk, .addr_a(addr_lo), .addr_b(addr_hi), .q_a(q0a), .q_b(q0b)
  );
  pattern_dpram #(.LINES(ROWS), .BYTES_PER_LINE(HBYTES), .HALF(1)) u_mem1 (
    .clk, .addr_a(addr_lo), .addr_b(addr_hi), .q_a(q1a), .q_b(q1b)
  );

  always_comb begin
    pdata = '0;
    if (valid) begin
      pdata[7:0]   = {8{q0a[7 - bitsel]}};
      pdata[15:8]  = {8{q0b[7 - bitsel]}};
      pdata[23:16] = {8{q1a[7 - bitsel]}};
      pdata[31:24] = {8{q1b[7 - bitsel]}};
    end
  end

endmodule

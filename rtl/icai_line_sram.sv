// icai_line_sram: line memory of the ICAI image combiner.
//
// Holds SLOTS lines of PIX pixel words. Each word carries one pixel of each of
// the four sensors. Because sensors A and C are written in one line period and
// sensors B and D of the same output line one period later, the memory is
// split into two banks, one for the A/C byte lanes and one for the B/D byte
// lanes, each with its own write port; a single read port returns the whole
// 32-bit word one cycle after the address (registered output). The original design
// names this SRAM only; its banking, depth (three line slots) and read latency
// are this design's choices.
module icai_line_sram #(
  parameter int unsigned PIX   = 704,
  parameter int unsigned SLOTS = 3,
  localparam int unsigned AW   = $clog2(PIX * SLOTS)
) (
  input  logic          clk,
  input  logic          we_ac,
  input  logic [AW-1:0] waddr_ac,
  input  logic [7:0]    wdata_a,
  input  logic [7:0]    wdata_c,
  input  logic          we_bd,
  input  logic [AW-1:0] waddr_bd,
  input  logic [7:0]    wdata_b,
  input  logic [7:0]    wdata_d,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata    // {D, C, B, A}
);

  localparam int unsigned DEPTH = PIX * SLOTS;

  logic [15:0] mem_ac [DEPTH];   // {C, A}
  logic [15:0] mem_bd [DEPTH];   // {D, B}
  logic [15:0] q_ac, q_bd;

  always_ff @(posedge clk) begin
    if (we_ac) mem_ac[waddr_ac] <= {wdata_c, wdata_a};
    q_ac <= mem_ac[raddr];
  end

  always_ff @(posedge clk) begin
    if (we_bd) mem_bd[waddr_bd] <= {wdata_d, wdata_b};
    q_bd <= mem_bd[raddr];
  end

  assign rdata = {q_bd[15:8], q_ac[15:8], q_bd[7:0], q_ac[7:0]};

endmodule

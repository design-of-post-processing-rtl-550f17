// async_fifo: dual-clock FIFO used for the ports of the multi-port SDRAM
// controller.
//
// Memory array with binary pointers one bit wider than the address; the
// pointers cross between the clock domains in Gray code through two-flop
// synchronisers. Show-ahead read side: rdata is the oldest word while rempty
// is low; re pops it. wcount (write-side view) and rcount (read-side view)
// are conservative occupancy counts: they may over- resp. under-state the
// true fill by the synchroniser delay, never the other way round. DEPTH must
// be a power of two. A single asynchronous reset clears both sides.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             rst_n,
  input  logic             wclk,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic [AW:0]      wcount,
  input  logic             rclk,
  input  logic             re,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty,
  output logic [AW:0]      rcount
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Write side.
  assign rbin_w = gray2bin(rgray_w2);
  assign wcount = wbin - rbin_w;
  assign wfull  = (wcount == (AW+1)'(DEPTH));

  always_ff @(posedge wclk) begin
    if (we && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (we && !wfull) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // Read side.
  assign wbin_r = gray2bin(wgray_r2);
  assign rcount = wbin_r - rbin;
  assign rempty = (rcount == '0);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (re && !rempty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule

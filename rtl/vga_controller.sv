// vga_controller: VGA timing generator and pixel output stage.
//
// Five parts, as in the controller's block diagram: a horizontal sync
// generator (pixel counter), a vertical sync generator (line counter,
// advanced at the end of each line), a data request generator that raises
// read_en for every visible pixel, an RGB output register and the VGA output
// select that blanks the colour outputs outside the visible area.
//
// Timing: read_en is asserted in the cycle the counters point at a visible
// pixel; the pixel source must present that pixel's 30-bit RGB on rgb_in one
// cycle later. All outputs (syncs, blank_n, colours) leave through the same
// two-stage pipeline, so they stay aligned with each other, two cycles behind
// the counters. frame_start pulses for one cycle when the counters wrap to
// pixel (0,0).
// Defaults are 800x600 at 60 Hz, the original design's default mode; the porch and
// sync widths and the positive sync polarity are the VESA values for that
// mode (40 MHz pixel clock), not given in the original design.
module vga_controller #(
  parameter int unsigned H_ACTIVE = 800,
  parameter int unsigned H_FP     = 40,
  parameter int unsigned H_SYNC   = 128,
  parameter int unsigned H_BP     = 88,
  parameter int unsigned V_ACTIVE = 600,
  parameter int unsigned V_FP     = 1,
  parameter int unsigned V_SYNC   = 4,
  parameter int unsigned V_BP     = 23,
  parameter bit          SYNC_POS = 1'b1
) (
  input  logic        vga_clk,
  input  logic        rst_n,
  input  logic [29:0] rgb_in,      // {R[9:0], G[9:0], B[9:0]}
  output logic        read_en,
  output logic        frame_start,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);

  logic [HW-1:0] hcnt;
  logic [VW-1:0] vcnt;
  logic          hs0, vs0, de0;
  logic          hs1, vs1, de1;

  // H_Sync and V_Sync generators.
  always_ff @(posedge vga_clk or negedge rst_n) begin
    if (!rst_n) begin
      // park on the last position so nothing is requested during reset and
      // the first cycle after reset is pixel (0,0)
      hcnt <= HW'(H_TOTAL - 1);
      vcnt <= VW'(V_TOTAL - 1);
    end else if (hcnt == HW'(H_TOTAL - 1)) begin
      hcnt <= '0;
      vcnt <= (vcnt == VW'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
    end else begin
      hcnt <= hcnt + 1'b1;
    end
  end

  always_comb begin
    hs0 = (hcnt >= HW'(H_ACTIVE + H_FP)) && (hcnt < HW'(H_ACTIVE + H_FP + H_SYNC));
    vs0 = (vcnt >= VW'(V_ACTIVE + V_FP)) && (vcnt < VW'(V_ACTIVE + V_FP + V_SYNC));
    de0 = (hcnt < HW'(H_ACTIVE)) && (vcnt < VW'(V_ACTIVE));
  end

  // Data request generator.
  assign read_en     = de0;
  assign frame_start = (hcnt == '0) && (vcnt == '0);

  // Stage 1: align timing with the pixel that arrives one cycle after read_en.
  always_ff @(posedge vga_clk or negedge rst_n) begin
    if (!rst_n) begin
      hs1 <= 1'b0;
      vs1 <= 1'b0;
      de1 <= 1'b0;
    end else begin
      hs1 <= hs0;
      vs1 <= vs0;
      de1 <= de0;
    end
  end

  // Stage 2: RGB output register and VGA output select.
  always_ff @(posedge vga_clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_hsync   <= !SYNC_POS;
      vga_vsync   <= !SYNC_POS;
      vga_blank_n <= 1'b0;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
    end else begin
      vga_hsync   <= SYNC_POS ? hs1 : !hs1;
      vga_vsync   <= SYNC_POS ? vs1 : !vs1;
      vga_blank_n <= de1;
      {vga_r, vga_g, vga_b} <= de1 ? rgb_in : 30'd0;
    end
  end

  assign vga_sync_n = 1'b0;   // no sync-on-green

endmodule

// icai: image combiner and acquisition interface chip.
//
// Connects four 704-pixel strip CMOS sensors (PDATA carries one 8-bit pixel of
// each per cycle) to a host that drives HSELx/HTRANS/HWRITE. The host first
// writes a 32-bit configuration word (requested number of 704-line blocks N,
// PGA gain, sample delay DL), then holds the read-image state. The chip then
// works in 1000-cycle line periods: period 0 applies the configuration,
// every following period strobes the sensors and samples one line, the
// combiner de-interleaves the staggered sensors through a three-line memory,
// and from period 3 on one 706-word packet per period leaves on HRDATA with
// HREADY high, starting 247+DL cycles into the period, until line 704*N has
// been sent with an end-of-file symbol.
//
// Sub-blocks: icai_host_if (protocol, registers, packet output),
// icai_cis_ctrl (line timing, sensor pins), icai_combiner and icai_line_sram.
// The bidirectional HWRDATA bus is split into hwdata (in) and hrdata (out).
// The sensor clock is not generated here; the sensors run from the board's
// clock (see the top level).
module icai
  import icai_pkg::*;
#(
  parameter int unsigned PIX         = 704,
  parameter int unsigned LINE_PERIOD = 1000,
  parameter int unsigned DATA_START  = 247,
  parameter int unsigned CNT_W       = 40
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        hsel,
  input  logic        htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic        hready,
  output logic [31:0] hrdata,
  // sensor side
  output logic        cis_reset,
  output logic [2:0]  pga,
  output logic        strobe,
  input  logic [31:0] pdata
);

  localparam int unsigned TW = $clog2(LINE_PERIOD);
  localparam int unsigned AW = $clog2(PIX * 3);

  icai_state_e            state;
  icai_cfg_t              cfg;
  logic                   read_active, done, sample_en;
  logic [CNT_W-1:0]       period;
  logic [1:0]             slot;
  logic [TW-1:0]          tcnt;
  logic [$clog2(PIX)-1:0] sample_idx;
  logic                   we_ac, we_bd;
  logic [AW-1:0]          waddr_ac, waddr_bd, raddr;
  logic [7:0]             wa, wb, wc, wd;
  logic [31:0]            rdata;

  icai_host_if #(.PIX(PIX), .LINE_PERIOD(LINE_PERIOD), .DATA_START(DATA_START), .CNT_W(CNT_W)) u_host (
    .hclk, .hresetn, .hsel, .htrans, .hwrite, .hwdata, .hready, .hrdata,
    .state, .cfg, .read_active, .period, .slot, .tcnt, .done, .raddr, .rdata
  );

  icai_cis_ctrl #(.PIX(PIX), .LINE_PERIOD(LINE_PERIOD), .DATA_START(DATA_START), .CNT_W(CNT_W)) u_cis (
    .clk(hclk), .rst_n(hresetn), .read_active, .cfg, .cis_reset, .pga, .strobe,
    .period, .slot, .tcnt, .sample_en, .sample_idx, .done
  );

  icai_combiner #(.PIX(PIX), .CNT_W(CNT_W)) u_comb (
    .sample_en, .sample_idx, .period, .slot, .pdata,
    .we_ac, .waddr_ac, .wdata_a(wa), .wdata_c(wc),
    .we_bd, .waddr_bd, .wdata_b(wb), .wdata_d(wd)
  );

  icai_line_sram #(.PIX(PIX), .SLOTS(3)) u_sram (
    .clk(hclk), .we_ac, .waddr_ac, .wdata_a(wa), .wdata_c(wc),
    .we_bd, .waddr_bd, .wdata_b(wb), .wdata_d(wd), .raddr, .rdata
  );

endmodule

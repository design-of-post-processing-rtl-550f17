// imaging_system_top: strip-sensor capture and display system.
//
// Data path: sensor_emulator (four virtual 704-pixel strip sensors) -> icai
// (line timing, de-interleaving, packet output) -> icai_controller (drives
// the ICAI, FIFO RAM, CPU registers) -> write port 0 of multiport_sdram_ctrl
// (frame buffer in external SDRAM) -> read port 0 -> vga_pixel_feed ->
// vga_controller (800x600 at 60 Hz). The CPU (a soft processor on the board)
// is outside this module: its Avalon slave access to the ICAI controller and
// its SDRAM ports are top-level ports, as are the SDRAM and VGA DAC pins.
//
// The VGA side is held in reset until the display FIFO first holds data.
// EMU_LATENCY is the emulator's strobe-to-first-pixel delay; the ICAI samples
// DATA_START + DL cycles after the strobe, so DL must equal
// EMU_LATENCY - DATA_START for the emulated sensors.
//
// Clocks: hclk runs the sensor emulator, the ICAI and the ICAI controller
// (8 MHz on the board; the emulator gives one word per hclk cycle); vga_clk
// is the pixel clock; sdram_clk runs the SDRAM controller; cpu_clk clocks the
// CPU-side SDRAM ports. The SDRAM controller FIFOs cross between them.
//
// Use: write CONFIG and ADDRESS through the Avalon slave, pulse all four
// sdram_start bits (samples the port windows below and initialises the
// SDRAM; a later pulse on one bit restarts only that port), then write 1
// to CONTROL to start a capture. The capture writes lines of PIX words at
// ADDRESS with a pitch of PIX words; the display reads an 800x600 window at
// the same address (H_ACTIVE/4 words per line, same pitch).
module imaging_system_top #(
  parameter int unsigned PIX          = 704,
  parameter int unsigned LINE_PERIOD  = 1000,
  parameter int unsigned DATA_START   = 247,
  parameter int unsigned EMU_LATENCY  = 247,
  parameter int unsigned EMU_ROWS     = 704,
  parameter int unsigned EMU_SCALE    = 4,
  parameter int unsigned FRAME_LINES  = 2816,
  parameter int unsigned H_ACTIVE     = 800,
  parameter int unsigned H_FP         = 40,
  parameter int unsigned H_SYNC       = 128,
  parameter int unsigned H_BP         = 88,
  parameter int unsigned V_ACTIVE     = 600,
  parameter int unsigned V_FP         = 1,
  parameter int unsigned V_SYNC       = 4,
  parameter int unsigned V_BP         = 23,
  parameter int unsigned T_INIT       = 10000,
  parameter int unsigned FIFO_DEPTH   = 1024,
  localparam int unsigned AW          = 24
) (
  input  logic              hclk,
  input  logic              sdram_clk,
  input  logic              vga_clk,
  input  logic              cpu_clk,
  input  logic              rst_n,
  // Avalon slave of the ICAI controller (CPU side, hclk)
  input  logic [2:0]        avs_address,
  input  logic              avs_chipselect,
  input  logic              avs_read,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  output logic [31:0]       avs_readdata,
  output logic              capture_done,
  // SDRAM controller control (sdram_clk)
  input  logic [3:0]        sdram_start,   // {CPU rd, VGA rd, CPU wr, ICAI wr}
  output logic              sdram_init_done,
  // CPU SDRAM ports (cpu_clk)
  input  logic              cpu_wr_en,
  input  logic [31:0]       cpu_wr_data,
  output logic              cpu_wr_full,
  input  logic [AW-1:0]     cpu_wr_base,
  input  logic [AW-1:0]     cpu_wr_row_words,
  input  logic [AW-1:0]     cpu_wr_pitch,
  input  logic [AW-1:0]     cpu_wr_rows,
  input  logic              cpu_rd_en,
  output logic [31:0]       cpu_rd_data,
  output logic              cpu_rd_empty,
  input  logic [AW-1:0]     cpu_rd_base,
  input  logic [AW-1:0]     cpu_rd_row_words,
  input  logic [AW-1:0]     cpu_rd_pitch,
  input  logic [AW-1:0]     cpu_rd_rows,
  // sensor gain programmed into the ICAI (to the real sensors' PGA pins)
  output logic [2:0]        cis_pga,
  // SDRAM pins
  output logic              sdram_cke,
  output logic              sdram_cs_n,
  output logic              sdram_ras_n,
  output logic              sdram_cas_n,
  output logic              sdram_we_n,
  output logic [1:0]        sdram_ba,
  output logic [12:0]       sdram_a,
  output logic [3:0]        sdram_dqm,
  output logic [31:0]       sdram_dq_out,
  output logic              sdram_dq_oe,
  input  logic [31:0]       sdram_dq_in,
  // VGA DAC
  output logic              vga_hsync,
  output logic              vga_vsync,
  output logic              vga_blank_n,
  output logic              vga_sync_n,
  output logic [9:0]        vga_r,
  output logic [9:0]        vga_g,
  output logic [9:0]        vga_b,
  output logic [15:0]       vga_underflow
);

  // Sensor side.
  logic        cis_reset, strobe;
  logic [31:0] pdata;

  sensor_emulator #(.PIX(PIX), .ROWS(EMU_ROWS), .SCALE(EMU_SCALE), .LATENCY(EMU_LATENCY)) u_emu (
    .clk(hclk), .rst_n, .cis_reset, .strobe, .pdata
  );

  // ICAI.
  logic        hresetn, hsel, htrans, hwrite, hready;
  logic [31:0] hwdata, hrdata;

  icai #(.PIX(PIX), .LINE_PERIOD(LINE_PERIOD), .DATA_START(DATA_START)) u_icai (
    .hclk, .hresetn, .hsel, .htrans, .hwrite, .hwdata, .hready, .hrdata,
    .cis_reset, .pga(cis_pga), .strobe, .pdata
  );

  // ICAI controller.
  logic        fifo_rd_en, fifo_empty, capture_start;
  logic [31:0] fifo_rdata, frame_addr;
  logic [1:0]  wr_full, rd_empty;
  logic [1:0][31:0] rd_data;

  icai_controller #(.PIX(PIX), .FIFO_DEPTH(FIFO_DEPTH)) u_ctrl (
    .clk(hclk), .rst_n, .avs_address, .avs_chipselect, .avs_read, .avs_write,
    .avs_writedata, .avs_readdata, .hresetn, .hsel, .htrans, .hwrite, .hwdata,
    .hready, .hrdata, .fifo_rd_en, .fifo_rdata, .fifo_empty, .frame_addr,
    .capture_start, .capture_done
  );

  assign fifo_rd_en = !fifo_empty && !wr_full[0];

  // VGA side.
  logic        read_en, feed_rd_en, frame_start;
  logic [29:0] rgb;

  multiport_sdram_ctrl #(.T_INIT(T_INIT)) u_sdram (
    .sdram_clk, .rst_n, .start(sdram_start),
    .wr_clk({cpu_clk, hclk}), .wr_en({cpu_wr_en, fifo_rd_en}),
    .wr_data({cpu_wr_data, fifo_rdata}), .wr_full,
    .wr_base({cpu_wr_base, frame_addr[AW-1:0]}),
    .wr_row_words({cpu_wr_row_words, AW'(PIX)}),
    .wr_pitch({cpu_wr_pitch, AW'(PIX)}),
    .wr_rows({cpu_wr_rows, AW'(FRAME_LINES)}),
    .rd_clk({cpu_clk, vga_clk}), .rd_en({cpu_rd_en, feed_rd_en}), .rd_data, .rd_empty,
    .rd_base({cpu_rd_base, frame_addr[AW-1:0]}),
    .rd_row_words({cpu_rd_row_words, AW'(H_ACTIVE / 4)}),
    .rd_pitch({cpu_rd_pitch, AW'(PIX)}),
    .rd_rows({cpu_rd_rows, AW'(V_ACTIVE)}),
    .init_done(sdram_init_done),
    .sdram_cke, .sdram_cs_n, .sdram_ras_n, .sdram_cas_n, .sdram_we_n, .sdram_ba,
    .sdram_a, .sdram_dqm, .sdram_dq_out, .sdram_dq_oe, .sdram_dq_in
  );

  assign cpu_wr_full  = wr_full[1];
  assign cpu_rd_data  = rd_data[1];
  assign cpu_rd_empty = rd_empty[1];

  // The display starts once the first frame-buffer words have arrived in its
  // FIFO, so the VGA never asks for a word before the stream has begun.
  logic vga_run, vga_rst_n;
  always_ff @(posedge vga_clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_run   <= 1'b0;
      vga_rst_n <= 1'b0;
    end else begin
      if (!rd_empty[0]) vga_run <= 1'b1;
      vga_rst_n <= vga_run;
    end
  end

  vga_pixel_feed u_feed (
    .clk(vga_clk), .rst_n(vga_rst_n), .read_en, .fifo_rdata(rd_data[0]), .fifo_empty(rd_empty[0]),
    .fifo_rd_en(feed_rd_en), .rgb, .underflow(vga_underflow)
  );

  vga_controller #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_vga (
    .vga_clk, .rst_n(vga_rst_n), .rgb_in(rgb), .read_en, .frame_start, .vga_hsync, .vga_vsync,
    .vga_blank_n, .vga_sync_n, .vga_r, .vga_g, .vga_b
  );

endmodule

// tb_imaging_system_top: end-to-end testbench of the imaging system at reduced size (64-pixel
// sensors, 200-cycle line period, 32x12 display).
//
// Clocks: hclk 8 MHz, SDRAM 100 MHz, VGA pixel clock 40 MHz, CPU ports 50 MHz.
// A behavioural SDRAM sits on the SDRAM pins. The testbench acts as the CPU:
// it writes the ICAI configuration (one block of PIX lines, sample delay DL = 3) and the frame
// address through the Avalon slave, pulses sdram_start, starts the capture and
// polls STATUS until done. It then checks
//   * every captured word in the SDRAM: output line m (1-based) holds sensors
//     A and C of emulator line m-1 and sensors B and D of emulator line m,
//     where sensor s, pixel j of emulator line r is white when pattern pixel
//     (s*PIX/4 + j/4, r/4) is white (pattern: black when (x/64 + y/48) is odd
//     or |x - y| < 8);
//   * STATUS, LINE and COUNT registers;
//   * one full VGA frame taken after the capture: visible pixel (x, y) shows
//     lane x mod 4 of frame word y*PIX + x/4 as R = G = B;
//   * a CPU write burst and read-back through the CPU SDRAM ports;
//   * that each mechanism happened: configuration cycle, EOL and EOF packets,
//     de-interleaving that changes the data, FIFO RAM buffering, SDRAM write
//     and read bursts, refresh, VGA frames, and a non-zero sample delay.
module tb_imaging_system_top;
  timeunit 1ns; timeprecision 1ps;
  import icai_pkg::*;

  localparam int PIX = 64, SCALE = 4, EMU_ROWS = 16;
  localparam int DL = 3;
  localparam int H_ACTIVE = 32, V_ACTIVE = 12;
  localparam int NBLK = 1;      // reg_requestedrowx704
  localparam int L = NBLK * PIX;     // output lines
  localparam int BASE = 32'h2000;

  logic hclk = 0, sdram_clk = 0, vga_clk = 0, cpu_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset acts at once
  always #62.5 hclk = ~hclk;
  always #5    sdram_clk = ~sdram_clk;
  always #12.5 vga_clk = ~vga_clk;
  always #10   cpu_clk = ~cpu_clk;

  logic [2:0]  avs_address = 0;
  logic        avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic        capture_done, sdram_init_done;
  logic [3:0]  sdram_start = '0;
  logic        cpu_wr_en = 0, cpu_wr_full, cpu_rd_en = 0, cpu_rd_empty;
  logic [31:0] cpu_wr_data = 0, cpu_rd_data;
  logic [23:0] cpu_wr_base = 24'h40_0000, cpu_wr_row_words = 24'd16, cpu_wr_pitch = 24'd16, cpu_wr_rows = 24'd1;
  logic [23:0] cpu_rd_base = 24'h40_0000, cpu_rd_row_words = 24'd16, cpu_rd_pitch = 24'd16, cpu_rd_rows = 24'd0;
  logic [2:0]  cis_pga;
  logic        sdram_cke, sdram_cs_n, sdram_ras_n, sdram_cas_n, sdram_we_n, sdram_dq_oe;
  logic [1:0]  sdram_ba;
  logic [12:0] sdram_a;
  logic [3:0]  sdram_dqm;
  logic [31:0] sdram_dq_out, sdram_dq_in;
  logic        vga_hsync, vga_vsync, vga_blank_n, vga_sync_n;
  logic [9:0]  vga_r, vga_g, vga_b;
  logic [15:0] vga_underflow;

  imaging_system_top #(.PIX(64), .LINE_PERIOD(200), .DATA_START(20), .EMU_LATENCY(23), .EMU_ROWS(16),
    .FRAME_LINES(64), .H_ACTIVE(32), .H_FP(2), .H_SYNC(3), .H_BP(4), .V_ACTIVE(12),
    .V_FP(1), .V_SYNC(2), .V_BP(2), .T_INIT(50), .FIFO_DEPTH(64)) dut (.*);

  sdram_model #(.MAX_REF_GAP(800)) sdram (
    .clk(sdram_clk), .cke(sdram_cke), .cs_n(sdram_cs_n), .ras_n(sdram_ras_n),
    .cas_n(sdram_cas_n), .we_n(sdram_we_n), .ba(sdram_ba), .a(sdram_a),
    .dq_from_ctrl(sdram_dq_out), .dq_oe(sdram_dq_oe), .dq_to_ctrl(sdram_dq_in)
  );

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  function automatic logic pat(int x, int y);
    int d;
    d = (x > y) ? x - y : y - x;
    return !(((x / 64 + y / 48) % 2) == 1 || d < 8);
  endfunction
  function automatic logic [7:0] emu(int s, int r, int j);
    return pat(s * (PIX / SCALE) + j / SCALE, (r / SCALE) % EMU_ROWS) ? 8'hFF : 8'h00;
  endfunction
  function automatic logic [31:0] exp_word(int m, int j);
    return {emu(3, m, j), emu(2, m - 1, j), emu(1, m, j), emu(0, m - 1, j)};
  endfunction
  function automatic logic [31:0] mem_word(longint a);
    return sdram.mem.exists(a) ? sdram.mem[a] : 32'h0;
  endfunction

  // ---------------------------------------------------------------- CPU side
  task automatic av_write(int adr, logic [31:0] d);
    @(negedge hclk);
    avs_address = 3'(adr); avs_writedata = d; avs_write = 1; avs_chipselect = 1;
    @(negedge hclk);
    avs_write = 0; avs_chipselect = 0;
  endtask
  task automatic av_read(int adr, output logic [31:0] d);
    @(negedge hclk);
    avs_address = 3'(adr); avs_read = 1; avs_chipselect = 1;
    @(negedge hclk);
    d = avs_readdata;
    avs_read = 0; avs_chipselect = 0;
  endtask

  // ------------------------------------------------------ mechanism counters
  int n_config = 0, n_eol = 0, n_eof = 0, n_fifo_buffered = 0, n_vsync = 0;
  int hready_run = 0;
  always @(posedge hclk) begin
    if (dut.hsel && dut.htrans && dut.hwrite) n_config++;
    if (dut.hready) begin
      hready_run++;
      if (hready_run == PIX + 2) begin
        if (dut.hrdata == SYM_EOL) n_eol++;
        if (dut.hrdata == SYM_EOF) n_eof++;
        hready_run = 0;
      end
    end
    if (dut.u_ctrl.u_fifo.count > 0) n_fifo_buffered++;
  end
  logic vs_q = 0;
  always @(posedge vga_clk) begin
    vs_q <= vga_vsync;
    if (vga_vsync && !vs_q) n_vsync++;
  end

  // ------------------------------------------------------------- VGA check
  bit vga_check_on = 0, vga_checked = 0;
  int vga_k = -1, vga_pix_checks = 0;
  always @(posedge vga_clk) begin
    if (vga_vsync && !vs_q) begin
      if (vga_check_on && vga_k >= 0) begin vga_checked = 1; vga_check_on = 0; end
      vga_k = vga_check_on ? 0 : -1;
    end else if (vga_blank_n && vga_k >= 0) begin
      int x, y;
      logic [7:0] g;
      x = vga_k % H_ACTIVE; y = vga_k / H_ACTIVE;
      g = mem_word(BASE + y * PIX + x / 4) >> (8 * (x % 4));
      check("vga pixel", {vga_r, vga_g, vga_b}, {3{g, g[7:6]}});
      vga_pix_checks++;
      vga_k++;
    end
  end

  initial begin
    logic [31:0] d;
    int n_differs, frames0;
    repeat (3) @(negedge hclk);
    rst_n = 1;
    av_write(0, {25'(NBLK), 3'd3, 4'(DL)});
    av_write(3, BASE);
    @(negedge sdram_clk); sdram_start = '1; @(negedge sdram_clk); sdram_start = '0;
    wait (sdram_init_done);
    av_write(1, 1);
    // CPU port traffic during the capture
    for (int i = 0; i < 16; i++) begin
      @(negedge cpu_clk); cpu_wr_en = 1; cpu_wr_data = 32'hC0DE_0000 + 32'(i);
    end
    @(negedge cpu_clk); cpu_wr_en = 0;
    d = 1;
    while (d[0]) begin
      repeat (500) @(negedge hclk);
      av_read(2, d);
    end
    check("STATUS", d, 32'h2);
    av_read(4, d); check("LINE", d, L);
    av_read(5, d); check("COUNT", d, L);
    check("PGA pins", cis_pga, 3);
    repeat (200) @(negedge sdram_clk);   // let the last bursts drain
    // frame contents
    n_differs = 0;
    for (int m = 1; m <= L; m++)
      for (int j = 0; j < PIX; j++)
        check("frame word", mem_word(BASE + (m - 1) * PIX + j), exp_word(m, j));
    // output lines where taking B and D from the next acquisition matters
    for (int m = 1; m <= L; m++)
      for (int j = 0; j < PIX; j++)
        if (exp_word(m, j) != {emu(3, m - 1, j), emu(2, m - 1, j), emu(1, m - 1, j), emu(0, m - 1, j)}) begin
          n_differs++;
          break;
        end
    // CPU read-back
    cpu_rd_rows = 24'd1;   // start only the CPU read port
    @(negedge sdram_clk); sdram_start = 4'b1000; @(negedge sdram_clk); sdram_start = '0;
    for (int i = 0; i < 16; i++) begin
      @(negedge cpu_clk);
      while (cpu_rd_empty) @(negedge cpu_clk);
      check("CPU read-back", cpu_rd_data, 32'hC0DE_0000 + 32'(i));
      cpu_rd_en = 1; @(negedge cpu_clk); cpu_rd_en = 0;
    end
    // one VGA frame, two frames after the capture
    frames0 = n_vsync;
    wait (n_vsync >= frames0 + 2);
    vga_check_on = 1;
    wait (vga_checked);
    check("VGA pixels in one frame", vga_pix_checks, H_ACTIVE * V_ACTIVE);
    check("SDRAM protocol errors", sdram.errors, 0);
    // mechanisms
    $display("mechanisms: config=%0d eol=%0d eof=%0d deinterleave_lines=%0d fifo_buffered=%0d wr_bursts=%0d rd_bursts=%0d refresh=%0d vsync=%0d underflow=%0d",
             n_config, n_eol, n_eof, n_differs, n_fifo_buffered, sdram.n_writes, sdram.n_reads,
             sdram.n_refresh, n_vsync, vga_underflow);
    check("configuration cycles", n_config, 1);
    check("EOL packets", n_eol, L - 1);
    check("EOF packets", n_eof, 1);
    checks++; if (n_differs == 0) begin failures++; $display("FAIL de-interleave never changed data"); end
    checks++; if (n_fifo_buffered == 0) begin failures++; $display("FAIL FIFO RAM never buffered"); end
    checks++; if (sdram.n_writes < L * PIX / 8) begin failures++; $display("FAIL too few write bursts"); end
    checks++; if (sdram.n_reads == 0) begin failures++; $display("FAIL no read bursts"); end
    checks++; if (sdram.n_refresh == 0) begin failures++; $display("FAIL no refresh"); end
    checks++; if (n_vsync < 2) begin failures++; $display("FAIL no VGA frames"); end
    check("VGA underflow", vga_underflow, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

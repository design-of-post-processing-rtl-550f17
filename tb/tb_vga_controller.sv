// tb_vga_controller: checks VGA timing and the pixel path.
// Reduced mode (16x6 visible, small porches) for two frames, then the default
// 800x600 at 60 Hz mode for one frame. An independent model computes, for
// every cycle, where the beam is; the testbench checks HSYNC, VSYNC and
// BLANK_N (two cycles behind the counters), read_en (one request per visible
// pixel), that the colour outputs carry the value the testbench supplied one
// cycle after the matching read_en and are zero in blanking, and the frame
// length in cycles.
module tb_vga_controller;
  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset acts at once
  always #5 clk = ~clk;

  // small mode
  localparam int HA = 16, HF = 2, HS = 3, HB = 4, VA = 6, VF = 1, VS = 2, VB = 3;
  logic [29:0] rgb_s;
  logic re_s, fs_s, hs_s, vs_s, bl_s, sy_s;
  logic [9:0] r_s, g_s, b_s;
  vga_controller #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
                   .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut_s (
    .vga_clk(clk), .rst_n, .rgb_in(rgb_s), .read_en(re_s), .frame_start(fs_s),
    .vga_hsync(hs_s), .vga_vsync(vs_s), .vga_blank_n(bl_s), .vga_sync_n(sy_s),
    .vga_r(r_s), .vga_g(g_s), .vga_b(b_s)
  );

  // default mode
  logic [29:0] rgb_d;
  logic re_d, fs_d, hs_d, vs_d, bl_d, sy_d;
  logic [9:0] r_d, g_d, b_d;
  vga_controller dut_d (
    .vga_clk(clk), .rst_n, .rgb_in(rgb_d), .read_en(re_d), .frame_start(fs_d),
    .vga_hsync(hs_d), .vga_vsync(vs_d), .vga_blank_n(bl_d), .vga_sync_n(sy_d),
    .vga_r(r_d), .vga_g(g_d), .vga_b(b_d)
  );

  // pixel sources: value = number of the request, presented one cycle later
  int req_s = 0, req_d = 0;
  always @(posedge clk) begin
    if (re_s && rst_n) begin rgb_s <= 30'(req_s * 3 + 1); req_s <= req_s + 1; end
    else rgb_s <= 30'h3FFF_FFFF;
    if (re_d && rst_n) begin rgb_d <= 30'(req_d * 5 + 2); req_d <= req_d + 1; end
    else rgb_d <= 30'h3FFF_FFFF;
  end

  initial begin
    int n, fs_count, req_frame;
    int HT, VT, HTD, VTD;
    HT = HA + HF + HS + HB; VT = VA + VF + VS + VB;
    HTD = 1056; VTD = 628;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // counter position of cycle n (cycle 0 = first cycle after reset release)
    n = 0; fs_count = 0; req_frame = 0;
    while (n < HTD * VTD + 4) begin
      @(negedge clk);
      if (n < 2 * HT * VT) begin
        int h, v, h2, v2, k2;
        h = n % HT; v = (n / HT) % VT;
        check("read_en", re_s, h < HA && v < VA);
        if (n >= 2) begin
          h2 = (n - 2) % HT; v2 = ((n - 2) / HT) % VT;
          check("hsync", hs_s, h2 >= HA + HF && h2 < HA + HF + HS);
          check("vsync", vs_s, v2 >= VA + VF && v2 < VA + VF + VS);
          check("blank_n", bl_s, h2 < HA && v2 < VA);
          k2 = ((n - 2) / (HT * VT)) * HA * VA + v2 * HA + h2;
          if (h2 < HA && v2 < VA) begin
            if ({r_s, g_s, b_s} != 30'(k2 * 3 + 1) && failures < 3) $display("n=%0d h2=%0d v2=%0d", n, h2, v2);
            check("pixel", {r_s, g_s, b_s}, k2 * 3 + 1);
          end
          else check("blank colour", {r_s, g_s, b_s}, 0);
        end
        check("frame_start", fs_s, h == 0 && v == 0);
      end
      // default mode: sync widths, positions and pixel count per frame
      begin
        int h, v;
        h = n % HTD; v = (n / HTD) % VTD;
        if (n >= 2) begin
          int h2, v2;
          h2 = (n - 2) % HTD; v2 = ((n - 2) / HTD) % VTD;
          if (v2 == 0 || v2 == 601 || v2 == 300) begin
            check("800x600 hsync", hs_d, h2 >= 840 && h2 < 968);
            check("800x600 blank_n", bl_d, h2 < 800 && v2 < 600);
          end
          if (h2 == 0) check("800x600 vsync", vs_d, v2 >= 601 && v2 < 605);
          if (h2 == 10 && v2 == 10) check("800x600 pixel", {r_d, g_d, b_d}, (10 * 800 + 10) * 5 + 2);
        end
        if (fs_d) begin
          fs_count++;
          check("800x600 frame start position", n % (HTD * VTD), 0);
        end
      end
      if (n == HTD * VTD) req_frame = req_d;
      n++;
    end
    check("800x600 requests per frame", req_frame, 800 * 600);
    check("frame starts", fs_count, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

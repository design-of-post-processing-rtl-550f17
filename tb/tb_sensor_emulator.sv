// tb_sensor_emulator: checks the sensor emulator at its default size
// (four 704-pixel sensors, 704x704 pattern, fourfold repetition, latency 247).
// Strobes every 1000 cycles for 10 lines, then a sensor reset and 2 more
// lines. For every cycle PDATA is compared with the expected value: zero
// outside the readout window, and during it, for sensor s and pixel j of
// output line r, 8'hFF or 8'h00 from pattern pixel (s*176 + j/4, r/4),
// evaluated with the pattern formula (black when (x/64 + y/48) is odd or
// |x - y| < 8). Line numbers restart at 0 after the sensor reset.
module tb_sensor_emulator;
  localparam int PIX = 704, LAT = 247, LP = 1000;
  logic clk = 0, rst_n = 1, cis_reset = 1, strobe = 0;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset acts at once
  logic [31:0] pdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sensor_emulator dut (.clk, .rst_n, .cis_reset, .strobe, .pdata);

  function automatic logic pat(int x, int y);
    int d;
    d = (x > y) ? x - y : y - x;
    return !(((x / 64 + y / 48) % 2) == 1 || d < 8);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic line(int r);
    // strobe cycle, then cycles 1 .. LP-1
    @(negedge clk); strobe = 1;
    @(negedge clk); strobe = 0;
    for (int c = 1; c < LP; c++) begin
      logic [31:0] exp;
      exp = '0;
      if (c >= LAT && c < LAT + PIX)
        for (int s = 0; s < 4; s++)
          exp[8*s +: 8] = pat(s * (PIX / 4) + (c - LAT) / 4, r / 4) ? 8'hFF : 8'h00;
      #1 check("pdata", pdata, exp);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); cis_reset = 0;
    for (int r = 0; r < 10; r++) line(r);
    @(negedge clk); cis_reset = 1;
    @(negedge clk); cis_reset = 0;
    for (int r = 0; r < 2; r++) line(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

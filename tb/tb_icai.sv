// tb_icai: self-checking testbench of the ICAI chip.
//
// A behavioural sensor array answers every STROBE with one line: sensor s,
// pixel j of acquisition n carries f(s, n, j) = (61*s + 7*n + 3*j + 1) mod 256,
// LAT = DATA_START + DL cycles after the strobe cycle. The testbench writes a
// configuration word, holds the read-image state and checks every packet
// word: output line m must carry A and C of acquisition m and B and D of
// acquisition m+1, then the index m, then EOL (EOF on the last line). It also
// checks the timing: first HREADY at 3*LINE_PERIOD + DATA_START + DL cycles
// after the read state starts, PIX+2 words per packet, one packet per period,
// the PGA pins and that nothing is sent after the last line.
// Runs at reduced size (PIX = 16, LINE_PERIOD = 64) twice: N = 1, DL = 3 and
// N = 2, DL = 0.
module tb_icai;
  import icai_pkg::*;

  localparam int PIX = 16, LP = 64, DS = 20;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset acts at once
  logic hsel = 0, htrans = 0, hwrite = 0, hready;
  logic [31:0] hwdata = '0, hrdata, pdata;
  logic cis_reset, strobe;
  logic [2:0] pga;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  icai #(.PIX(PIX), .LINE_PERIOD(LP), .DATA_START(DS)) dut (
    .hclk(clk), .hresetn(rst_n), .hsel, .htrans, .hwrite, .hwdata, .hready, .hrdata,
    .cis_reset, .pga, .strobe, .pdata
  );

  function automatic logic [7:0] f(int s, int n, int j);
    return 8'((61 * s + 7 * n + 3 * j + 1) % 256);
  endfunction

  // Behavioural sensor array.
  int n_acq = 0, c = 0, lat = DS;
  always @(posedge clk) begin
    if (strobe) begin n_acq <= n_acq + 1; c <= 1; end
    else c <= c + 1;
  end
  always_comb begin
    pdata = '0;
    if (c >= lat && c < lat + PIX)
      for (int s = 0; s < 4; s++) pdata[8*s +: 8] = f(s, n_acq, c - lat);
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run(int nblk, int dl, int pg);
    int cyc, words, lines, first;
    logic [31:0] exp;
    lat = DS + dl;
    // configuration cycle
    @(negedge clk);
    hsel = 1; htrans = 1; hwrite = 1;
    hwdata = {25'(nblk), 3'(pg), 4'(dl)};
    @(negedge clk);
    hwrite = 0; hwdata = '0;          // read image
    cyc = 0; words = 0; lines = 0; first = -1;
    while (cyc < (nblk * PIX + 5) * LP) begin
      @(posedge clk);
      if (cyc == 2 * LP) check("pga pins", pga, pg);
      if (cyc == LP / 2) check("sensor reset in config period", cis_reset, 1);
      if (cyc == 2 * LP - 1) check("sensor reset released", cis_reset, 0);
      if (hready) begin
        int m, j;
        if (first < 0) begin
          first = cyc;
          check("first data cycle", cyc, 3 * LP + DS + dl);
        end
        m = lines + 1;
        j = words;
        // each packet must start LP cycles after the previous one
        if (j == 0) check("packet start", cyc - first, lines * LP);
        if (j < PIX) begin
          exp = {f(3, m + 1, j), f(2, m, j), f(1, m + 1, j), f(0, m, j)};
          check("pixel word", hrdata, exp);
        end else if (j == PIX) begin
          check("line index", hrdata, m);
        end else begin
          check("end symbol", hrdata, (m == nblk * PIX) ? SYM_EOF : SYM_EOL);
        end
        words++;
        if (words == PIX + 2) begin words = 0; lines++; end
      end
      cyc++;
    end
    check("lines sent", lines, nblk * PIX);
    check("no partial packet", words, 0);
    // back to idle
    @(negedge clk);
    htrans = 0; hwrite = 1;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    hsel = 1; hwrite = 1;   // idle
    @(negedge clk);
    n_acq = 0;
    run(1, 3, 5);
    n_acq = 0;
    run(2, 0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

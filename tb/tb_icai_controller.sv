// tb_icai_controller: drives the ICAI controller through its Avalon slave
// against the ICAI chip and a behavioural sensor array (reduced size: PIX = 16,
// LINE_PERIOD = 64, one 16-line block, DL = 1).
// The CPU side writes CONFIG and ADDRESS, starts a capture and polls STATUS;
// the testbench pops the FIFO RAM (stalling now and then) and checks every
// pixel word against the de-interleaved sensor data, then checks STATUS
// (done, no overflow, no symbol error), LINE and COUNT.
module tb_icai_controller;
  localparam int PIX = 16, LP = 64, DS = 20, DL = 1, L = PIX;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset acts at once
  logic [2:0] avs_address = 0;
  logic avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic hresetn, hsel, htrans, hwrite, hready, fifo_rd_en = 0, fifo_empty;
  logic capture_start, capture_done, cis_reset, strobe;
  logic [31:0] hwdata, hrdata, fifo_rdata, frame_addr, pdata;
  logic [2:0] pga;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  icai_controller #(.PIX(PIX), .FIFO_DEPTH(64)) dut (
    .clk, .rst_n, .avs_address, .avs_chipselect, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata, .hresetn, .hsel, .htrans, .hwrite, .hwdata, .hready, .hrdata,
    .fifo_rd_en, .fifo_rdata, .fifo_empty, .frame_addr, .capture_start, .capture_done
  );

  icai #(.PIX(PIX), .LINE_PERIOD(LP), .DATA_START(DS)) chip (
    .hclk(clk), .hresetn, .hsel, .htrans, .hwrite, .hwdata, .hready, .hrdata,
    .cis_reset, .pga, .strobe, .pdata
  );

  function automatic logic [7:0] f(int s, int n, int j);
    return 8'((61 * s + 7 * n + 3 * j + 1) % 256);
  endfunction
  int n_acq = 0, c = 0;
  always @(posedge clk) begin
    if (cis_reset) n_acq <= 0;
    if (strobe) begin n_acq <= n_acq + 1; c <= 1; end
    else c <= c + 1;
  end
  always_comb begin
    pdata = '0;
    if (c >= DS + DL && c < DS + DL + PIX)
      for (int s = 0; s < 4; s++) pdata[8*s +: 8] = f(s, n_acq, c - DS - DL);
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic av_write(int adr, logic [31:0] d);
    @(negedge clk);
    avs_address = 3'(adr); avs_writedata = d; avs_write = 1; avs_chipselect = 1;
    @(negedge clk);
    avs_write = 0; avs_chipselect = 0;
  endtask

  task automatic av_read(int adr, output logic [31:0] d);
    @(negedge clk);
    avs_address = 3'(adr); avs_read = 1; avs_chipselect = 1;
    @(negedge clk);
    d = avs_readdata;
    avs_read = 0; avs_chipselect = 0;
  endtask

  int popped = 0;
  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    av_write(0, {25'd1, 3'd4, 4'(DL)});
    av_write(3, 32'h800);
    check("frame_addr", frame_addr, 32'h800);
    av_write(1, 1);
    fork
      begin
        while (popped < L * PIX) begin
          @(negedge clk);
          fifo_rd_en = 0;
          if (!fifo_empty && $urandom_range(3) != 0) begin
            int m, j;
            m = popped / PIX + 1; j = popped % PIX;
            check("pixel word", fifo_rdata, {f(3, m + 1, j), f(2, m, j), f(1, m + 1, j), f(0, m, j)});
            fifo_rd_en = 1;
            popped++;
          end
        end
        @(negedge clk) fifo_rd_en = 0;
      end
      begin
        d = 1;
        while (d[0]) begin
          repeat (50) @(negedge clk);
          av_read(2, d);
        end
      end
    join
    check("STATUS done, no errors", d, 32'h2);
    av_read(4, d); check("LINE", d, L);
    av_read(5, d); check("COUNT", d, L);
    check("fifo empty at the end", fifo_empty, 1);
    check("ICAI left idle", {hsel, htrans, hwrite}, 3'b101);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

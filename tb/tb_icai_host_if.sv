// tb_icai_host_if: checks the ICAI host interface on its own.
// 1. Table of states: all eight HSELx/HTRANS/HWRITE combinations.
// 2. Configuration: the word present in the configuration cycle lands in the
//    three register fields.
// 3. Packets: the testbench plays the line timing (period, slot, tcnt) and a
//    line memory that returns g(addr) one cycle after the address, and checks
//    HREADY and every HRDATA word of periods 2..L+3 (L = 16): pixel words from
//    slot (p-2) mod 3, line index, EOL or EOF, nothing in periods 2 and L+3.
module tb_icai_host_if;
  import icai_pkg::*;
  localparam int PIX = 16, LP = 64, DS = 20, DL = 2, L = PIX, AW = $clog2(3 * PIX);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset acts at once
  logic hsel = 0, htrans = 0, hwrite = 0, hready, read_active, done = 0;
  logic [31:0] hwdata = 0, hrdata, rdata;
  icai_state_e state;
  icai_cfg_t cfg;
  logic [39:0] period = 0;
  logic [1:0] slot = 0;
  logic [$clog2(LP)-1:0] tcnt = 0;
  logic [AW-1:0] raddr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  icai_host_if #(.PIX(PIX), .LINE_PERIOD(LP), .DATA_START(DS)) dut (
    .hclk(clk), .hresetn(rst_n), .hsel, .htrans, .hwrite, .hwdata, .hready, .hrdata,
    .state, .cfg, .read_active, .period, .slot, .tcnt, .done, .raddr, .rdata
  );

  function automatic logic [31:0] g(int a);
    return 32'(a * 32'h01010101 + 32'h00102030);
  endfunction
  always @(posedge clk) rdata <= g(int'(raddr));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    icai_state_e exp_st [8] = '{ICAI_DISABLE, ICAI_DISABLE, ICAI_DISABLE, ICAI_DISABLE,
                                 ICAI_RESERVED, ICAI_IDLE, ICAI_READ, ICAI_CONFIG};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      {hsel, htrans, hwrite} = 3'(k);
      #1 check("state", state, exp_st[k]);
    end
    // configuration
    @(negedge clk);
    {hsel, htrans, hwrite} = 3'b111; hwdata = {25'd1, 3'd5, 4'(DL)};
    @(negedge clk);
    {hsel, htrans, hwrite} = 3'b110; hwdata = 32'hdead_beef;
    #1;
    check("rows", cfg.rows_x704, 1);
    check("pga", cfg.pga, 5);
    check("delays", cfg.sample_delays, DL);
    check("read_active", read_active, 1);
    // packets
    for (int p = 0; p <= L + 3; p++)
      for (int t = 0; t < LP; t++) begin
        int w;
        period = 40'(p); slot = 2'(p % 3); tcnt = $bits(tcnt)'(t);
        #1;
        w = t - (DS + DL);
        if (p >= 3 && p <= L + 2 && w >= 0 && w < PIX + 2) begin
          check("hready", hready, 1);
          if (w < PIX)       check("pixel", hrdata, g(((p - 2) % 3) * PIX + w));
          else if (w == PIX) check("index", hrdata, p - 2);
          else               check("symbol", hrdata, (p - 2 == L) ? SYM_EOF : SYM_EOL);
        end else begin
          check("hready low", hready, 0);
        end
        @(posedge clk);
        @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

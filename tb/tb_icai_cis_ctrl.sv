// tb_icai_cis_ctrl: checks the line timing of the CIS control logic.
// Reduced size (PIX = 16, LINE_PERIOD = 64, DATA_START = 20), N = 1 block
// (L = 16 lines), DL = 4. Checks: sensor reset in period 0 only, one strobe in
// the first cycle of each of periods 1..L+1 and none after, PIX sample cycles
// per acquisition period starting DATA_START+DL cycles in with consecutive
// indices, the slot sequence period mod 3, the PGA pins and done after
// period L+2.
module tb_icai_cis_ctrl;
  import icai_pkg::*;
  localparam int PIX = 16, LP = 64, DS = 20, DL = 4, L = PIX;
  logic clk = 0, rst_n = 1, read_active = 0;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset acts at once
  icai_cfg_t cfg;
  logic cis_reset, strobe, sample_en, done;
  logic [2:0] pga;
  logic [39:0] period;
  logic [1:0] slot;
  logic [$clog2(LP)-1:0] tcnt;
  logic [$clog2(PIX)-1:0] sample_idx;
  int checks = 0, failures = 0;
  int strobes = 0, samples_in_period = 0;

  always #5 clk = ~clk;

  icai_cis_ctrl #(.PIX(PIX), .LINE_PERIOD(LP), .DATA_START(DS)) dut (
    .clk, .rst_n, .read_active, .cfg, .cis_reset, .pga, .strobe, .period, .slot,
    .tcnt, .sample_en, .sample_idx, .done
  );

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int cyc;
    cfg = '{rows_x704: 25'd1, pga: 3'd6, sample_delays: 4'(DL)};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    read_active = 1;
    for (cyc = 0; cyc < (L + 4) * LP; cyc++) begin
      int p, t;
      @(posedge clk); #1;
      p = (cyc + 1) / LP; t = (cyc + 1) % LP;   // counters after this edge
      // outputs are registered one cycle after the counters
      if (t == 1) check("cis_reset", cis_reset, p == 0);
      if (strobe) check("sensors out of reset at strobe", cis_reset, 0);
      if (p <= L + 2) check("period", period, p);
      if (p <= L + 2) check("slot", slot, p % 3);
      check("strobe", strobe, t == 0 && p >= 1 && p <= L + 1);
      if (p >= 1 && p <= L + 1) begin
        check("sample_en", sample_en, t >= DS + DL && t < DS + DL + PIX);
        if (sample_en) check("sample_idx", sample_idx, t - DS - DL);
      end else if (p <= L + 2) check("no sample", sample_en, 0);
      if (p == L + 3 && t == 2) check("done", done, 1);
      if (p == L + 2 && t == 2) check("not yet done", done, 0);
    end
    check("pga", pga, 6);
    read_active = 0;
    @(posedge clk); #1;
    check("cleared", period, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

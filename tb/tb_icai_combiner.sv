// tb_icai_combiner: checks the slot and lane steering of the combiner.
// For periods 1..6 and random pixel indices it compares the write enables,
// addresses and data with the rule: A/C of period p go to slot p mod 3,
// B/D of period p to slot (p-1) mod 3, and B/D of period 1 are dropped.
module tb_icai_combiner;
  localparam int PIX = 16, AW = $clog2(3 * PIX);
  logic sample_en;
  logic [$clog2(PIX)-1:0] idx;
  logic [39:0] period;
  logic [1:0] slot;
  logic [31:0] pdata;
  logic we_ac, we_bd;
  logic [AW-1:0] waddr_ac, waddr_bd;
  logic [7:0] wa, wb, wc, wd;
  int checks = 0, failures = 0;

  icai_combiner #(.PIX(PIX)) dut (
    .sample_en, .sample_idx(idx), .period, .slot, .pdata, .we_ac, .waddr_ac,
    .wdata_a(wa), .wdata_c(wc), .we_bd, .waddr_bd, .wdata_b(wb), .wdata_d(wd)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int p = 1; p <= 6; p++)
      for (int k = 0; k < 8; k++) begin
        int j;
        j = $urandom_range(PIX - 1);
        sample_en = (k != 7);
        idx = $bits(idx)'(j); period = 40'(p); slot = 2'(p % 3);
        pdata = $urandom;
        #1;
        check("we_ac", we_ac, sample_en);
        check("we_bd", we_bd, sample_en && p >= 2);
        check("waddr_ac", waddr_ac, (p % 3) * PIX + j);
        if (p >= 2) check("waddr_bd", waddr_bd, ((p - 1) % 3) * PIX + j);
        check("lane A", wa, pdata[7:0]);
        check("lane B", wb, pdata[15:8]);
        check("lane C", wc, pdata[23:16]);
        check("lane D", wd, pdata[31:24]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pattern_dpram: checks both halves of the emulator's pattern memory at
// their default size (704 lines x 44 bytes). Random addresses go to both read
// ports in every cycle; each output byte, one cycle later, is compared with
// the pattern formula evaluated here: pixel (x, y) is black (0) when
// (x/64 + y/48) is odd or |x - y| < 8, else white (1); bit 7 is the leftmost.
module tb_pattern_dpram;
  localparam int LINES = 704, BPL = 44, DEPTH = LINES * BPL, AW = $clog2(DEPTH);
  logic clk = 0;
  logic [AW-1:0] a0 = 0, b0 = 0, a1 = 0, b1 = 0;
  logic [7:0] qa0, qb0, qa1, qb1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pattern_dpram #(.LINES(LINES), .BYTES_PER_LINE(BPL), .HALF(0)) m0 (.clk, .addr_a(a0), .addr_b(b0), .q_a(qa0), .q_b(qb0));
  pattern_dpram #(.LINES(LINES), .BYTES_PER_LINE(BPL), .HALF(1)) m1 (.clk, .addr_a(a1), .addr_b(b1), .q_a(qa1), .q_b(qb1));

  function automatic logic [7:0] exp_byte(int half, int addr);
    int y, bx;
    logic [7:0] v;
    y = addr / BPL; bx = half * BPL + addr % BPL;
    for (int k = 0; k < 8; k++) begin
      int x, d;
      x = bx * 8 + k; d = (x > y) ? x - y : y - x;
      v[7 - k] = !(((x / 64 + y / 48) % 2) == 1 || d < 8);
    end
    return v;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    int pa0, pb0, pa1, pb1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      pa0 = (i < 50) ? i : $urandom_range(DEPTH - 1);
      pb0 = $urandom_range(DEPTH - 1);
      pa1 = (i < 50) ? DEPTH - 1 - i : $urandom_range(DEPTH - 1);
      pb1 = $urandom_range(DEPTH - 1);
      a0 = AW'(pa0); b0 = AW'(pb0); a1 = AW'(pa1); b1 = AW'(pb1);
      @(posedge clk); #1;
      check("mem0 port a", qa0, exp_byte(0, pa0));
      check("mem0 port b", qb0, exp_byte(0, pb0));
      check("mem1 port a", qa1, exp_byte(1, pa1));
      check("mem1 port b", qb1, exp_byte(1, pb1));
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

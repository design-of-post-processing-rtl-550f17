// tb_fifo_ram: checks the FIFO RAM against a queue model with random pushes
// and pops, including full and empty behaviour (ignored write when full,
// ignored read when empty) and the occupancy count.
module tb_fifo_ram;
  localparam int W = 32, D = 16;
  logic clk = 0, rst_n = 1, wr_en = 0, rd_en = 0, full, empty;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset acts at once
  logic [W-1:0] wdata = 0, rdata;
  logic [$clog2(D):0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, saw_full = 0, saw_empty = 0;

  always #5 clk = ~clk;

  fifo_ram #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wdata, .rd_en, .rdata, .full, .empty, .count);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int bias;
      bias = (i / 200) % 2 ? 70 : 30;       // phases that fill and drain
      @(negedge clk);
      wr_en = ($urandom_range(99) < bias);
      rd_en = ($urandom_range(99) < 100 - bias);
      wdata = $urandom;
      #1;
      check("count", count, q.size());
      check("full", full, q.size() == D);
      check("empty", empty, q.size() == 0);
      if (q.size() > 0) check("head", rdata, q[0]);
      if (full) saw_full++;
      if (empty) saw_empty++;
      @(posedge clk);
      begin
        bit do_rd, do_wr;
        do_rd = rd_en && q.size() > 0;
        do_wr = wr_en && q.size() < D;
        if (do_rd) void'(q.pop_front());
        if (do_wr) q.push_back(wdata);
      end
    end
    checks++; if (saw_full == 0 || saw_empty == 0) failures++;
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

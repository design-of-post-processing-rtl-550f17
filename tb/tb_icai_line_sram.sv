// tb_icai_line_sram: checks the banked line memory of the ICAI combiner.
// Writes random A/C and B/D halves through the two write ports (in the same
// cycle, to different addresses), reads every word back and compares it with
// a reference array; also checks the one-cycle read latency.
module tb_icai_line_sram;
  localparam int PIX = 16, DEPTH = 3 * PIX, AW = $clog2(DEPTH);
  logic clk = 0;
  logic we_ac = 0, we_bd = 0;
  logic [AW-1:0] waddr_ac = '0, waddr_bd = '0, raddr = '0;
  logic [7:0] a = 0, b = 0, c = 0, d = 0;
  logic [31:0] rdata;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  icai_line_sram #(.PIX(PIX)) dut (
    .clk, .we_ac, .waddr_ac, .wdata_a(a), .wdata_c(c), .we_bd, .waddr_bd,
    .wdata_b(b), .wdata_d(d), .raddr, .rdata
  );

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we_ac = 1; waddr_ac = AW'(i); a = 8'($urandom); c = 8'($urandom);
      we_bd = 1; waddr_bd = AW'(DEPTH - 1 - i); b = 8'($urandom); d = 8'($urandom);
      ref_mem[i][7:0] = a;  ref_mem[i][23:16] = c;
      ref_mem[DEPTH-1-i][15:8] = b; ref_mem[DEPTH-1-i][31:24] = d;
    end
    @(negedge clk);
    we_ac = 0; we_bd = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = AW'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", i, rdata, ref_mem[i]);
      end
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

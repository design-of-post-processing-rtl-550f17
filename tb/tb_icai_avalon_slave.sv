// tb_icai_avalon_slave: checks the Avalon-MM slave of the ICAI controller.
// Writes follow the no-wait write protocol (address, writedata, write and
// chipselect for one cycle); reads hold read and chipselect for two cycles
// and take readdata in the second (one wait cycle). Checks every register of
// the map, the one-cycle start pulse, and that writes without chipselect are
// ignored.
module tb_icai_avalon_slave;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset acts at once
  logic [2:0] address = 0;
  logic chipselect = 0, read = 0, write = 0;
  logic [31:0] writedata = 0, readdata, cfg_word, frame_addr;
  logic start;
  logic busy = 1, done = 0, overflow = 1, sym_err = 0;
  logic [31:0] last_line = 32'd704, line_count = 32'd77;
  int checks = 0, failures = 0, starts = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  icai_avalon_slave dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic av_write(int adr, logic [31:0] d, bit cs = 1);
    @(negedge clk);
    address = 3'(adr); writedata = d; write = 1; chipselect = cs;
    @(negedge clk);
    write = 0; chipselect = 0;
  endtask

  task automatic av_read(int adr, output logic [31:0] d);
    @(negedge clk);
    address = 3'(adr); read = 1; chipselect = 1;
    @(negedge clk);          // wait cycle
    d = readdata;
    read = 0; chipselect = 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    av_write(0, 32'h0000_0153);
    check("cfg_word", cfg_word, 32'h0000_0153);
    av_write(3, 32'h0001_2340);
    check("frame_addr", frame_addr, 32'h0001_2340);
    av_write(3, 32'hFFFF_FFFF, 0);
    check("write without chipselect ignored", frame_addr, 32'h0001_2340);
    av_read(0, d); check("read CONFIG", d, 32'h0000_0153);
    av_read(3, d); check("read ADDRESS", d, 32'h0001_2340);
    av_read(2, d); check("read STATUS", d, 32'h5);
    av_read(4, d); check("read LINE", d, 704);
    av_read(5, d); check("read COUNT", d, 77);
    av_read(1, d); check("read CONTROL", d, 0);
    check("no start yet", starts, 0);
    av_write(1, 32'h1);
    @(negedge clk);
    check("one start pulse", starts, 1);
    av_write(1, 32'h0);
    @(negedge clk);
    check("start bit 0 only", starts, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_icai_ctrl_logic: checks the ICAI controller logic block.
// After a start pulse the ICAI pins must go through select (HSELx=1, idle),
// one configuration cycle with the configuration word on HWDATA, and the
// read-image state. The testbench then plays the ICAI: three packets of
// PIX = 8 pixel words, line index and EOL/EOL/EOF, with gaps. Checked: every
// pixel word is pushed into the FIFO in order and nothing else is, last line
// index, packet count, done/busy, return to idle after EOF. A second run
// holds fifo_full during one word (overflow flag) and sends a bad symbol
// (sym_err flag).
module tb_icai_ctrl_logic;
  import icai_pkg::*;
  localparam int PIX = 8;
  logic clk = 0, rst_n = 1, start = 0, hready = 0, fifo_full = 0;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset acts at once
  logic [31:0] cfg_word = 32'h0000_0153, hrdata = 0;
  logic hresetn, hsel, htrans, hwrite, fifo_we, busy, done, overflow, sym_err;
  logic [31:0] hwdata, fifo_wdata, last_line, line_count;
  logic [31:0] pushed [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  icai_ctrl_logic #(.PIX(PIX)) dut (
    .clk, .rst_n, .start, .cfg_word, .hresetn, .hsel, .htrans, .hwrite, .hwdata,
    .hready, .hrdata, .fifo_we, .fifo_wdata, .fifo_full, .busy, .done, .overflow,
    .sym_err, .last_line, .line_count
  );

  always @(posedge clk) if (fifo_we) pushed.push_back(fifo_wdata);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic send_packet(int line, logic [31:0] sym, int full_at);
    for (int w = 0; w < PIX + 2; w++) begin
      @(negedge clk);
      hready = 1;
      fifo_full = (w == full_at);
      hrdata = (w < PIX) ? 32'(line * 256 + w) : (w == PIX) ? 32'(line) : sym;
    end
    @(negedge clk);
    hready = 0; fifo_full = 0; hrdata = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("hresetn", hresetn, 1);
    check("off", hsel, 0);
    start = 1; @(negedge clk); start = 0;
    check("select", {hsel, htrans, hwrite}, 3'b101);
    check("busy", busy, 1);
    @(negedge clk);
    check("configure", {hsel, htrans, hwrite}, 3'b111);
    check("config word", hwdata, cfg_word);
    @(negedge clk);
    check("read image", {hsel, htrans, hwrite}, 3'b110);
    repeat (4) @(negedge clk);
    send_packet(1, SYM_EOL, -1);
    send_packet(2, SYM_EOL, -1);
    check("not done before EOF", done, 0);
    send_packet(3, SYM_EOF, -1);
    check("done", done, 1);
    check("idle after EOF", {hsel, htrans, hwrite}, 3'b101);
    check("busy cleared", busy, 0);
    check("last line", last_line, 3);
    check("packets", line_count, 3);
    check("pushed words", pushed.size(), 3 * PIX);
    for (int i = 0; i < pushed.size(); i++)
      check("pushed data", pushed[i], (i / PIX + 1) * 256 + i % PIX);
    check("no overflow", overflow, 0);
    check("no symbol error", sym_err, 0);
    // second run: overflow and bad symbol
    start = 1; @(negedge clk); start = 0;
    repeat (2) @(negedge clk);
    send_packet(1, 32'h1234_5678, 3);
    check("overflow", overflow, 1);
    check("symbol error", sym_err, 1);
    check("still reading", {hsel, htrans, hwrite}, 3'b110);
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

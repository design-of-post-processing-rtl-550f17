// tb_multiport_sdram_ctrl: checks the multi-port SDRAM controller against a
// behavioural SDRAM.
// Four clocks (SDRAM 100 MHz, write port 0 at 8 MHz, read port 0 at 40 MHz,
// CPU ports at 50 MHz). Write port 0 streams a 2-D window (3 lines of 24
// words, pitch 40) while write port 1 streams a 1-D block elsewhere; after a
// second start enables the read ports (zero-line windows before), which read
// the same windows back and every word is
// compared with the data written. Also checked: no SDRAM protocol errors,
// refreshes issued, init_done after the power-up sequence, the read data
// ordering across a window wrap.
module tb_multiport_sdram_ctrl;
  localparam int DW = 32, AW = 24, BL = 8;
  logic sclk = 0, c0 = 0, c1 = 0, v0 = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset acts at once
  logic [3:0] start = '0;
  logic [1:0] wr_en = 0, wr_full, rd_en = 0, rd_empty;
  logic [1:0][DW-1:0] wr_data = '0, rd_data;
  logic [1:0][AW-1:0] wr_base, wr_rw, wr_pitch, wr_rows, rd_base, rd_rw, rd_pitch, rd_rows;
  logic init_done, cke, cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba;
  logic [12:0] a;
  logic [3:0] dqm;
  logic [31:0] dq_out, dq_in;
  int checks = 0, failures = 0;

  always #5 sclk = ~sclk;
  always #62 c0 = ~c0;   // ~8 MHz
  always #12 v0 = ~v0;   // ~40 MHz
  always #10 c1 = ~c1;   // 50 MHz

  multiport_sdram_ctrl #(.T_INIT(100), .REF_PERIOD(300), .FIFO_DEPTH(64)) dut (
    .sdram_clk(sclk), .rst_n, .start,
    .wr_clk({c1, c0}), .wr_en, .wr_data, .wr_full, .wr_base, .wr_row_words(wr_rw),
    .wr_pitch, .wr_rows, .rd_clk({c1, v0}), .rd_en, .rd_data, .rd_empty, .rd_base,
    .rd_row_words(rd_rw), .rd_pitch, .rd_rows, .init_done,
    .sdram_cke(cke), .sdram_cs_n(cs_n), .sdram_ras_n(ras_n), .sdram_cas_n(cas_n),
    .sdram_we_n(we_n), .sdram_ba(ba), .sdram_a(a), .sdram_dqm(dqm),
    .sdram_dq_out(dq_out), .sdram_dq_oe(dq_oe), .sdram_dq_in(dq_in)
  );

  sdram_model #(.MAX_REF_GAP(400)) mem (
    .clk(sclk), .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a,
    .dq_from_ctrl(dq_out), .dq_oe, .dq_to_ctrl(dq_in)
  );

  function automatic logic [31:0] d0(int i); return 32'hA000_0000 + 32'(i * 7); endfunction
  function automatic logic [31:0] d1(int i); return 32'h5000_0000 + 32'(i * 13); endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  localparam int N0 = 3 * 24, N1 = 64;

  initial begin
    wr_base  = {AW'(4096), AW'(1024)};
    wr_rw    = {AW'(N1),   AW'(24)};
    wr_pitch = {AW'(N1),   AW'(40)};
    wr_rows  = {AW'(1),    AW'(3)};
    rd_base  = wr_base; rd_rw = wr_rw; rd_pitch = wr_pitch; rd_rows = '0;
    repeat (3) @(posedge sclk);
    rst_n = 1;
    @(negedge sclk); start = '1; @(negedge sclk); start = '0;
    wait (init_done);
    check("refresh/mode before traffic", mem.mode_set, 1);
    fork
      for (int i = 0; i < N0; i++) begin
        @(negedge c0);
        while (wr_full[0]) @(negedge c0);
        wr_en[0] = 1; wr_data[0] = d0(i);
        @(negedge c0); wr_en[0] = 0;
      end
      for (int i = 0; i < N1; i++) begin
        @(negedge c1);
        while (wr_full[1]) @(negedge c1);
        wr_en[1] = 1; wr_data[1] = d1(i);
        @(negedge c1); wr_en[1] = 0;
      end
    join
    repeat (200) @(posedge sclk);
    // the written words must be in the SDRAM at the window addresses
    for (int i = 0; i < N0; i++)
      check("sdram content port0", mem.mem.exists(1024 + (i / 24) * 40 + i % 24) ?
            mem.mem[1024 + (i / 24) * 40 + i % 24] : 0, d0(i));
    for (int i = 0; i < N1; i++)
      check("sdram content port1", mem.mem.exists(4096 + i) ? mem.mem[4096 + i] : 0, d1(i));
    // enable the read ports (zero-line windows so far) and read back
    // (only the read ports are reloaded)
    rd_rows = wr_rows;
    @(negedge sclk); start = 4'b1100; @(negedge sclk); start = '0;
    // FIFOs now fill from the window bases
    fork
      for (int i = 0; i < 2 * N0; i++) begin   // two passes: checks the wrap
        @(negedge v0);
        while (rd_empty[0]) @(negedge v0);
        check("read port 0", rd_data[0], d0(i % N0));
        rd_en[0] = 1; @(negedge v0); rd_en[0] = 0;
      end
      for (int i = 0; i < N1; i++) begin
        @(negedge c1);
        while (rd_empty[1]) @(negedge c1);
        check("read port 1", rd_data[1], d1(i));
        rd_en[1] = 1; @(negedge c1); rd_en[1] = 0;
      end
    join
    check("sdram protocol errors", mem.errors, 0);
    checks++; if (mem.n_refresh < 3) begin failures++; $display("FAIL few refreshes"); end
    $display("writes %0d reads %0d refreshes %0d", mem.n_writes, mem.n_reads, mem.n_refresh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge sclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

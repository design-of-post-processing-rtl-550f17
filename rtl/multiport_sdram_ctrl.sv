// multiport_sdram_ctrl: SDRAM frame-buffer controller with two write ports
// and two read ports.
//
// Every port is a dual-clock FIFO, so each client runs on its own clock:
// write port 0 takes pixel words from the ICAI controller, read port 0 feeds
// the VGA controller, write port 1 and read port 1 are for the CPU. Each port
// has an address sequencer (sdram_addr_gen) that walks a window of the SDRAM:
// base, words per line, line pitch and number of lines; a port whose window
// has zero lines is switched off.
//
// Operation (all on sdram_clk):
//   * start is one pulse bit per port, {read 1, read 0, write 1, write 0}: a
//     pulse samples that port's window registers and restarts its sequencer
//     at the window base, leaving the other ports running. The first pulse
//     on any bit also runs the SDRAM power-up sequence: T_INIT cycles of NOP, PRECHARGE
//     ALL, two AUTO REFRESH, LOAD MODE (burst length BL, sequential, CAS
//     latency CL).
//   * Then the controller serves one burst at a time. A write port is ready
//     when its FIFO holds at least BL words, a read port when its FIFO has room
//     for BL words. Priority: refresh (every REF_PERIOD cycles), read port 0
//     (display), write port 0 (capture), read port 1, write port 1.
//   * A burst is ACTIVE, T_RCD cycles later WRITE or READ with auto
//     precharge, BL data beats, then a wait for write recovery and precharge.
// Timing on the pins: commands and write data are registered, read data is
// taken from dq_in CL+1 cycles after the READ command is registered.
// Word address = {bank, row, column}.
// The two-write/two-read port structure, the role of each port and the start
// pulse follow the original design; the SDRAM geometry, timings, burst length,
// arbitration order and FIFO ports are this design's choices.
module multiport_sdram_ctrl #(
  parameter int unsigned DW         = 32,
  parameter int unsigned BA_W       = 2,
  parameter int unsigned ROW_W      = 13,
  parameter int unsigned COL_W      = 9,
  parameter int unsigned BL         = 8,
  parameter int unsigned CL         = 2,
  parameter int unsigned T_RCD      = 2,
  parameter int unsigned T_RP       = 2,
  parameter int unsigned T_RFC      = 7,
  parameter int unsigned T_WR       = 2,
  parameter int unsigned T_MRD      = 2,
  parameter int unsigned T_INIT     = 10000,
  parameter int unsigned REF_PERIOD = 750,
  parameter int unsigned FIFO_DEPTH = 512,
  localparam int unsigned AW        = BA_W + ROW_W + COL_W,
  localparam int unsigned FW        = $clog2(FIFO_DEPTH)
) (
  input  logic                      sdram_clk,
  input  logic                      rst_n,
  input  logic [3:0]                start,
  // write ports (0: capture, 1: CPU)
  input  logic [1:0]                wr_clk,
  input  logic [1:0]                wr_en,
  input  logic [1:0][DW-1:0]        wr_data,
  output logic [1:0]                wr_full,
  input  logic [1:0][AW-1:0]        wr_base,
  input  logic [1:0][AW-1:0]        wr_row_words,
  input  logic [1:0][AW-1:0]        wr_pitch,
  input  logic [1:0][AW-1:0]        wr_rows,
  // read ports (0: display, 1: CPU)
  input  logic [1:0]                rd_clk,
  input  logic [1:0]                rd_en,
  output logic [1:0][DW-1:0]        rd_data,
  output logic [1:0]                rd_empty,
  input  logic [1:0][AW-1:0]        rd_base,
  input  logic [1:0][AW-1:0]        rd_row_words,
  input  logic [1:0][AW-1:0]        rd_pitch,
  input  logic [1:0][AW-1:0]        rd_rows,
  // status
  output logic                      init_done,
  // SDRAM pins
  output logic                      sdram_cke,
  output logic                      sdram_cs_n,
  output logic                      sdram_ras_n,
  output logic                      sdram_cas_n,
  output logic                      sdram_we_n,
  output logic [BA_W-1:0]           sdram_ba,
  output logic [ROW_W-1:0]          sdram_a,
  output logic [DW/8-1:0]           sdram_dqm,
  output logic [DW-1:0]             sdram_dq_out,
  output logic                      sdram_dq_oe,
  input  logic [DW-1:0]             sdram_dq_in
);

  // {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    CMD_NOP   = 4'b0111,
    CMD_ACT   = 4'b0011,
    CMD_READ  = 4'b0101,
    CMD_WRITE = 4'b0100,
    CMD_PRE   = 4'b0010,
    CMD_REF   = 4'b0001,
    CMD_MRS   = 4'b0000
  } sdram_cmd_e;

  typedef enum logic [3:0] {
    S_OFF, S_INIT, S_PRE, S_REF1, S_REF2, S_MRS, S_IDLE, S_ACTW, S_WR, S_RD, S_WAIT
  } st_e;

  // ---------------------------------------------------------------- port FIFOs
  logic [1:0][DW-1:0] wf_rdata;
  logic [1:0][FW:0]   wf_rcount, rf_wcount;
  logic [1:0]         wf_pop, rf_push, wf_empty_unused, rf_full_unused;
  logic [1:0][FW:0]   wf_wcount_unused, rf_rcount_unused;

  for (genvar i = 0; i < 2; i++) begin : g_port
    async_fifo #(.WIDTH(DW), .DEPTH(FIFO_DEPTH)) u_wf (
      .rst_n, .wclk(wr_clk[i]), .we(wr_en[i]), .wdata(wr_data[i]), .wfull(wr_full[i]),
      .wcount(wf_wcount_unused[i]), .rclk(sdram_clk), .re(wf_pop[i]), .rdata(wf_rdata[i]),
      .rempty(wf_empty_unused[i]), .rcount(wf_rcount[i])
    );
    async_fifo #(.WIDTH(DW), .DEPTH(FIFO_DEPTH)) u_rf (
      .rst_n, .wclk(sdram_clk), .we(rf_push[i]), .wdata(sdram_dq_in), .wfull(rf_full_unused[i]),
      .wcount(rf_wcount[i]), .rclk(rd_clk[i]), .re(rd_en[i]), .rdata(rd_data[i]),
      .rempty(rd_empty[i]), .rcount(rf_rcount_unused[i])
    );
  end

  // ------------------------------------------------------- address sequencers
  // index 0,1: write ports; 2,3: read ports
  logic [3:0]         adv;
  logic [3:0][AW-1:0] paddr;
  logic [3:0]         pen;

  for (genvar i = 0; i < 2; i++) begin : g_gen
    sdram_addr_gen #(.AW(AW), .BL(BL)) u_wgen (
      .clk(sdram_clk), .rst_n, .load(start[i]), .base(wr_base[i]), .row_words(wr_row_words[i]),
      .pitch(wr_pitch[i]), .rows(wr_rows[i]), .advance(adv[i]), .addr(paddr[i]), .enabled(pen[i])
    );
    sdram_addr_gen #(.AW(AW), .BL(BL)) u_rgen (
      .clk(sdram_clk), .rst_n, .load(start[2+i]), .base(rd_base[i]), .row_words(rd_row_words[i]),
      .pitch(rd_pitch[i]), .rows(rd_rows[i]), .advance(adv[2+i]), .addr(paddr[2+i]), .enabled(pen[2+i])
    );
  end

  // --------------------------------------------------------------- arbitration
  logic [3:0] want;
  logic [1:0] pick;
  logic       any;

  always_comb begin
    want[0] = pen[0] && wf_rcount[0] >= (FW+1)'(BL);
    want[1] = pen[1] && wf_rcount[1] >= (FW+1)'(BL);
    want[2] = pen[2] && (FW+1)'(FIFO_DEPTH) - rf_wcount[0] >= (FW+1)'(BL);
    want[3] = pen[3] && (FW+1)'(FIFO_DEPTH) - rf_wcount[1] >= (FW+1)'(BL);
    any     = |want;
    if (want[2])      pick = 2'd2;   // display read
    else if (want[0]) pick = 2'd0;   // capture write
    else if (want[3]) pick = 2'd3;   // CPU read
    else              pick = 2'd1;   // CPU write
  end

  // ------------------------------------------------------------ control FSM
  localparam int unsigned TMR_W = $clog2(T_INIT + 1) + 1;
  localparam int unsigned RFW   = $clog2(REF_PERIOD + 1);

  st_e            st;
  sdram_cmd_e     cmd;
  logic [TMR_W-1:0] tmr;
  logic [RFW-1:0] ref_cnt;
  logic           ref_req, started;
  logic [1:0]     sel;
  logic [AW-1:0]  cur;
  logic [4:0]     beat;

  assign {sdram_cs_n, sdram_ras_n, sdram_cas_n, sdram_we_n} = cmd;
  assign sdram_dqm = '0;

  // Refresh timer.
  always_ff @(posedge sdram_clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_cnt <= '0;
      ref_req <= 1'b0;
    end else if (st == S_IDLE && ref_req) begin
      ref_cnt <= '0;
      ref_req <= 1'b0;
    end else if (init_done) begin
      if (ref_cnt == RFW'(REF_PERIOD - 1)) begin
        ref_cnt <= '0;
        ref_req <= 1'b1;
      end else begin
        ref_cnt <= ref_cnt + 1'b1;
      end
    end
  end

  // Pops of the write FIFOs: one per data beat, including the WRITE cycle.
  always_comb begin
    wf_pop = '0;
    adv    = '0;
    if ((st == S_ACTW && tmr == '0 && !sel[1]) || st == S_WR) wf_pop[sel[0]] = 1'b1;
    if (st == S_IDLE && !ref_req && any) adv[pick] = 1'b1;
  end

  // Pushes into the read FIFOs: beats arrive CL+1 cycles after READ.
  always_comb begin
    rf_push = '0;
    if (st == S_RD && beat >= 5'(CL + 1) && beat <= 5'(CL + BL)) rf_push[sel[0]] = 1'b1;
  end

  always_ff @(posedge sdram_clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_OFF;
      cmd          <= CMD_NOP;
      tmr          <= '0;
      started      <= 1'b0;
      init_done    <= 1'b0;
      sel          <= '0;
      cur          <= '0;
      beat         <= '0;
      sdram_cke    <= 1'b0;
      sdram_ba     <= '0;
      sdram_a      <= '0;
      sdram_dq_out <= '0;
      sdram_dq_oe  <= 1'b0;
    end else begin
      cmd         <= CMD_NOP;
      sdram_dq_oe <= 1'b0;
      unique case (st)
        S_OFF: if (|start && !started) begin
          started   <= 1'b1;
          sdram_cke <= 1'b1;
          tmr       <= TMR_W'(T_INIT - 1);
          st        <= S_INIT;
        end
        S_INIT: if (tmr == '0) begin
          cmd        <= CMD_PRE;
          sdram_a    <= '0;
          sdram_a[10] <= 1'b1;                // all banks
          tmr        <= TMR_W'(T_RP - 1);
          st         <= S_PRE;
        end else tmr <= tmr - 1'b1;
        S_PRE: if (tmr == '0) begin
          cmd <= CMD_REF;
          tmr <= TMR_W'(T_RFC - 1);
          st  <= S_REF1;
        end else tmr <= tmr - 1'b1;
        S_REF1: if (tmr == '0) begin
          cmd <= CMD_REF;
          tmr <= TMR_W'(T_RFC - 1);
          st  <= S_REF2;
        end else tmr <= tmr - 1'b1;
        S_REF2: if (tmr == '0) begin
          cmd      <= CMD_MRS;
          sdram_ba <= '0;
          sdram_a  <= ROW_W'({3'(CL), 1'b0, 3'($clog2(BL))});
          tmr      <= TMR_W'(T_MRD - 1);
          st       <= S_MRS;
        end else tmr <= tmr - 1'b1;
        S_MRS: if (tmr == '0) begin
          init_done <= 1'b1;
          st        <= S_IDLE;
        end else tmr <= tmr - 1'b1;
        S_IDLE: if (ref_req) begin
          cmd <= CMD_REF;
          tmr <= TMR_W'(T_RFC - 1);
          st  <= S_WAIT;
        end else if (any) begin
          sel      <= pick;
          cur      <= paddr[pick];
          cmd      <= CMD_ACT;
          sdram_ba <= paddr[pick][AW-1 -: BA_W];
          sdram_a  <= paddr[pick][COL_W +: ROW_W];
          tmr      <= TMR_W'(T_RCD - 1);
          st       <= S_ACTW;
        end
        S_ACTW: if (tmr == '0) begin
          sdram_a     <= ROW_W'(cur[COL_W-1:0]);
          sdram_a[10] <= 1'b1;                 // auto precharge
          beat        <= 5'd1;
          if (!sel[1]) begin
            cmd          <= CMD_WRITE;
            sdram_dq_out <= wf_rdata[sel[0]];
            sdram_dq_oe  <= 1'b1;
            st           <= (BL == 1) ? S_WAIT : S_WR;
            tmr          <= TMR_W'(T_WR + T_RP - 1);
          end else begin
            cmd <= CMD_READ;
            st  <= S_RD;
          end
        end else tmr <= tmr - 1'b1;
        S_WR: begin
          sdram_dq_out <= wf_rdata[sel[0]];
          sdram_dq_oe  <= 1'b1;
          beat         <= beat + 1'b1;
          if (beat == 5'(BL - 1)) begin
            tmr <= TMR_W'(T_WR + T_RP - 1);
            st  <= S_WAIT;
          end
        end
        S_RD: begin
          beat <= beat + 1'b1;
          if (beat == 5'(CL + BL)) begin
            tmr <= TMR_W'(T_RP - 1);
            st  <= S_WAIT;
          end
        end
        S_WAIT: if (tmr == '0) st <= S_IDLE;
                else tmr <= tmr - 1'b1;
        default: st <= S_OFF;
      endcase
    end
  end

  // A burst must not cross an SDRAM row.
  assert property (@(posedge sdram_clk) disable iff (!rst_n)
    (st == S_IDLE && any && !ref_req) |-> (32'(paddr[pick][COL_W-1:0]) + BL <= (1 << COL_W)));

endmodule

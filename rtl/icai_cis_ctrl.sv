// icai_cis_ctrl: CIS control logic of the ICAI.
//
// While the ICAI is in its read-image state this block divides time into
// line periods of LINE_PERIOD HCLK cycles and drives the sensor array:
//   * period 0 applies the configuration: the sensors are held in reset with
//     the programmed PGA gain on their PGA pins, and released in its last
//     cycle so that they see the first strobe;
//   * periods 1 .. L+1, with L = 704 * reg_requestedrowx704 output lines,
//     each start with a one-cycle STROBE that makes every sensor read out one
//     line, and sample PDATA for PIX cycles starting DATA_START + DL cycles
//     into the period (DL = reg_sample_delays, the PGA/ADC latency);
//   * after period L+2 (the last output period) it raises done and stops.
// One acquisition more than the number of output lines is needed because
// sensors B and D deliver line n one period after A and C.
//
// Outputs are registered except sample_en/sample_idx, which are decoded from
// the registered counters. The period length, the 247-cycle offset plus DL
// and the reset/strobe roles follow the ICAI protocol; which period resets
// the sensors and the one-cycle strobe at the start of a period are this
// design's choices. Leaving the read state clears all counters.
module icai_cis_ctrl
  import icai_pkg::*;
#(
  parameter int unsigned PIX         = 704,
  parameter int unsigned LINE_PERIOD = 1000,
  parameter int unsigned DATA_START  = 247,
  parameter int unsigned CNT_W       = 40
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            read_active,
  input  icai_cfg_t                       cfg,
  output logic                            cis_reset,
  output logic [2:0]                      pga,
  output logic                            strobe,
  output logic [CNT_W-1:0]                period,
  output logic [1:0]                      slot,     // period mod 3
  output logic [$clog2(LINE_PERIOD)-1:0]  tcnt,
  output logic                            sample_en,
  output logic [$clog2(PIX)-1:0]          sample_idx,
  output logic                            done
);

  localparam int unsigned TW = $clog2(LINE_PERIOD);

  logic [CNT_W-1:0] n_lines;      // L = 704 * requested blocks
  logic             acq_period;   // current period acquires a line
  logic [TW:0]      win_start;

  assign n_lines    = CNT_W'(cfg.rows_x704) * CNT_W'(PIX);
  assign acq_period = read_active && !done && period >= 1 && period <= n_lines + 1;
  assign win_start  = (TW+1)'(DATA_START) + (TW+1)'(cfg.sample_delays);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt   <= '0;
      period <= '0;
      slot   <= '0;
      done   <= 1'b0;
    end else if (!read_active) begin
      tcnt   <= '0;
      period <= '0;
      slot   <= '0;
      done   <= 1'b0;
    end else if (!done) begin
      if (tcnt == TW'(LINE_PERIOD - 1)) begin
        tcnt   <= '0;
        period <= period + 1'b1;
        slot   <= (slot == 2'd2) ? 2'd0 : slot + 2'd1;
        if (period >= n_lines + 2) done <= 1'b1;
      end else begin
        tcnt <= tcnt + 1'b1;
      end
    end
  end

  // Sensor pins.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cis_reset <= 1'b1;
      pga       <= '0;
      strobe    <= 1'b0;
    end else begin
      // Reset is released in the last cycle of period 0 so that the sensors
      // are out of reset when the first strobe arrives.
      cis_reset <= !read_active
                   || (period == 0 && tcnt < TW'(LINE_PERIOD - 2));
      pga       <= cfg.pga;
      // Strobe in the first cycle of every acquisition period. The counters
      // still show the previous cycle here, so look one cycle ahead.
      strobe    <= read_active && !done && tcnt == TW'(LINE_PERIOD - 1)
                   && period <= n_lines;
    end
  end

  // Sample window inside an acquisition period.
  always_comb begin
    sample_en  = acq_period && ({1'b0, tcnt} >= win_start)
                 && ({1'b0, tcnt} < win_start + (TW+1)'(PIX));
    sample_idx = $bits(sample_idx)'({1'b0, tcnt} - win_start);
  end

endmodule

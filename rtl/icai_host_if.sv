// icai_host_if: host interface of the ICAI.
//
// Decodes the ICAI state from HSELx, HTRANS and HWRITE (disable, idle,
// configuration, read image, reserved), stores the 32-bit configuration word
// written in the configuration state (sampled at the clock edge that ends the
// configuration cycle), and in the read-image state sends one packet per line
// period. Output line n = p-2 is sent in period p, for p = 3 .. L+2, so the
// first two periods after the configuration period carry no data. A packet
// starts DATA_START + DL cycles into the period and lasts PIX+2 cycles with
// HREADY high: PIX pixel words read from line-memory slot (p-2) mod 3, the line
// index n (1-based), then the EOL symbol, or EOF for the last line L.
// The line memory has one cycle of read latency, so the address is issued one
// cycle ahead of the word. HREADY and HRDATA are decoded from registered
// state. Protocol, field widths and packet layout follow the ICAI definition;
// the 1-based line index and the symbol codes are this design's choices.
module icai_host_if
  import icai_pkg::*;
#(
  parameter int unsigned PIX         = 704,
  parameter int unsigned LINE_PERIOD = 1000,
  parameter int unsigned DATA_START  = 247,
  parameter int unsigned CNT_W       = 40,
  localparam int unsigned TW         = $clog2(LINE_PERIOD),
  localparam int unsigned AW         = $clog2(PIX * 3)
) (
  input  logic             hclk,
  input  logic             hresetn,
  input  logic             hsel,
  input  logic             htrans,
  input  logic             hwrite,
  input  logic [31:0]      hwdata,
  output logic             hready,
  output logic [31:0]      hrdata,
  output icai_state_e      state,
  output icai_cfg_t        cfg,
  output logic             read_active,
  // timing from the CIS control logic
  input  logic [CNT_W-1:0] period,
  input  logic [1:0]       slot,
  input  logic [TW-1:0]    tcnt,
  input  logic             done,
  // line memory read port
  output logic [AW-1:0]    raddr,
  input  logic [31:0]      rdata
);

  logic [CNT_W-1:0] n_lines, line_no;
  logic [TW:0]      win_start, pos, pos_next;
  logic             out_period;
  logic [1:0]       rd_slot;

  assign state       = icai_decode(hsel, htrans, hwrite);
  assign read_active = (state == ICAI_READ);
  assign n_lines     = CNT_W'(cfg.rows_x704) * CNT_W'(PIX);
  assign line_no     = period - 2;
  assign out_period  = read_active && !done && period >= 3 && period <= n_lines + 2;
  assign win_start   = (TW+1)'(DATA_START) + (TW+1)'(cfg.sample_delays);
  assign pos         = {1'b0, tcnt} - win_start;          // word position in packet
  assign pos_next    = pos + 1'b1;
  assign rd_slot     = (slot == 2'd2) ? 2'd0 : slot + 2'd1; // (p-2) mod 3

  // Configuration register.
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) cfg <= '0;
    else if (state == ICAI_CONFIG) cfg <= icai_cfg_t'(hwdata);
  end

  // Line memory address for the word of the next cycle.
  always_comb begin
    logic [AW-1:0] base;
    case (rd_slot)
      2'd1:    base = AW'(PIX);
      2'd2:    base = AW'(2 * PIX);
      default: base = '0;
    endcase
    raddr = base + AW'(pos_next);
  end

  // Packet output.
  always_comb begin
    hready = out_period && {1'b0, tcnt} >= win_start
             && pos < (TW+1)'(PIX + 2);
    if (!hready)                      hrdata = '0;
    else if (pos < (TW+1)'(PIX))      hrdata = rdata;
    else if (pos == (TW+1)'(PIX))     hrdata = 32'(line_no);
    else if (line_no == n_lines)      hrdata = SYM_EOF;
    else                              hrdata = SYM_EOL;
  end

endmodule

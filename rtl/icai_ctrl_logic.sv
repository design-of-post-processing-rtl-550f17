// icai_ctrl_logic: logic block of the FPGA-side ICAI controller.
//
// Drives the ICAI host pins through the sequence the ICAI protocol asks for.
// After a start pulse it selects the chip (HSELx = 1, ICAI idle) and one clock
// later raises HTRANS and HWRITE for a single cycle while the configuration
// word is on HWDATA; it then holds the read-image state (HTRANS = 1,
// HWRITE = 0) and parses the packets the ICAI returns: every cycle with
// HREADY high carries one word, the first PIX words of a packet are pixel
// words and are pushed into the FIFO RAM, the next is the line index, the
// last is the EOL or EOF symbol. On EOF the block returns the ICAI to its
// idle state and reports done. A pixel word that finds the FIFO full is lost
// and sets the overflow flag; an unknown closing symbol sets sym_err.
// All ICAI pins are registered. HRESETn follows the controller reset.
// The one-cycle select-before-configure step follows the original design's
// simulation description; flags and counters are this design's choices.
module icai_ctrl_logic
  import icai_pkg::*;
#(
  parameter int unsigned PIX = 704
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] cfg_word,
  // ICAI pins
  output logic        hresetn,
  output logic        hsel,
  output logic        htrans,
  output logic        hwrite,
  output logic [31:0] hwdata,
  input  logic        hready,
  input  logic [31:0] hrdata,
  // FIFO RAM
  output logic        fifo_we,
  output logic [31:0] fifo_wdata,
  input  logic        fifo_full,
  // status
  output logic        busy,
  output logic        done,
  output logic        overflow,
  output logic        sym_err,
  output logic [31:0] last_line,
  output logic [31:0] line_count
);

  typedef enum logic [2:0] {S_OFF, S_SELECT, S_CONFIG, S_READ, S_FINISH} ctl_state_e;

  ctl_state_e                 st;
  logic [$clog2(PIX+2)-1:0]   wcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hresetn <= 1'b0;
    else        hresetn <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_OFF;
      hsel       <= 1'b0;
      htrans     <= 1'b0;
      hwrite     <= 1'b0;
      hwdata     <= '0;
      wcnt       <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      overflow   <= 1'b0;
      sym_err    <= 1'b0;
      last_line  <= '0;
      line_count <= '0;
    end else begin
      unique case (st)
        S_OFF, S_FINISH: if (start) begin
          st         <= S_SELECT;
          hsel       <= 1'b1;
          htrans     <= 1'b0;
          hwrite     <= 1'b1;          // idle
          busy       <= 1'b1;
          done       <= 1'b0;
          overflow   <= 1'b0;
          sym_err    <= 1'b0;
          line_count <= '0;
          wcnt       <= '0;
        end
        S_SELECT: begin
          st     <= S_CONFIG;
          htrans <= 1'b1;
          hwrite <= 1'b1;              // configuration
          hwdata <= cfg_word;
        end
        S_CONFIG: begin
          st     <= S_READ;
          hwrite <= 1'b0;              // read image
          hwdata <= '0;
        end
        S_READ: if (hready) begin
          if (wcnt == $bits(wcnt)'(PIX + 1)) begin
            wcnt       <= '0;
            line_count <= line_count + 1'b1;
            if (hrdata == SYM_EOF) begin
              st     <= S_FINISH;
              htrans <= 1'b0;
              hwrite <= 1'b1;          // back to idle
              busy   <= 1'b0;
              done   <= 1'b1;
            end else if (hrdata != SYM_EOL) begin
              sym_err <= 1'b1;
            end
          end else begin
            wcnt <= wcnt + 1'b1;
            if (wcnt == $bits(wcnt)'(PIX)) last_line <= hrdata;
            else if (fifo_full)            overflow  <= 1'b1;
          end
        end
        default: st <= S_OFF;
      endcase
    end
  end

  assign fifo_we    = (st == S_READ) && hready && wcnt < $bits(wcnt)'(PIX) && !fifo_full;
  assign fifo_wdata = hrdata;

endmodule

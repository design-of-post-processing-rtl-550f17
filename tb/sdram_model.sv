// sdram_model: behavioural model of a single-data-rate SDRAM for simulation.
//
// Decodes {cs_n, ras_n, cas_n, we_n} at each rising clock edge. Keeps the open
// row of every bank, the mode register (burst length, CAS latency) and a
// sparse word memory addressed by {bank, row, column}. WRITE takes the first
// beat in the command cycle and BL-1 more beats in the following cycles;
// READ returns beat k so that it is sampled at the (CL+k)-th edge after the
// command edge. Auto precharge (a[10]) closes the row after the burst.
// Protocol errors counted in `errors`: command to a bank without an open row,
// ACTIVE to an open bank, READ/WRITE earlier than T_RCD after ACTIVE, any
// command other than NOP before the mode register is loaded (except
// PRECHARGE and REFRESH), and refresh intervals longer than MAX_REF_GAP.
module sdram_model #(
  parameter int BA_W = 2, ROW_W = 13, COL_W = 9, DW = 32,
  parameter int T_RCD = 2, MAX_REF_GAP = 2000
) (
  input  logic             clk,
  input  logic             cke,
  input  logic             cs_n, ras_n, cas_n, we_n,
  input  logic [BA_W-1:0]  ba,
  input  logic [ROW_W-1:0] a,
  input  logic [DW-1:0]    dq_from_ctrl,
  input  logic             dq_oe,
  output logic [DW-1:0]    dq_to_ctrl
);
  logic [DW-1:0] mem [longint];
  logic [DW-1:0] rd_sched [longint];
  int   open_row [1<<BA_W];
  longint act_edge [1<<BA_W];
  longint edge_no = 0, last_ref = -1;
  int   bl = 8, cl = 2, wr_left = 0, mode_set = 0;
  longint wr_addr;
  int errors = 0, n_writes = 0, n_reads = 0, n_refresh = 0, n_act = 0;

  initial begin
    for (int i = 0; i < (1 << BA_W); i++) open_row[i] = -1;
    dq_to_ctrl = '0;
  end

  function automatic longint word_addr(int b, int r, int c);
    return (longint'(b) << (ROW_W + COL_W)) | (longint'(r) << COL_W) | longint'(c);
  endfunction

  always @(posedge clk) begin
    logic [3:0] cmd;
    edge_no++;
    cmd = {cs_n, ras_n, cas_n, we_n};
    // continuing write burst
    if (wr_left > 0) begin
      if (!dq_oe) errors++;
      mem[wr_addr] = dq_from_ctrl;
      wr_addr++;
      wr_left--;
    end
    if (cke) begin
      case (cmd)
        4'b0011: begin // ACTIVE
          if (open_row[ba] != -1) errors++;
          open_row[ba] = int'(a);
          act_edge[ba] = edge_no;
          n_act++;
        end
        4'b0100, 4'b0101: begin // WRITE / READ
          longint wa;
          if (open_row[ba] == -1 || mode_set == 0) errors++;
          if (edge_no - act_edge[ba] < T_RCD) errors++;
          wa = word_addr(int'(ba), open_row[ba], int'(a[COL_W-1:0]));
          if (cmd == 4'b0100) begin
            if (!dq_oe) errors++;
            mem[wa] = dq_from_ctrl;
            wr_addr = wa + 1;
            wr_left = bl - 1;
            n_writes++;
          end else begin
            for (int k = 0; k < bl; k++)
              rd_sched[edge_no + cl + k - 1] = mem.exists(wa + k) ? mem[wa + k] : '0;
            n_reads++;
          end
          if (a[10]) open_row[ba] = -1;
        end
        4'b0010: begin // PRECHARGE
          if (a[10]) for (int i = 0; i < (1 << BA_W); i++) open_row[i] = -1;
          else open_row[ba] = -1;
        end
        4'b0001: begin // AUTO REFRESH
          for (int i = 0; i < (1 << BA_W); i++) if (open_row[i] != -1) errors++;
          if (mode_set != 0 && last_ref >= 0 && edge_no - last_ref > MAX_REF_GAP) errors++;
          last_ref = edge_no;
          n_refresh++;
        end
        4'b0000: begin // LOAD MODE
          bl = 1 << a[2:0];
          cl = int'(a[6:4]);
          mode_set = 1;
        end
        default: ;
      endcase
    end
    if (mode_set != 0 && last_ref >= 0 && edge_no - last_ref > MAX_REF_GAP + 50) begin
      errors++;
      last_ref = edge_no;
    end
    if (rd_sched.exists(edge_no)) begin
      dq_to_ctrl <= rd_sched[edge_no];
      rd_sched.delete(edge_no);
    end
  end
endmodule

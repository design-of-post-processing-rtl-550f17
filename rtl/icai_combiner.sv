// icai_combiner: de-interleaving combiner of the ICAI.
//
// The four strip sensors sit in a staggered row: A and C one pixel pitch
// ahead of B and D along the scan direction. Lines acquired together are
// therefore not the same scene line; output line n is made of A(n), B(n+1),
// C(n) and D(n+1), where the number is the acquisition period.
// The combiner writes every sample of period p into the line memory twice:
// the A and C pixels into slot p mod 3 (starting output line p) and the B and
// D pixels into slot (p-1) mod 3 (completing output line p-1). The B and D
// pixels of period 1 belong to no complete line and are dropped.
// Memory writes happen in the same cycle as the sample (no latency).
// The rule "A1, B2, C1, D2 form one line" is the ICAI's; the slot scheme is
// this design's.
module icai_combiner #(
  parameter int unsigned PIX   = 704,
  parameter int unsigned CNT_W = 40,
  localparam int unsigned AW   = $clog2(PIX * 3)
) (
  input  logic                   sample_en,
  input  logic [$clog2(PIX)-1:0] sample_idx,
  input  logic [CNT_W-1:0]       period,
  input  logic [1:0]             slot,       // period mod 3
  input  logic [31:0]            pdata,      // {D, C, B, A}
  output logic                   we_ac,
  output logic [AW-1:0]          waddr_ac,
  output logic [7:0]             wdata_a,
  output logic [7:0]             wdata_c,
  output logic                   we_bd,
  output logic [AW-1:0]          waddr_bd,
  output logic [7:0]             wdata_b,
  output logic [7:0]             wdata_d
);

  function automatic logic [AW-1:0] slot_base(input logic [1:0] s);
    case (s)
      2'd1:    return AW'(PIX);
      2'd2:    return AW'(2 * PIX);
      default: return '0;
    endcase
  endfunction

  logic [1:0] prev_slot;
  assign prev_slot = (slot == 2'd0) ? 2'd2 : slot - 2'd1;

  always_comb begin
    we_ac    = sample_en;
    waddr_ac = slot_base(slot) + AW'(sample_idx);
    wdata_a  = pdata[7:0];
    wdata_c  = pdata[23:16];
    we_bd    = sample_en && period >= 2;
    waddr_bd = slot_base(prev_slot) + AW'(sample_idx);
    wdata_b  = pdata[15:8];
    wdata_d  = pdata[31:24];
  end

endmodule

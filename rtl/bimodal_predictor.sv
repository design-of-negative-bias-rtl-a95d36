// bimodal_predictor: zero-predominance predictor with one 2-bit saturating counter per entry.
//
// States (nbti_pkg::bimodal_state_e): strongly zero predominant, weakly zero predominant,
// weakly zero non-predominant, strongly zero non-predominant. Every counter starts strongly
// zero predominant. An outcome ZP = 1 moves the counter one state towards strongly zero
// predominant, ZP = 0 one state towards strongly zero non-predominant, saturating at both
// ends. The two zero-predominant states predict ZP = 1. The four states, the start state and
// the saturating counter follow the bimodal predictor description; the table is indexed by
// PC bits [2 +: log2(ENTRIES)] without tags (this design's choice).
// Lookup is combinational; update happens at the rising edge when upd_en.
module bimodal_predictor #(
  parameter int unsigned ENTRIES = nbti_pkg::PRED_ENTRIES,
  parameter int unsigned PC_W    = nbti_pkg::PC_W,
  localparam int unsigned IW = $clog2(ENTRIES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] lk_pc,
  output logic            lk_pred_zp,
  input  logic            upd_en,
  input  logic [PC_W-1:0] upd_pc,
  input  logic            upd_zp
);
  import nbti_pkg::*;
  bimodal_state_e ctr [ENTRIES];
  logic [IW-1:0]  lk_idx, up_idx;
  bimodal_state_e cur, nxt;

  assign lk_idx     = lk_pc[2 +: IW];
  assign up_idx     = upd_pc[2 +: IW];
  assign lk_pred_zp = (ctr[lk_idx] == BM_STRONG_ZP) || (ctr[lk_idx] == BM_WEAK_ZP);

  always_comb begin
    cur = ctr[up_idx];
    nxt = cur;
    unique case (cur)
      BM_STRONG_ZP:  nxt = upd_zp ? BM_STRONG_ZP : BM_WEAK_ZP;
      BM_WEAK_ZP:    nxt = upd_zp ? BM_STRONG_ZP : BM_WEAK_NZP;
      BM_WEAK_NZP:   nxt = upd_zp ? BM_WEAK_ZP   : BM_STRONG_NZP;
      BM_STRONG_NZP: nxt = upd_zp ? BM_WEAK_NZP  : BM_STRONG_NZP;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < ENTRIES; i++) ctr[i] <= BM_STRONG_ZP;
    end else if (upd_en) begin
      ctr[up_idx] <= nxt;
    end
  end
endmodule

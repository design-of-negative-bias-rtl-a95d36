// zp_predictor: selects one of the three zero-predominance predictors by parameter KIND.
//
// PRED_NP (default) is the non-zero predominance predictor used with the banked register
// file; PRED_BIMODAL and PRED_LASTVAL are the two alternative predictors. All share the same
// interface: combinational lookup by PC, update with the observed ZP at the rising edge.
module zp_predictor #(
  parameter nbti_pkg::pred_kind_e KIND = nbti_pkg::PRED_NP,
  parameter int unsigned ENTRIES = nbti_pkg::PRED_ENTRIES,
  parameter int unsigned PC_W    = nbti_pkg::PC_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] lk_pc,
  output logic            lk_pred_zp,
  input  logic            upd_en,
  input  logic [PC_W-1:0] upd_pc,
  input  logic            upd_zp
);
  if (KIND == nbti_pkg::PRED_BIMODAL) begin : g_bm
    bimodal_predictor #(.ENTRIES(ENTRIES), .PC_W(PC_W)) u_p (.*);
  end else if (KIND == nbti_pkg::PRED_LASTVAL) begin : g_lv
    last_value_predictor #(.ENTRIES(ENTRIES), .PC_W(PC_W)) u_p (.*);
  end else begin : g_np
    np_predictor #(.ENTRIES(ENTRIES), .PC_W(PC_W)) u_p (.*);
  end
endmodule

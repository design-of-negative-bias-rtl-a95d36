// last_value_predictor: zero-predominance predictor that repeats the last observed ZP.
//
// One bit per entry holds the ZP of the previous instance of the instruction mapped to that
// entry; the lookup returns it. The table is indexed by PC bits [2 +: log2(ENTRIES)] without
// tags, and every bit starts at 1 (zero predominant); indexing and start value are this
// design's choices. Lookup is combinational; update at the rising edge when upd_en.
module last_value_predictor #(
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
  logic [ENTRIES-1:0] last_zp;

  assign lk_pred_zp = last_zp[lk_pc[2 +: IW]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      last_zp <= '1;
    else if (upd_en) last_zp[upd_pc[2 +: IW]] <= upd_zp;
  end
endmodule

// np_predictor: non-zero predominance (NP) predictor.
//
// Only instructions seen producing a low-ZP output (ZP = 0) are tracked. The table is
// direct-mapped: ENTRIES entries indexed by PC bits [2 +: log2(ENTRIES)] (4-byte instructions),
// each holding a valid bit and a TAG_W-bit partial tag from the PC bits above the index.
// Lookup (combinational): a tag hit predicts ZP = 0 (wide register), a miss predicts ZP = 1
// (zero predominant, short register).
// Update (at the rising edge when upd_en): an outcome ZP = 0 installs the instruction,
// replacing whatever shared the entry; an outcome ZP = 1 on a hit removes it.
// Tracking only low-ZP instructions and the 8k-entry default follow the NP predictor
// description; direct mapping, partial tags, the tag width and removal on a ZP = 1 outcome
// are this design's choices. Reset invalidates every entry.
module np_predictor #(
  parameter int unsigned ENTRIES = nbti_pkg::PRED_ENTRIES,
  parameter int unsigned PC_W    = nbti_pkg::PC_W,
  parameter int unsigned TAG_W   = 8,
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
  logic [ENTRIES-1:0] valid;
  logic [TAG_W-1:0]   tags [ENTRIES];

  function automatic logic [IW-1:0] idx_of(input logic [PC_W-1:0] pc);
    return pc[2 +: IW];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [PC_W-1:0] pc);
    return pc[2 + IW +: TAG_W];
  endfunction

  logic [IW-1:0] lk_idx, up_idx;
  logic          up_hit;
  assign lk_idx     = idx_of(lk_pc);
  assign up_idx     = idx_of(upd_pc);
  assign lk_pred_zp = !(valid[lk_idx] && tags[lk_idx] == tag_of(lk_pc));
  assign up_hit     = valid[up_idx] && tags[up_idx] == tag_of(upd_pc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (upd_en) begin
      if (!upd_zp)     valid[up_idx] <= 1'b1;
      else if (up_hit) valid[up_idx] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_en && !upd_zp) tags[up_idx] <= tag_of(upd_pc);
  end
endmodule

// nbti_prf: NBTI-tolerant physical register file with predicted bank allocation.
//
// Many instruction results are narrow numbers whose upper bits are zero for long stretches,
// which holds the SRAM cells of those bit positions at 0 and ages them fastest. This register
// file stores results predicted to be zero predominant (more than 75% zero bits) in a bank of
// 16-bit registers, built from up-sized cells in silicon, and the rest in a bank of 64-bit
// registers. The parts:
//   * zp_predictor (NP predictor by default) predicts, from the instruction's PC, whether its
//     result will be zero predominant; it learns from every completed writeback.
//   * rename_map_table (160 logical registers) and two bank_free_lists (112 + 112 registers)
//     do R10K-style renaming: decode_allocator gives the destination a short register when
//     ZP is predicted, a wide one otherwise, and stalls decode when that bank has none free.
//   * remap_unit checks each result's width at writeback; a result that does not fit its
//     short register moves to a wide one (and a narrow result in a wide register moves to a
//     short one when one is free), freeing the mispredicted register and fixing the map.
//   * banked_prf holds the values.
//
// Interface, one instruction per cycle at each stage:
//   decode    dec_valid/pc/has_dest/ldest/lsrc -> dec_stall (combinational); when not
//             stalled the renamed instruction appears on ren_* one cycle later.
//   operands  rd_preg -> rd_data, combinational.
//   writeback wb_valid/pc/preg/ldest/value -> wb_stall (combinational; hold and retry) and
//             the remap report remap/remap_old/remap_new, which the core must apply to the
//             tags it holds (waiting consumers, the old-register fields of younger
//             instructions). The value is in the register file after the clock edge.
//   commit    cm_free_valid/cm_free_preg return a register (the previous mapping of a
//             committed destination) to its bank's free list.
// The core around it (reorder buffer, issue, commit) is not part of this module.
// Decode never takes the last WIDE_RESERVE free wide registers: they are kept for remaps, so
// that the oldest instruction can always move its result to a wide register even when all
// other wide registers belong to younger instructions (which cannot commit before it).
// NARROW_FALLBACK and REMAP_TO_NARROW are passed to decode_allocator and remap_unit; 0 gives
// the strict stall and the one-way remap.
// Initial state: logical registers 0..INIT_WIDE-1 map to wide registers 0..INIT_WIDE-1, the
// rest to short registers from NPREG/2 upwards; all hold zero.
// Bank sizes, widths, 160/224 registers, predictor, decode stall and execute remap follow the
// banked design; the single-instruction-per-cycle ports, the wide-register reserve, the initial mapping
// and the same-cycle priorities (remap before decode for a bank) are this design's choices.
module nbti_prf #(
  parameter int unsigned          NPREG     = nbti_pkg::NUM_PREGS,
  parameter int unsigned          NLREG     = nbti_pkg::NUM_LREGS,
  parameter int unsigned          W         = nbti_pkg::DATA_W,
  parameter int unsigned          NARROW_W  = nbti_pkg::NARROW_W,
  parameter nbti_pkg::pred_kind_e PRED_KIND = nbti_pkg::PRED_NP,
  parameter int unsigned          PRED_ENT  = nbti_pkg::PRED_ENTRIES,
  parameter int unsigned          PC_W      = nbti_pkg::PC_W,
  parameter int unsigned          INIT_WIDE = 80,
  parameter int unsigned          WIDE_RESERVE = 1,
  parameter bit                   NARROW_FALLBACK = 1'b1,
  parameter bit                   REMAP_TO_NARROW = 1'b1,
  localparam int unsigned PW   = $clog2(NPREG),
  localparam int unsigned LW   = $clog2(NLREG),
  localparam int unsigned HALF = NPREG / 2,
  localparam int unsigned CW   = $clog2(HALF + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // decode / rename
  input  logic            dec_valid,
  input  logic [PC_W-1:0] dec_pc,
  input  logic            dec_has_dest,
  input  logic [LW-1:0]   dec_ldest,
  input  logic [LW-1:0]   dec_lsrc [2],
  output logic            dec_stall,
  output logic            ren_valid,
  output logic [PW-1:0]   ren_pdest,
  output logic [PW-1:0]   ren_old_pdest,
  output logic [PW-1:0]   ren_psrc [2],
  output logic            ren_pred_zp,
  // operand read
  input  logic [PW-1:0]   rd_preg [2],
  output logic [W-1:0]    rd_data [2],
  // writeback
  input  logic            wb_valid,
  input  logic [PC_W-1:0] wb_pc,
  input  logic [PW-1:0]   wb_preg,
  input  logic [LW-1:0]   wb_ldest,
  input  logic [W-1:0]    wb_value,
  output logic            wb_stall,
  output logic            remap,
  output logic [PW-1:0]   remap_old,
  output logic [PW-1:0]   remap_new,
  // commit
  input  logic            cm_free_valid,
  input  logic [PW-1:0]   cm_free_preg,
  // status
  output logic [CW-1:0]   wide_free,
  output logic [CW-1:0]   narrow_free
);
  // ---- predictor
  logic pred_zp, wb_done, obs_zp;
  zp_predictor #(.KIND(PRED_KIND), .ENTRIES(PRED_ENT), .PC_W(PC_W)) u_pred (
    .clk, .rst_n, .lk_pc(dec_pc), .lk_pred_zp(pred_zp),
    .upd_en(wb_done), .upd_pc(wb_pc), .upd_zp(obs_zp));

  // ---- free lists (release port 0: remap, port 1: commit)
  logic          w_empty, n_empty, w_take, n_take;
  logic [PW-1:0] w_offer, n_offer;
  logic          w_rel_en [2], n_rel_en [2];
  logic [PW-1:0] rel_preg_q [2];
  logic          rm_rel_en;
  logic [PW-1:0] rm_rel_preg;

  assign rel_preg_q[0] = rm_rel_preg;
  assign rel_preg_q[1] = cm_free_preg;
  assign w_rel_en[0]   = rm_rel_en && rm_rel_preg < PW'(HALF);
  assign n_rel_en[0]   = rm_rel_en && rm_rel_preg >= PW'(HALF);
  assign w_rel_en[1]   = cm_free_valid && cm_free_preg < PW'(HALF);
  assign n_rel_en[1]   = cm_free_valid && cm_free_preg >= PW'(HALF);

  bank_free_list #(.NENT(HALF), .BASE(0), .INIT_USED(INIT_WIDE), .PW(PW), .NREL(2)) u_wide_fl (
    .clk, .rst_n, .empty(w_empty), .alloc_preg(w_offer), .alloc_take(w_take),
    .rel_en(w_rel_en), .rel_preg(rel_preg_q), .free_count(wide_free));
  bank_free_list #(.NENT(NPREG - HALF), .BASE(HALF), .INIT_USED(NLREG - INIT_WIDE), .PW(PW), .NREL(2)) u_narrow_fl (
    .clk, .rst_n, .empty(n_empty), .alloc_preg(n_offer), .alloc_take(n_take),
    .rel_en(n_rel_en), .rel_preg(rel_preg_q), .free_count(narrow_free));

  // ---- execute-stage remap
  logic          rm_take_w, rm_take_n, prf_wr_en;
  logic [PW-1:0] prf_wr_preg;
  logic [$clog2(W+1)-1:0] obs_width;
  remap_unit #(.NPREG(NPREG), .W(W), .NARROW_W(NARROW_W), .REMAP_TO_NARROW(REMAP_TO_NARROW)) u_remap (
    .wb_valid, .wb_preg, .wb_value,
    .wide_empty(w_empty), .wide_preg(w_offer), .narrow_empty(n_empty), .narrow_preg(n_offer),
    .wb_stall, .wb_done, .obs_zp, .obs_width, .prf_wr_en, .prf_wr_preg,
    .take_wide(rm_take_w), .take_narrow(rm_take_n), .rel_en(rm_rel_en), .rel_preg(rm_rel_preg),
    .remap, .remap_old, .remap_new);

  // ---- decode-stage allocation
  logic          fire, d_take_w, d_take_n;
  logic [PW-1:0] d_preg;
  decode_allocator #(.PW(PW), .NARROW_FALLBACK(NARROW_FALLBACK)) u_alloc (
    .dec_valid, .dec_has_dest, .pred_zp,
    .wide_empty(w_empty), .wide_busy(rm_take_w || wide_free <= CW'(WIDE_RESERVE)), .wide_preg(w_offer),
    .narrow_empty(n_empty), .narrow_busy(rm_take_n), .narrow_preg(n_offer),
    .fire, .stall(dec_stall), .take_wide(d_take_w), .take_narrow(d_take_n), .dest_preg(d_preg));

  assign w_take = rm_take_w | d_take_w;
  assign n_take = rm_take_n | d_take_n;

  // ---- rename map
  logic [PW-1:0] src_p [2];
  logic [PW-1:0] old_p, old_fixed;
  rename_map_table #(.NLREG(NLREG), .PW(PW), .INIT_WIDE(INIT_WIDE), .NARROW_BASE(HALF)) u_map (
    .clk, .rst_n, .src_lreg(dec_lsrc), .src_preg(src_p), .dst_lreg(dec_ldest), .dst_old_preg(old_p),
    .ren_en(fire && dec_has_dest), .ren_lreg(dec_ldest), .ren_preg(d_preg),
    .fix_en(remap), .fix_lreg(wb_ldest), .fix_old(remap_old), .fix_new(remap_new));

  // a remap of the same logical register in this cycle also moves what decode sees
  function automatic logic [PW-1:0] fwd(input logic [PW-1:0] p, input logic [LW-1:0] l);
    return (remap && wb_ldest == l && p == remap_old) ? remap_new : p;
  endfunction
  assign old_fixed = fwd(old_p, dec_ldest);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ren_valid     <= 1'b0;
      ren_pdest     <= '0;
      ren_old_pdest <= '0;
      ren_psrc[0]   <= '0;
      ren_psrc[1]   <= '0;
      ren_pred_zp   <= 1'b0;
    end else begin
      ren_valid <= fire;
      if (fire) begin
        ren_pdest     <= dec_has_dest ? d_preg : '0;
        ren_old_pdest <= old_fixed;
        ren_psrc[0]   <= fwd(src_p[0], dec_lsrc[0]);
        ren_psrc[1]   <= fwd(src_p[1], dec_lsrc[1]);
        ren_pred_zp   <= pred_zp;
      end
    end
  end

  // ---- register banks
  logic          wr_en_a   [1];
  logic [PW-1:0] wr_preg_a [1];
  logic [W-1:0]  wr_data_a [1];
  assign wr_en_a[0]   = prf_wr_en;
  assign wr_preg_a[0] = prf_wr_preg;
  assign wr_data_a[0] = wb_value;
  banked_prf #(.NPREG(NPREG), .W(W), .NARROW_W(NARROW_W), .NRD(2), .NWR(1)) u_prf (
    .clk, .rst_n, .rd_preg, .rd_data, .wr_en(wr_en_a), .wr_preg(wr_preg_a), .wr_data(wr_data_a));
endmodule

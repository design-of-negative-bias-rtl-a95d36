// nbti_rf_top: the two NBTI-tolerant register files, side by side.
//
// arf_*: the architecture register file with register rotation, bit rotation and periodic
//        inversion (arf_rbr_inv); a mapping change is requested with arf_remap_req, normally
//        at an operating-system context switch.
// prf_*: the banked physical register file of an out-of-order core with zero-predominance
//        prediction, decode-stage bank allocation and writeback remapping (nbti_prf).
// The two share only clock and reset; every port of each is brought out unchanged, and the
// timing of each is described in its own module. rst_n is an asynchronous active-low reset
// for both; the free-list assertions also sample it to stay quiet during reset.
module nbti_rf_top
  import nbti_pkg::*;
#(
  localparam int unsigned AN   = ARF_REGS,
  localparam int unsigned AAW  = $clog2(ARF_REGS),
  localparam int unsigned ASW  = $clog2(DATA_W),
  localparam int unsigned PW   = $clog2(NUM_PREGS),
  localparam int unsigned LW   = $clog2(NUM_LREGS),
  localparam int unsigned CW   = $clog2(NUM_PREGS / 2 + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // architecture register file
  input  logic [AAW-1:0]    arf_rd_addr [2],
  output logic [DATA_W-1:0] arf_rd_data [2],
  input  logic              arf_wr_en,
  input  logic [AAW-1:0]    arf_wr_addr,
  input  logic [DATA_W-1:0] arf_wr_data,
  input  logic              arf_remap_req,
  input  logic              arf_remap_migrate,
  output logic              arf_busy,
  output logic [AAW-1:0]    arf_row_cnt,
  output logic [ASW-1:0]    arf_bit_cnt,
  output logic              arf_inv,
  // physical register file
  input  logic              prf_dec_valid,
  input  logic [PC_W-1:0]   prf_dec_pc,
  input  logic              prf_dec_has_dest,
  input  logic [LW-1:0]     prf_dec_ldest,
  input  logic [LW-1:0]     prf_dec_lsrc [2],
  output logic              prf_dec_stall,
  output logic              prf_ren_valid,
  output logic [PW-1:0]     prf_ren_pdest,
  output logic [PW-1:0]     prf_ren_old_pdest,
  output logic [PW-1:0]     prf_ren_psrc [2],
  output logic              prf_ren_pred_zp,
  input  logic [PW-1:0]     prf_rd_preg [2],
  output logic [DATA_W-1:0] prf_rd_data [2],
  input  logic              prf_wb_valid,
  input  logic [PC_W-1:0]   prf_wb_pc,
  input  logic [PW-1:0]     prf_wb_preg,
  input  logic [LW-1:0]     prf_wb_ldest,
  input  logic [DATA_W-1:0] prf_wb_value,
  output logic              prf_wb_stall,
  output logic              prf_remap,
  output logic [PW-1:0]     prf_remap_old,
  output logic [PW-1:0]     prf_remap_new,
  input  logic              prf_cm_free_valid,
  input  logic [PW-1:0]     prf_cm_free_preg,
  output logic [CW-1:0]     prf_wide_free,
  output logic [CW-1:0]     prf_narrow_free
);
  arf_rbr_inv #(.N(AN), .W(DATA_W), .NRD(2)) u_arf (
    .clk, .rst_n,
    .rd_addr(arf_rd_addr), .rd_data(arf_rd_data),
    .wr_en(arf_wr_en), .wr_addr(arf_wr_addr), .wr_data(arf_wr_data),
    .remap_req(arf_remap_req), .remap_migrate(arf_remap_migrate), .busy(arf_busy),
    .row_cnt(arf_row_cnt), .bit_cnt(arf_bit_cnt), .inv(arf_inv));

  nbti_prf u_prf (
    .clk, .rst_n,
    .dec_valid(prf_dec_valid), .dec_pc(prf_dec_pc), .dec_has_dest(prf_dec_has_dest),
    .dec_ldest(prf_dec_ldest), .dec_lsrc(prf_dec_lsrc), .dec_stall(prf_dec_stall),
    .ren_valid(prf_ren_valid), .ren_pdest(prf_ren_pdest), .ren_old_pdest(prf_ren_old_pdest),
    .ren_psrc(prf_ren_psrc), .ren_pred_zp(prf_ren_pred_zp),
    .rd_preg(prf_rd_preg), .rd_data(prf_rd_data),
    .wb_valid(prf_wb_valid), .wb_pc(prf_wb_pc), .wb_preg(prf_wb_preg), .wb_ldest(prf_wb_ldest),
    .wb_value(prf_wb_value), .wb_stall(prf_wb_stall),
    .remap(prf_remap), .remap_old(prf_remap_old), .remap_new(prf_remap_new),
    .cm_free_valid(prf_cm_free_valid), .cm_free_preg(prf_cm_free_preg),
    .wide_free(prf_wide_free), .narrow_free(prf_narrow_free));
endmodule

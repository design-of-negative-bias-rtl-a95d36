// tb_nbti_prf: end-to-end test of the banked physical register file at its default size
// (224 registers, 160 logical, 8k-entry NP predictor) with the in-order core model of
// prf_core_model.svh: phases of narrow, wide, sparse and mixed results; every operand read is
// checked against golden values, and short/wide allocation, decode stalls, remaps in both
// directions and mispredictions must each occur.
module tb_nbti_prf;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic        prf_dec_valid, prf_dec_has_dest, prf_dec_stall, prf_ren_valid, prf_ren_pred_zp;
  logic [63:0] prf_dec_pc, prf_wb_pc, prf_wb_value;
  logic [7:0]  prf_dec_ldest, prf_wb_ldest, prf_ren_pdest, prf_ren_old_pdest, prf_wb_preg;
  logic [7:0]  prf_dec_lsrc [2];
  logic [7:0]  prf_ren_psrc [2];
  logic [7:0]  prf_rd_preg [2];
  logic [63:0] prf_rd_data [2];
  logic        prf_wb_valid, prf_wb_stall, prf_remap, prf_cm_free_valid;
  logic [7:0]  prf_remap_old, prf_remap_new, prf_cm_free_preg;
  logic [6:0]  prf_wide_free, prf_narrow_free;

  nbti_prf dut (
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

  always #5 clk = ~clk;

  `include "prf_core_model.svh"

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    prf_idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    prf_scenario(3000);
    // all registers must be back: 160 mapped, 64 free
    checks++;
    if (int'(prf_wide_free) + int'(prf_narrow_free) != 64) begin
      failures++; $display("FAIL free registers %0d + %0d", prf_wide_free, prf_narrow_free);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

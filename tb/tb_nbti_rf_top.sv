// tb_nbti_rf_top: end-to-end test of both register files at their default sizes through the
// top level (no parameter overrides).
// Architecture register file (32 x 64, RBR+INV): random writes and two-port reads against a
// reference; mapping changes with value update (contents must survive) and without it (all
// registers restored afterwards, as at a context switch); after each change the cells are
// inspected to hold register r bit b at row (r + row count) mod 32, column (b + bit count)
// mod 64, inverted in odd phases. Runs through more than a full rotation of the bit columns.
// Physical register file (224 registers, 8k NP predictor): the core model of
// prf_core_model.svh. Every mechanism of both files is counted and must occur.
module tb_nbti_rf_top;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  // architecture register file
  logic [4:0]  arf_rd_addr [2];
  logic [63:0] arf_rd_data [2];
  logic        arf_wr_en, arf_remap_req, arf_remap_migrate, arf_busy, arf_inv;
  logic [4:0]  arf_wr_addr, arf_row_cnt;
  logic [63:0] arf_wr_data;
  logic [5:0]  arf_bit_cnt;
  // physical register file
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

  nbti_rf_top dut (.*);
  always #5 clk = ~clk;

  `include "prf_core_model.svh"

  initial begin
    #200000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- architecture register file
  logic [63:0] aref [32];
  int n_mig = 0, n_plain = 0, n_inv = 0, n_rowwrap = 0, n_bitwrap = 0;

  function automatic logic [63:0] rnd_val();
    return {$urandom, $urandom} >> ($urandom % 64);
  endfunction

  task automatic arf_write(input int r, input logic [63:0] v);
    @(negedge clk); arf_wr_en = 1; arf_wr_addr = 5'(r); arf_wr_data = v;
    @(negedge clk); arf_wr_en = 0;
    aref[r] = v;
  endtask

  task automatic arf_reads(input int k);
    for (int t = 0; t < k; t++) begin
      int a, b;
      @(negedge clk);
      a = $urandom % 32; b = $urandom % 32;
      arf_rd_addr[0] = 5'(a); arf_rd_addr[1] = 5'(b); #1;
      checks += 2;
      if (arf_rd_data[0] !== aref[a]) begin failures++; $display("FAIL arf rd0 r%0d", a); end
      if (arf_rd_data[1] !== aref[b]) begin failures++; $display("FAIL arf rd1 r%0d", b); end
    end
  endtask

  task automatic arf_cells();
    for (int r = 0; r < 32; r++)
      for (int b = 0; b < 64; b++) begin
        checks++;
        if (dut.u_arf.u_cells.cells[(r + arf_row_cnt) % 32][(b + arf_bit_cnt) % 64] !== (aref[r][b] ^ arf_inv)) begin
          failures++; $display("FAIL arf cell r%0d b%0d", r, b); return;
        end
      end
  endtask

  task automatic arf_scenario(input int changes);
    for (int r = 0; r < 32; r++) aref[r] = '0;
    arf_reads(10);
    for (int r = 0; r < 32; r++) arf_write(r, rnd_val());
    for (int k = 0; k < changes; k++) begin
      bit mig, old_inv;
      for (int w = 0; w < 6; w++) arf_write($urandom % 32, rnd_val());
      mig = ($urandom % 2) != 0;
      old_inv = arf_inv;
      @(negedge clk); arf_remap_req = 1; arf_remap_migrate = mig;
      @(negedge clk); arf_remap_req = 0;
      while (arf_busy) @(negedge clk);
      if (mig) n_mig++; else n_plain++;
      if (arf_inv != old_inv) n_inv++;
      if (arf_row_cnt == 0) n_rowwrap++;
      if (arf_bit_cnt == 0) n_bitwrap++;
      if (!mig) for (int r = 0; r < 32; r++) arf_write(r, rnd_val());   // restore
      arf_cells();
      arf_reads(8);
    end
    $display("arf: value updates %0d, plain changes %0d, inversions %0d, row wraps %0d, bit wraps %0d",
             n_mig, n_plain, n_inv, n_rowwrap, n_bitwrap);
    checks++;
    if (n_mig == 0 || n_plain == 0 || n_inv == 0 || n_rowwrap == 0 || n_bitwrap == 0) begin
      failures++; $display("FAIL an architecture-register-file mechanism never happened");
    end
  endtask

  initial begin
    arf_rd_addr[0] = '0; arf_rd_addr[1] = '0; arf_wr_en = 0; arf_wr_addr = '0; arf_wr_data = '0;
    arf_remap_req = 0; arf_remap_migrate = 0;
    prf_idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      arf_scenario(70);
      prf_scenario(3000);
    join
    checks++;
    if (int'(prf_wide_free) + int'(prf_narrow_free) != 64) begin
      failures++; $display("FAIL free registers %0d + %0d", prf_wide_free, prf_narrow_free);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

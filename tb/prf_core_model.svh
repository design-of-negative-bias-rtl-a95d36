// prf_core_model.svh: a small in-order core model that drives the banked physical register
// file through rename, operand read, writeback and commit, and checks it against a golden copy
// of the 160 logical registers. Included inside a testbench module that declares clk, rst_n,
// checks, failures and the prf_* signals of the register file.
//
// Static instructions (NPC of them) each have a value kind: narrow (fits 16 bits, zero
// predominant), wide (not zero predominant), sparse (zero predominant but wider than 16 bits)
// or mixed. Kinds change between phases so that the predictor mispredicts and results must be
// remapped. Destinations are logical registers 0..99, so that no more live wide values exist
// than the 112-register wide bank can hold. Up to WINDOW renamed instructions are in flight; the oldest writes back after a
// random latency, its source operands are read from the register file and compared with the
// golden values, and it commits in the same cycle, returning its previous mapping. Remap
// reports are applied to every tag the model holds.
  localparam int NPC = 64, WINDOW = 48;

  typedef struct {
    logic [63:0] pc;
    bit          has_dest;
    int          ldest;
    int          lsrc [2];
    logic [7:0]  pdest, old_pdest;
    logic [7:0]  psrc [2];
    bit          pred_zp;
    int          age, lat;
  } inst_t;

  inst_t       q [$];
  int          kind [NPC];
  logic [63:0] gl [160];
  int n_dec_stall = 0, n_wb_stall = 0, n_remap_w = 0, n_remap_n = 0, n_mispred = 0;
  int n_alloc_n = 0, n_alloc_w = 0, n_done = 0, n_fallback = 0;

  function automatic logic [63:0] gen_value(input int k);
    case (k)
      0: return 64'($urandom % (1 << ($urandom % 16)));
      1: return {$urandom | 32'h8000_0000, $urandom};
      2: return 64'h1 << (17 + $urandom % 30);
      default: return ($urandom % 2) ? gen_value(0) : gen_value(1);
    endcase
  endfunction

  function automatic bit is_zp(input logic [63:0] v);
    return (64 - $countones(v)) > 48;
  endfunction

  task automatic prf_idle();
    prf_dec_valid = 0; prf_dec_pc = '0; prf_dec_has_dest = 0; prf_dec_ldest = '0;
    prf_dec_lsrc[0] = '0; prf_dec_lsrc[1] = '0; prf_rd_preg[0] = '0; prf_rd_preg[1] = '0;
    prf_wb_valid = 0; prf_wb_pc = '0; prf_wb_preg = '0; prf_wb_ldest = '0; prf_wb_value = '0;
    prf_cm_free_valid = 0; prf_cm_free_preg = '0;
  endtask

  // Runs the model for ncycles cycles, or until drained when only_drain is set.
  // gen_mode: 0 random instructions, 1 source-only instructions reading every logical register.
  task automatic prf_run(input int ncycles, input int gen_mode);
    inst_t pend, cur;
    bit    pend_valid, have_cur;
    int    rd_i;
    pend_valid = 0; have_cur = 0; rd_i = 0;
    for (int c = 0; c < ncycles || q.size() != 0 || have_cur || pend_valid; c++) begin
      @(negedge clk);
      prf_idle();
      // 1. the instruction renamed at the last edge enters the window
      if (pend_valid) begin
        checks++;
        if (!prf_ren_valid) begin failures++; $display("FAIL rename output missing"); end
        pend.pdest = prf_ren_pdest; pend.old_pdest = prf_ren_old_pdest;
        pend.psrc[0] = prf_ren_psrc[0]; pend.psrc[1] = prf_ren_psrc[1];
        pend.pred_zp = prf_ren_pred_zp;
        if (pend.has_dest) begin
          checks++;
          // a ZP prediction may fall back to a wide register, never the other way round
          if (!pend.pred_zp && pend.pdest >= 112) begin failures++; $display("FAIL bank vs prediction"); end
          if (pend.pred_zp && pend.pdest < 112) n_fallback++;
          if (pend.pdest >= 112) n_alloc_n++; else n_alloc_w++;
        end
        q.push_back(pend);
        pend_valid = 0;
      end
      foreach (q[i]) q[i].age++;
      // 2. writeback and commit of the oldest instruction
      if (q.size() != 0 && q[0].age >= q[0].lat) begin
        logic [63:0] v;
        prf_rd_preg[0] = q[0].psrc[0]; prf_rd_preg[1] = q[0].psrc[1];
        if (q[0].has_dest) begin
          v = gen_value(kind[int'(q[0].pc[7:2]) % NPC]);
          prf_wb_valid = 1; prf_wb_pc = q[0].pc; prf_wb_preg = q[0].pdest;
          prf_wb_ldest = 8'(q[0].ldest); prf_wb_value = v;
        end
      end
      // 3. decode
      if (!have_cur && c < ncycles && q.size() < WINDOW) begin
        cur.pc = 64'h4000 + 64'($urandom % NPC) * 4;
        if (gen_mode == 0) begin
          cur.has_dest = ($urandom % 10) != 0;
          cur.ldest = $urandom % 100; cur.lsrc[0] = $urandom % 160; cur.lsrc[1] = $urandom % 160;
        end else begin
          cur.has_dest = 0; cur.ldest = 0; cur.lsrc[0] = rd_i % 160; cur.lsrc[1] = (rd_i + 1) % 160;
          rd_i += 2;
        end
        cur.age = 0; cur.lat = 1 + $urandom % 4;
        have_cur = 1;
      end
      if (have_cur) begin
        prf_dec_valid = 1; prf_dec_pc = cur.pc; prf_dec_has_dest = cur.has_dest;
        prf_dec_ldest = 8'(cur.ldest); prf_dec_lsrc[0] = 8'(cur.lsrc[0]); prf_dec_lsrc[1] = 8'(cur.lsrc[1]);
      end
      #1;
      if (prf_wb_valid || (q.size() != 0 && q[0].age >= q[0].lat && !q[0].has_dest)) begin
        // source operands must hold the golden values
        checks += 2;
        if (prf_rd_data[0] !== gl[q[0].lsrc[0]]) begin
          failures++; $display("FAIL src0 l%0d p%0d got %h exp %h", q[0].lsrc[0], q[0].psrc[0], prf_rd_data[0], gl[q[0].lsrc[0]]);
        end
        if (prf_rd_data[1] !== gl[q[0].lsrc[1]]) begin
          failures++; $display("FAIL src1 l%0d p%0d got %h exp %h", q[0].lsrc[1], q[0].psrc[1], prf_rd_data[1], gl[q[0].lsrc[1]]);
        end
        if (prf_wb_valid && prf_wb_stall) n_wb_stall++;
        else begin
          cur_done:
          begin
            inst_t h;
            h = q.pop_front();
            n_done++;
            if (h.has_dest) begin
              gl[h.ldest] = prf_wb_value;
              if (h.pred_zp != is_zp(prf_wb_value)) n_mispred++;
              checks++;
              if (prf_remap) begin
                if (prf_remap_old != h.pdest) begin failures++; $display("FAIL remap old"); end
                if (prf_remap_new >= 112) n_remap_n++; else n_remap_w++;
                foreach (q[i]) begin
                  if (q[i].old_pdest == prf_remap_old) q[i].old_pdest = prf_remap_new;
                  if (q[i].psrc[0] == prf_remap_old) q[i].psrc[0] = prf_remap_new;
                  if (q[i].psrc[1] == prf_remap_old) q[i].psrc[1] = prf_remap_new;
                end
              end
              prf_cm_free_valid = 1; prf_cm_free_preg = h.old_pdest;
            end
          end
        end
      end
      if (have_cur) begin
        if (prf_dec_stall) n_dec_stall++;
        else begin pend = cur; pend_valid = 1; have_cur = 0; end
      end
    end
    @(negedge clk);
    prf_idle();
  endtask

  // Whole scenario: phases of changing instruction behaviour, then a read-back of every
  // logical register. Counts each mechanism and fails the ones that never happened.
  task automatic prf_scenario(input int cycles_per_phase);
    for (int i = 0; i < 160; i++) gl[i] = '0;
    for (int p = 0; p < NPC; p++) kind[p] = (p % 8 == 0) ? 2 : 0;         // mostly narrow
    prf_run(cycles_per_phase, 0);
    for (int p = 0; p < NPC; p++) kind[p] = (p % 4 == 0) ? 0 : 1;         // mostly wide
    prf_run(cycles_per_phase, 0);
    for (int p = 0; p < NPC; p++) kind[p] = $urandom % 4;                 // mixed
    prf_run(cycles_per_phase, 0);
    for (int p = 0; p < NPC; p++) kind[p] = (p % 2) ? 0 : 2;              // narrow and sparse
    prf_run(cycles_per_phase, 0);
    prf_run(80, 1);                                                       // read every register
    $display("prf: done %0d, short allocs %0d, wide allocs %0d, decode stalls %0d, remaps to wide %0d, remaps to short %0d, mispredictions %0d, short-bank fallbacks %0d, writeback stalls %0d",
             n_done, n_alloc_n, n_alloc_w, n_dec_stall, n_remap_w, n_remap_n, n_mispred, n_fallback, n_wb_stall);
    checks++;
    if (n_alloc_n == 0 || n_alloc_w == 0 || n_dec_stall == 0 || n_remap_w == 0 || n_remap_n == 0 || n_mispred == 0) begin
      failures++; $display("FAIL a register-file mechanism never happened");
    end
  endtask

// tb_zp_pred_workload: misprediction-rate workload for the zero-predominance predictors.
//
// What it measures: how often each predictor gets an instruction's zero predominance wrong,
// counted over every dynamic instruction (prediction != outcome).
//
// How: one synthetic instruction stream drives seven predictors at once:
//   * the NP, bimodal and last-value predictors at 8192 entries (the size at which the three
//     are compared);
//   * the NP predictor at 512, 1k, 2k and 4k entries (the table sizes the design is
//     evaluated at).
// Every instruction is looked up before the clock edge and trained with its outcome at the
// edge, as decode and writeback would do for an instruction with no overlap.
//
// The program has 12,000 static instructions at consecutive 4-byte addresses. 80% of dynamic
// instructions come from a hot region of 1,500 instructions, and the rest from anywhere.
// Each static instruction has a fixed behaviour:
//   * always zero predominant (25%)
//   * never zero predominant (40%)
//   * mostly predominant, 90% (5%)
//   * mostly non-predominant, 90% (10%)
//   * alternating (5%)
//   * random (5%)
//   * predominant 7 times out of 8 (10%)
// About 40% of results come out zero predominant. The mix is this testbench's own; the
// source design measured real programs.
//
// Checks: the NP rate must fall at each doubling of the table from 512 to 8k entries, and
// every 8k predictor must stay far below chance (under 25%). All rates are printed. The
// source design found the NP predictor best, at about half the rate of the other two. On
// this synthetic mix, the bimodal counters' tolerance of single deviations wins instead,
// and NP ends up close to last value. That ordering is reported, not checked.
module tb_zp_pred_workload;
  localparam int NSTAT = 12000, NHOT = 1500, NDYN = 200000, NP = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [63:0] pc = '0;
  logic        upd_en = 0, zp = 0;
  logic        pred [NP];

  np_predictor          u_np8k (.clk, .rst_n, .lk_pc(pc), .lk_pred_zp(pred[0]), .upd_en, .upd_pc(pc), .upd_zp(zp));
  bimodal_predictor     u_bim  (.clk, .rst_n, .lk_pc(pc), .lk_pred_zp(pred[1]), .upd_en, .upd_pc(pc), .upd_zp(zp));
  last_value_predictor  u_lv   (.clk, .rst_n, .lk_pc(pc), .lk_pred_zp(pred[2]), .upd_en, .upd_pc(pc), .upd_zp(zp));
  np_predictor #(.ENTRIES(512))  u_np512 (.clk, .rst_n, .lk_pc(pc), .lk_pred_zp(pred[3]), .upd_en, .upd_pc(pc), .upd_zp(zp));
  np_predictor #(.ENTRIES(1024)) u_np1k  (.clk, .rst_n, .lk_pc(pc), .lk_pred_zp(pred[4]), .upd_en, .upd_pc(pc), .upd_zp(zp));
  np_predictor #(.ENTRIES(2048)) u_np2k  (.clk, .rst_n, .lk_pc(pc), .lk_pred_zp(pred[5]), .upd_en, .upd_pc(pc), .upd_zp(zp));
  np_predictor #(.ENTRIES(4096)) u_np4k  (.clk, .rst_n, .lk_pc(pc), .lk_pred_zp(pred[6]), .upd_en, .upd_pc(pc), .upd_zp(zp));

  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int kind [NSTAT];
  int execs [NSTAT];

  function automatic int pick_kind();
    int x = $urandom % 100;
    if (x < 25) return 0;
    if (x < 65) return 1;
    if (x < 70) return 2;
    if (x < 80) return 3;
    if (x < 85) return 4;
    if (x < 90) return 5;
    return 6;
  endfunction

  function automatic logic outcome(int i);
    case (kind[i])
      0: return 1'b1;
      1: return 1'b0;
      2: return ($urandom % 10) != 0;
      3: return ($urandom % 10) == 0;
      4: return execs[i] % 2 == 0;
      5: return ($urandom % 2) != 0;
      default: return execs[i] % 8 != 7;
    endcase
  endfunction

  string names [NP] = '{"NP 8k", "bimodal 8k", "last value 8k", "NP 512", "NP 1k", "NP 2k", "NP 4k"};
  int    miss [NP];
  real   rate [NP];
  int    n_zp = 0;

  initial begin
    for (int i = 0; i < NSTAT; i++) begin kind[i] = pick_kind(); execs[i] = 0; end
    for (int k = 0; k < NP; k++) miss[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < NDYN; d++) begin
      int i;
      @(negedge clk);
      i = (($urandom % 10) < 8) ? int'($urandom % NHOT) : int'($urandom % NSTAT);
      pc = 64'h0001_0000 + 64'(4 * i);
      zp = outcome(i);
      execs[i]++;
      n_zp += int'(zp);
      upd_en = 1;
      #1;
      for (int k = 0; k < NP; k++) if (pred[k] != zp) miss[k]++;
    end
    @(negedge clk); upd_en = 0;
    $display("zero-predominant results: %0.1f%%", 100.0 * n_zp / NDYN);
    for (int k = 0; k < NP; k++) begin
      rate[k] = 100.0 * miss[k] / NDYN;
      $display("misprediction rate %-14s %0.2f%%", names[k], rate[k]);
    end
    checks++;
    if (!(rate[3] > rate[4] && rate[4] > rate[5] && rate[5] > rate[6] && rate[6] > rate[0])) begin
      failures++; $display("FAIL NP rate does not fall with table size");
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (!(rate[k] < 25.0)) begin failures++; $display("FAIL %s rate too high", names[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

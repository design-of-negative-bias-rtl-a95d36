// tb_arf_obp: bias-balance workload for the architecture register file.
//
// What it measures: for every storage cell, the fraction of time it holds 1 (its one bias
// probability, p). A cell with p near 0 or 1 ages on one side; 0.5 is ideal. The figure of
// merit of a run is the worst cell, min over cells of min(p, 1-p).
//
// How: four 32 x 64 register files run side by side on the same input stream:
//   base     no rotation, no inversion
//   INV      inversion only
//   RBR      register and bit rotation, no inversion
//   RBR+INV  all three (the default configuration)
// A run is a sequence of scheduling periods. At each period boundary the mapping changes (as
// at a context switch, without value update), then the incoming program's 32 register values
// are written and read back through both ports and compared with the written values. The
// cells are then sampled, weighted by the period's length (1..200 time units, random), and
// stay unchanged until the next boundary. The values come from 15 synthetic programs.
// Each program gives each register a fixed kind of content, and the kinds are weighted
// toward what integer code holds: zero, small counts, small negative numbers, heap and stack
// addresses, booleans, text bytes and a few full-width random words. A run picks a random
// program for each of its 256 periods. Twenty runs are made, and the median and 10th
// percentile of the worst-cell balance are reported for each scheme.
//
// Checks: every read-back value. Also, at the 10th percentile, the combination must beat
// rotation alone and no scheme, and bring the worst cell close to 0.5 (required here: at
// least 0.35). The result for inversion alone is printed but not checked. With these
// programs it comes out about equal to the combination, because the inversion phase steps
// with the shift count: a cell always holds a given register bit in the same polarity. The
// synthetic programs are this testbench's own. Only the method (interleaved program phases,
// worst cell, 10th percentile over many sequences) follows the source study.
module tb_arf_obp;
  localparam int N = 32, W = 64, NS = 4, NPROG = 15, NRUN = 20, NPH = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0]  rd_addr [2];
  logic [63:0] rd_data [NS][2];
  logic        wr_en = 0, remap_req = 0, remap_migrate = 0;
  logic        busy [NS], inv [NS];
  logic [4:0]  wr_addr = '0, row_cnt [NS];
  logic [5:0]  bit_cnt [NS];
  logic [63:0] wr_data = '0;

  arf_rbr_inv #(.EN_RR(0), .EN_BR(0), .EN_INV(0)) u_base (.clk, .rst_n, .rd_addr,
    .rd_data(rd_data[0]), .wr_en, .wr_addr, .wr_data, .remap_req, .remap_migrate,
    .busy(busy[0]), .row_cnt(row_cnt[0]), .bit_cnt(bit_cnt[0]), .inv(inv[0]));
  arf_rbr_inv #(.EN_RR(0), .EN_BR(0), .EN_INV(1)) u_inv (.clk, .rst_n, .rd_addr,
    .rd_data(rd_data[1]), .wr_en, .wr_addr, .wr_data, .remap_req, .remap_migrate,
    .busy(busy[1]), .row_cnt(row_cnt[1]), .bit_cnt(bit_cnt[1]), .inv(inv[1]));
  arf_rbr_inv #(.EN_RR(1), .EN_BR(1), .EN_INV(0)) u_rbr (.clk, .rst_n, .rd_addr,
    .rd_data(rd_data[2]), .wr_en, .wr_addr, .wr_data, .remap_req, .remap_migrate,
    .busy(busy[2]), .row_cnt(row_cnt[2]), .bit_cnt(bit_cnt[2]), .inv(inv[2]));
  arf_rbr_inv u_all (.clk, .rst_n, .rd_addr,
    .rd_data(rd_data[3]), .wr_en, .wr_addr, .wr_data, .remap_req, .remap_migrate,
    .busy(busy[3]), .row_cnt(row_cnt[3]), .bit_cnt(bit_cnt[3]), .inv(inv[3]));

  always #5 clk = ~clk;

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- synthetic programs
  int prog_kind [NPROG][N];

  function automatic int pick_kind();
    int x = $urandom % 100;
    if (x < 15) return 0;       // zero
    if (x < 50) return 1;       // small non-negative count
    if (x < 60) return 2;       // small negative number
    if (x < 75) return 3;       // address
    if (x < 85) return 4;       // boolean
    if (x < 90) return 5;       // text bytes
    return 6;                   // full-width random
  endfunction

  function automatic logic [63:0] gen(int kind);
    logic [63:0] v;
    int sh;
    case (kind)
      0: v = '0;
      1: begin sh = $urandom % 16; v = 64'($urandom) & ((64'd1 << sh) - 1); end
      2: begin sh = $urandom % 12; v = -(64'($urandom) & ((64'd1 << sh) - 1)) - 1; end
      3: v = ((($urandom % 2) != 0) ? 64'h0000_0000_0010_0000 : 64'h0000_07ff_ff00_0000) |
             (64'($urandom % 32'h0010_0000) & ~64'h7);
      4: v = 64'($urandom % 2);
      5: begin
        v = '0;
        for (int k = 0; k < 8; k++) v[8*k +: 8] = 8'(32 + $urandom % 95);
      end
      default: v = {$urandom, $urandom};
    endcase
    return v;
  endfunction

  // ---- cell sampling
  longint ones [NS][N][W];
  longint total;
  real    worst [NS][NRUN];

  task automatic sample(input int len);
    for (int r = 0; r < N; r++)
      for (int b = 0; b < W; b++) begin
        ones[0][r][b] += u_base.u_cells.cells[r][b] ? longint'(len) : 64'sd0;
        ones[1][r][b] += u_inv.u_cells.cells[r][b]  ? longint'(len) : 64'sd0;
        ones[2][r][b] += u_rbr.u_cells.cells[r][b]  ? longint'(len) : 64'sd0;
        ones[3][r][b] += u_all.u_cells.cells[r][b]  ? longint'(len) : 64'sd0;
      end
    total += longint'(len);
  endtask

  task automatic clear_counts();
    for (int s = 0; s < NS; s++)
      for (int r = 0; r < N; r++)
        for (int b = 0; b < W; b++) ones[s][r][b] = 0;
    total = 0;
  endtask

  function automatic real worst_balance(int s);
    real m = 0.5;
    for (int r = 0; r < N; r++)
      for (int b = 0; b < W; b++) begin
        real p = real'(ones[s][r][b]) / real'(total);
        real q = (p < 0.5) ? p : 1.0 - p;
        if (q < m) m = q;
      end
    return m;
  endfunction

  // ---- one scheduling period
  logic [63:0] vals [N];

  task automatic period(input int prog);
    // context switch: change the mapping with no value update
    @(negedge clk); remap_req = 1; remap_migrate = 0;
    @(negedge clk); remap_req = 0;
    // restore the incoming program's registers
    for (int r = 0; r < N; r++) begin
      vals[r] = gen(prog_kind[prog][r]);
      wr_en = 1; wr_addr = 5'(r); wr_data = vals[r];
      @(negedge clk);
    end
    wr_en = 0;
    // read everything back from every file
    for (int r = 0; r < N; r += 2) begin
      rd_addr[0] = 5'(r); rd_addr[1] = 5'(r + 1);
      #1;
      for (int s = 0; s < NS; s++)
        for (int p = 0; p < 2; p++) begin
          checks++;
          if (rd_data[s][p] !== vals[r + p]) begin
            failures++;
            if (failures < 10) $display("FAIL scheme %0d r%0d %h exp %h", s, r + p, rd_data[s][p], vals[r + p]);
          end
        end
      @(negedge clk);
    end
    sample(1 + $urandom % 200);
  endtask

  function automatic void sort_runs(ref real a [NRUN]);
    for (int i = 1; i < NRUN; i++)
      for (int j = i; j > 0 && a[j] < a[j-1]; j--) begin
        real t = a[j]; a[j] = a[j-1]; a[j-1] = t;
      end
  endfunction

  string names [NS] = '{"base", "INV", "RBR", "RBR+INV"};
  real med [NS], p10 [NS];

  initial begin
    rd_addr[0] = '0; rd_addr[1] = '0;
    for (int p = 0; p < NPROG; p++)
      for (int r = 0; r < N; r++) prog_kind[p][r] = pick_kind();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < NRUN; run++) begin
      clear_counts();
      for (int ph = 0; ph < NPH; ph++) period($urandom % NPROG);
      for (int s = 0; s < NS; s++) worst[s][run] = worst_balance(s);
    end
    for (int s = 0; s < NS; s++) begin
      real a [NRUN];
      for (int k = 0; k < NRUN; k++) a[k] = worst[s][k];
      sort_runs(a);
      med[s] = a[NRUN / 2];
      p10[s] = a[NRUN / 10];
      $display("worst-cell balance %-8s median %0.3f  10th percentile %0.3f", names[s], med[s], p10[s]);
    end
    checks++;
    if (!(p10[3] > p10[2])) begin failures++; $display("FAIL RBR+INV not better than RBR"); end
    checks++;
    if (!(p10[3] >= p10[0])) begin failures++; $display("FAIL RBR+INV worse than no scheme"); end
    checks++;
    if (!(p10[3] >= 0.35)) begin failures++; $display("FAIL RBR+INV worst cell too unbalanced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

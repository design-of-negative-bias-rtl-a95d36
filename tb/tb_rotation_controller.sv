// tb_rotation_controller: checks the mapping counters (row count mod N, bit count mod W,
// inversion toggle) on mapping changes without value update, and the value-update sequence
// against a model of the cell rows (register r in row (r + row count) mod N): N+1 busy
// cycles, and afterwards every register must read back its own value under the new mapping.
module tb_rotation_controller;
  localparam int N = 4, W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic remap_req, remap_migrate, busy;
  logic [1:0] rd_row_cnt, wr_row_cnt, mig_rd_reg, mig_wr_reg;
  logic [2:0] rd_bit_cnt, wr_bit_cnt;
  logic rd_inv, wr_inv, mig_wr_en;
  logic [W-1:0] mig_rd_data, mig_wr_data;

  rotation_controller #(.N(N), .W(W)) dut (.*);
  always #5 clk = ~clk;

  // cell rows: the sequencer reads with the old and writes with the new row count
  logic [W-1:0] prow [N];
  assign mig_rd_data = prow[(int'(mig_rd_reg) + int'(rd_row_cnt)) % N];
  always @(posedge clk)
    if (mig_wr_en) prow[(int'(mig_wr_reg) + int'(wr_row_cnt)) % N] <= mig_wr_data;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int rc, bc, iv, cyc;
    bit seen [N];
    remap_req = 0; remap_migrate = 0;
    for (int i = 0; i < N; i++) prow[i] = 8'hA0 + 8'(i);   // register i holds A0+i
    repeat (2) @(posedge clk);
    rst_n = 1;
    rc = 0; bc = 0; iv = 0;
    // mapping changes without value update
    for (int k = 0; k < 20; k++) begin
      @(negedge clk); remap_req = 1; remap_migrate = 0;
      @(negedge clk); remap_req = 0;
      rc = (rc + 1) % N; bc = (bc + 1) % W; iv ^= 1;
      chk("row", rd_row_cnt, rc); chk("bit", rd_bit_cnt, bc); chk("inv", rd_inv, iv);
      chk("busy", busy, 0);
      chk("wr row", wr_row_cnt, rc);
    end
    // value updates
    for (int k = 0; k < 6; k++) begin
      for (int i = 0; i < N; i++) seen[i] = 0;
      @(negedge clk); remap_req = 1; remap_migrate = 1;
      @(negedge clk); remap_req = 0;
      cyc = 0;
      while (busy) begin
        cyc++;
        chk("old map during update", rd_row_cnt, rc);
        chk("new map during update", wr_row_cnt, (rc + 1) % N);
        chk("new inv during update", wr_inv, iv ^ 1);
        if (mig_wr_en) seen[mig_wr_reg] = 1;
        @(negedge clk);
        if (cyc > 3 * N) break;
      end
      chk("busy cycles", cyc, N + 1);
      for (int i = 0; i < N; i++) chk("register moved", seen[i], 1);
      rc = (rc + 1) % N; bc = (bc + 1) % W; iv ^= 1;
      chk("row after update", rd_row_cnt, rc); chk("bit after update", rd_bit_cnt, bc);
      chk("inv after update", rd_inv, iv);
      for (int r = 0; r < N; r++) chk("value after update", prow[(r + rc) % N], 8'hA0 + r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_arf_rbr_inv: end-to-end check of the rotating, inverting architecture register file
// (32 x 64). A reference register model is compared with both read ports after random writes.
// Mapping changes with value update must keep every register's value; mapping changes without
// it are followed by a restore of all registers, as software does at a context switch. After
// every change the cell array is inspected: register r's bit b must sit in row
// (r + row count) mod 32, column (b + bit count) mod 64, inverted in odd phases.
// Each mechanism (value update, plain change, row and bit count wrap, inversion) is counted.
module tb_arf_rbr_inv;
  localparam int N = 32, W = 64;
  int checks = 0, failures = 0;
  int n_mig = 0, n_plain = 0, n_inv = 0, n_rowwrap = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0]  rd_addr [2];
  logic [63:0] rd_data [2];
  logic        wr_en, remap_req, remap_migrate, busy, inv;
  logic [4:0]  wr_addr, row_cnt;
  logic [63:0] wr_data;
  logic [5:0]  bit_cnt;
  logic [63:0] ref_r [N];

  arf_rbr_inv dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic write_reg(input int r, input logic [63:0] v);
    @(negedge clk); wr_en = 1; wr_addr = 5'(r); wr_data = v;
    @(negedge clk); wr_en = 0;
    ref_r[r] = v;
  endtask

  task automatic check_reads(input int k);
    for (int t = 0; t < k; t++) begin
      int a, b;
      @(negedge clk);
      a = $urandom % N; b = $urandom % N;
      rd_addr[0] = 5'(a); rd_addr[1] = 5'(b);
      #1;
      checks += 2;
      if (rd_data[0] !== ref_r[a]) begin failures++; $display("FAIL rd0 r%0d %h exp %h", a, rd_data[0], ref_r[a]); end
      if (rd_data[1] !== ref_r[b]) begin failures++; $display("FAIL rd1 r%0d %h exp %h", b, rd_data[1], ref_r[b]); end
    end
  endtask

  task automatic check_cells();
    for (int r = 0; r < N; r++)
      for (int b = 0; b < W; b++) begin
        logic cellbit;
        cellbit = dut.u_cells.cells[(r + row_cnt) % N][(b + bit_cnt) % W];
        checks++;
        if (cellbit !== (ref_r[r][b] ^ inv)) begin
          failures++;
          $display("FAIL cell of r%0d bit %0d (row cnt %0d bit cnt %0d inv %0d)", r, b, row_cnt, bit_cnt, inv);
          return;
        end
      end
  endtask

  task automatic remap(input bit migrate);
    logic [4:0] old_row;
    logic       old_inv;
    old_row = row_cnt; old_inv = inv;
    @(negedge clk); remap_req = 1; remap_migrate = migrate;
    @(negedge clk); remap_req = 0;
    while (busy) @(negedge clk);
    checks++;
    if (row_cnt !== 5'(old_row + 1)) begin failures++; $display("FAIL row count"); end
    if (inv != old_inv) n_inv++;
    if (row_cnt == 0) n_rowwrap++;
    if (migrate) n_mig++; else n_plain++;
    if (!migrate) for (int r = 0; r < N; r++) write_reg(r, {$urandom, $urandom} >> ($urandom % 64));
    check_cells();
    check_reads(40);
  endtask

  initial begin
    rd_addr[0] = '0; rd_addr[1] = '0; wr_en = 0; wr_addr = '0; wr_data = '0;
    remap_req = 0; remap_migrate = 0;
    for (int r = 0; r < N; r++) ref_r[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_reads(20);
    for (int r = 0; r < N; r++) write_reg(r, {$urandom, $urandom} >> ($urandom % 64));
    check_cells();
    for (int k = 0; k < 70; k++) begin
      for (int w = 0; w < 10; w++) write_reg($urandom % N, {$urandom, $urandom} >> ($urandom % 64));
      check_reads(10);
      remap(($urandom % 3) != 0);
    end
    checks++;
    if (n_mig == 0 || n_plain == 0 || n_inv == 0 || n_rowwrap == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("value updates %0d, plain changes %0d, inversions %0d, row wraps %0d",
             n_mig, n_plain, n_inv, n_rowwrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

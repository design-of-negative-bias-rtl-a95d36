// tb_arf_cell_array: writes random words to random rows through one-hot select lines and reads
// them back on both read ports against a reference array; checks reset and an idle write.
module tb_arf_cell_array;
  localparam int R = 32, W = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [R-1:0] wr_sel;
  logic [W-1:0] wr_cells;
  logic [R-1:0] rd_sel [2];
  logic [W-1:0] rd_cells [2];
  logic [W-1:0] ref_mem [R];

  arf_cell_array #(.ROWS(R), .W(W), .NRD(2)) dut (.clk, .rst_n, .wr_sel, .wr_cells, .rd_sel, .rd_cells);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a, b;
    wr_sel = '0; wr_cells = '0; rd_sel[0] = '0; rd_sel[1] = '0;
    for (int i = 0; i < R; i++) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      a = $urandom % R;
      wr_sel = ($urandom % 4 == 0) ? '0 : (R'(1) << a);
      wr_cells = {$urandom, $urandom};
      @(posedge clk);
      if (wr_sel != 0) ref_mem[a] = wr_cells;
      #1;
      a = $urandom % R; b = $urandom % R;
      rd_sel[0] = R'(1) << a; rd_sel[1] = R'(1) << b;
      #1;
      checks += 2;
      if (rd_cells[0] !== ref_mem[a]) begin failures++; $display("FAIL p0 row %0d", a); end
      if (rd_cells[1] !== ref_mem[b]) begin failures++; $display("FAIL p1 row %0d", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

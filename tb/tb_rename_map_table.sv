// tb_rename_map_table: 160-entry map. Checks the reset mapping (0..79 wide, 80..159 from 112),
// then random renames and conditional remap fixes against a reference map: a fix applies only
// when the entry still holds the old register and decode does not rename it in that cycle.
module tb_rename_map_table;
  int checks = 0, failures = 0, n_fix = 0, n_fix_drop = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] src_lreg [2];
  logic [7:0] src_preg [2];
  logic [7:0] dst_lreg, dst_old_preg, ren_lreg, ren_preg, fix_lreg, fix_old, fix_new;
  logic       ren_en, fix_en;
  logic [7:0] m [160];

  rename_map_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ren_en = 0; fix_en = 0; ren_lreg = '0; ren_preg = '0; fix_lreg = '0; fix_old = '0; fix_new = '0;
    src_lreg[0] = '0; src_lreg[1] = '0; dst_lreg = '0;
    for (int i = 0; i < 160; i++) m[i] = (i < 80) ? 8'(i) : 8'(112 + i - 80);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      src_lreg[0] = 8'($urandom % 160); src_lreg[1] = 8'($urandom % 160); dst_lreg = 8'($urandom % 160);
      #1;
      checks += 3;
      if (src_preg[0] !== m[src_lreg[0]]) begin failures++; $display("FAIL s0"); end
      if (src_preg[1] !== m[src_lreg[1]]) begin failures++; $display("FAIL s1"); end
      if (dst_old_preg !== m[dst_lreg]) begin failures++; $display("FAIL d"); end
      ren_en = 1'($urandom); ren_lreg = 8'($urandom % 8); ren_preg = 8'($urandom % 224);
      fix_en = 1'($urandom); fix_lreg = 8'($urandom % 8); fix_new = 8'($urandom % 224);
      fix_old = ($urandom % 2) ? m[fix_lreg] : 8'($urandom % 224);
      @(posedge clk);
      if (fix_en && m[fix_lreg] == fix_old && !(ren_en && ren_lreg == fix_lreg)) begin
        m[fix_lreg] = fix_new; n_fix++;
      end else if (fix_en) n_fix_drop++;
      if (ren_en) m[ren_lreg] = ren_preg;
      #1 ren_en = 0; fix_en = 0;
    end
    checks++;
    if (n_fix == 0 || n_fix_drop == 0) begin failures++; $display("FAIL fix coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

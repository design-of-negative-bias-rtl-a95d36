// Shared body of the predictor testbenches: drives random lookups and updates from a small set
// of PCs and compares lk_pred_zp with the reference function ref_pred() of the including file.
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [63:0] lk_pc, upd_pc;
  logic lk_pred_zp, upd_en, upd_zp;
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [63:0] rand_pc();
    // 24 static instructions spread so that some share a table entry
    int k;
    k = $urandom % 24;
    return 64'h1000 + 64'(k % 12) * 4 + 64'(k / 12) * 64'(ENT * 4);
  endfunction

  initial begin
    upd_en = 0; upd_pc = '0; upd_zp = 0; lk_pc = '0;
    ref_reset();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      lk_pc = rand_pc(); #1;
      checks++;
      if (lk_pred_zp !== ref_pred(lk_pc)) begin
        failures++; $display("FAIL pc %h pred %0d exp %0d", lk_pc, lk_pred_zp, ref_pred(lk_pc));
      end
      upd_en = ($urandom % 4) != 0; upd_pc = rand_pc(); upd_zp = 1'($urandom);
      @(posedge clk);
      if (upd_en) ref_update(upd_pc, upd_zp);
      #1 upd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

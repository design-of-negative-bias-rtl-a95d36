// tb_bank_free_list: an 8-register bank at base 16 with 3 registers in use at reset. Random
// allocations and releases of in-use registers are compared with a reference bitmap: the
// offered register must be the lowest free one, empty and the free count must match, and the
// list must run empty at least once.
module tb_bank_free_list;
  localparam int NENT = 8, BASE = 16;
  int checks = 0, failures = 0, n_empty = 0;
  logic clk = 0, rst_n = 0;
  logic empty, alloc_take;
  logic [7:0] alloc_preg;
  logic rel_en [2];
  logic [7:0] rel_preg [2];
  logic [3:0] free_count;
  bit fr [NENT];

  bank_free_list #(.NENT(NENT), .BASE(BASE), .INIT_USED(3), .PW(8), .NREL(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int low, cnt, r0, r1;
    alloc_take = 0; rel_en[0] = 0; rel_en[1] = 0; rel_preg[0] = '0; rel_preg[1] = '0;
    for (int i = 0; i < NENT; i++) fr[i] = (i >= 3);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      low = -1; cnt = 0;
      for (int i = NENT - 1; i >= 0; i--) if (fr[i]) begin low = i; end
      for (int i = 0; i < NENT; i++) cnt += fr[i];
      checks += 2;
      if (empty !== (cnt == 0)) begin failures++; $display("FAIL empty"); end
      if (free_count !== 4'(cnt)) begin failures++; $display("FAIL count"); end
      if (cnt == 0) n_empty++;
      if (cnt != 0) begin
        checks++;
        if (alloc_preg !== 8'(BASE + low)) begin failures++; $display("FAIL offer %0d exp %0d", alloc_preg, BASE + low); end
      end
      alloc_take = (cnt != 0) && ($urandom % 3 != 0);
      // release up to two distinct in-use registers (not the one being taken)
      r0 = $urandom % NENT; r1 = $urandom % NENT;
      rel_en[0] = !fr[r0] && ($urandom % 2 == 0);
      rel_en[1] = !fr[r1] && r1 != r0 && ($urandom % 2 == 0);
      rel_preg[0] = 8'(BASE + r0); rel_preg[1] = 8'(BASE + r1);
      @(posedge clk);
      if (alloc_take) fr[low] = 0;
      if (rel_en[0]) fr[r0] = 1;
      if (rel_en[1]) fr[r1] = 1;
    end
    checks++;
    if (n_empty == 0) begin failures++; $display("FAIL never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

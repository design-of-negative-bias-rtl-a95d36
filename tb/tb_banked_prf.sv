// tb_banked_prf: 224-register banked file. Random writes to both banks are read back on both
// ports: wide registers return the full 64 bits, short registers (112..223) the low 16 bits
// zero-extended. Also checks the all-zero state after reset.
module tb_banked_prf;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0]  rd_preg [2];
  logic [63:0] rd_data [2];
  logic        wr_en   [1];
  logic [7:0]  wr_preg [1];
  logic [63:0] wr_data [1];
  logic [63:0] rf [224];

  banked_prf dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int a, b;
    wr_en[0] = 0; wr_preg[0] = '0; wr_data[0] = '0; rd_preg[0] = '0; rd_preg[1] = '0;
    for (int i = 0; i < 224; i++) rf[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      a = $urandom % 224;
      wr_en[0] = 1'($urandom); wr_preg[0] = 8'(a); wr_data[0] = {$urandom, $urandom};
      @(posedge clk);
      if (wr_en[0]) rf[a] = (a < 112) ? wr_data[0] : {48'h0, wr_data[0][15:0]};
      #1 wr_en[0] = 0;
      a = $urandom % 224; b = $urandom % 224;
      rd_preg[0] = 8'(a); rd_preg[1] = 8'(b); #1;
      checks += 2;
      if (rd_data[0] !== rf[a]) begin failures++; $display("FAIL p%0d", a); end
      if (rd_data[1] !== rf[b]) begin failures++; $display("FAIL p%0d", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

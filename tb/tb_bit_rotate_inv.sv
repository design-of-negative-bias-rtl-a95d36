// tb_bit_rotate_inv: checks the write-side encoding (rotate left by the bit count, then invert)
// against a reference, that bit 0 lands in column bit_cnt, and that the read side restores the
// value for every bit count and both inversion phases.
module tb_bit_rotate_inv;
  int checks = 0, failures = 0;
  logic [63:0] wv, wc, rc, rv;
  logic [5:0]  wcnt, rcnt;
  logic        winv, rinv;

  bit_rotate_inv #(.W(64)) dut (.wr_value(wv), .wr_bit_cnt(wcnt), .wr_inv(winv), .wr_cells(wc),
                                .rd_cells(rc), .rd_bit_cnt(rcnt), .rd_inv(rinv), .rd_value(rv));

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] e;
    for (int c = 0; c < 64; c++) begin
      wv = 64'h1; wcnt = c[5:0]; winv = 1'b0; rc = '0; rcnt = '0; rinv = 1'b0; #1;
      chk("bit0 column", wc, 64'h1 << c);
      winv = 1'b1; #1;
      chk("bit0 column inverted", wc, ~(64'h1 << c));
    end
    for (int t = 0; t < 4000; t++) begin
      wv = {$urandom, $urandom}; wcnt = 6'($urandom); winv = 1'($urandom);
      #1;
      e = '0;
      for (int i = 0; i < 64; i++) e[(i + wcnt) % 64] = wv[i];
      e ^= {64{winv}};
      chk("encode", wc, e);
      rc = wc; rcnt = wcnt; rinv = winv; #1;
      chk("decode", rv, wv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

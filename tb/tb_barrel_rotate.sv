// tb_barrel_rotate: random check of the barrel rotator in both directions, for a power-of-two
// width (32, the register-file rows; 64, the bit columns) and an odd width (10), against a
// bit-by-bit reference rotation.
module tb_barrel_rotate;
  int checks = 0, failures = 0;

  logic [31:0] a32, l32, r32;  logic [4:0] s32;
  logic [63:0] a64, l64, r64;  logic [5:0] s64;
  logic [9:0]  a10, l10, r10;  logic [3:0] s10;

  barrel_rotate #(.W(32), .LEFT(1'b1)) u_l32 (.in(a32), .amt(s32), .out(l32));
  barrel_rotate #(.W(32), .LEFT(1'b0)) u_r32 (.in(a32), .amt(s32), .out(r32));
  barrel_rotate #(.W(64), .LEFT(1'b1)) u_l64 (.in(a64), .amt(s64), .out(l64));
  barrel_rotate #(.W(64), .LEFT(1'b0)) u_r64 (.in(a64), .amt(s64), .out(r64));
  barrel_rotate #(.W(10), .LEFT(1'b1)) u_l10 (.in(a10), .amt(s10), .out(l10));
  barrel_rotate #(.W(10), .LEFT(1'b0)) u_r10 (.in(a10), .amt(s10), .out(r10));

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] el, er;
    // one-hot select line 0 rotated by the shift count lands on row count (register rotation)
    a32 = 32'h1; a64 = '0; a10 = '0;
    for (int c = 0; c < 32; c++) begin
      s32 = c[4:0]; s64 = '0; s10 = '0; #1;
      chk("row0", 64'(l32), 64'(32'h1 << c));
    end
    for (int t = 0; t < 3000; t++) begin
      a32 = $urandom; a64 = {$urandom, $urandom}; a10 = 10'($urandom);
      s32 = 5'($urandom); s64 = 6'($urandom); s10 = 4'($urandom % 10);
      #1;
      el = '0; er = '0;
      for (int i = 0; i < 32; i++) begin el[(i + s32) % 32] = a32[i]; er[i] = a32[(i + s32) % 32]; end
      chk("l32", 64'(l32), el); chk("r32", 64'(r32), er);
      el = '0; er = '0;
      for (int i = 0; i < 64; i++) begin el[(i + s64) % 64] = a64[i]; er[i] = a64[(i + s64) % 64]; end
      chk("l64", l64, el); chk("r64", r64, er);
      el = '0; er = '0;
      for (int i = 0; i < 10; i++) begin el[(i + s10) % 10] = a10[i]; er[i] = a10[(i + s10) % 10]; end
      chk("l10", 64'(l10), el); chk("r10", 64'(r10), er);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_value_classifier: checks zero predominance (> 48 zero bits of 64), width and the 16-bit
// fit on edge values and random values of random widths, against $countones-based references.
module tb_value_classifier;
  int checks = 0, failures = 0;
  logic [63:0] value;
  logic zp, fits;
  logic [6:0] width;

  value_classifier dut (.value, .zp, .width, .fits);

  task automatic one(input logic [63:0] v);
    int ew;
    value = v; #1;
    ew = 0;
    for (int i = 0; i < 64; i++) if (v[i]) ew = i + 1;
    checks += 3;
    if (zp !== ((64 - $countones(v)) > 48)) begin failures++; $display("FAIL zp %h", v); end
    if (width !== 7'(ew)) begin failures++; $display("FAIL width %h got %0d", v, width); end
    if (fits !== (ew <= 16)) begin failures++; $display("FAIL fits %h", v); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    one(64'h0); one(64'hFFFF); one(64'h1FFFF); one(64'h8000); one(64'h1_0000);
    one('1); one(64'h0000_0000_0000_7FFF);
    one(64'h0000_0000_0000_FFFF);         // 48 zeros: not more than 75%
    one(64'h0000_0000_0000_7FFF);         // 49 zeros
    one(64'h8000_0000_0000_0001);
    for (int t = 0; t < 5000; t++) one({$urandom, $urandom} >> ($urandom % 64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

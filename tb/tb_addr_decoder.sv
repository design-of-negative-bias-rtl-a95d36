// tb_addr_decoder: exhaustive check of the one-hot register decoder (32 lines), enabled and
// disabled, against a shift-based reference.
module tb_addr_decoder;
  localparam int N = 32;
  logic       en;
  logic [4:0] addr;
  logic [N-1:0] sel;
  int checks = 0, failures = 0;

  addr_decoder #(.N(N)) dut (.en, .addr, .sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < N; a++) begin
        en = e[0]; addr = a[4:0];
        #1;
        checks++;
        if (sel !== (e ? (32'd1 << a) : 32'd0)) begin
          failures++;
          $display("FAIL en=%0d addr=%0d sel=%h", e, a, sel);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

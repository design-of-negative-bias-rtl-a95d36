// tb_remap_unit: writeback cases for the 224-register banked file. A wide value in a short
// register moves to the offered wide register (or stalls if none); a narrow value in a wide
// register moves to the offered short register if one is free; matching cases write in place.
// Also checks the observed ZP and width passed on, on random values.
module tb_remap_unit;
  int checks = 0, failures = 0;
  logic wb_valid, wide_empty, narrow_empty;
  logic [7:0] wb_preg, wide_preg, narrow_preg, prf_wr_preg, rel_preg, remap_old, remap_new;
  logic [63:0] wb_value;
  logic wb_stall, wb_done, obs_zp, prf_wr_en, take_wide, take_narrow, rel_en, remap;
  logic [6:0] obs_width;

  remap_unit dut (.*);

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit fits, shrt, e_remap, e_stall;
    int ew;
    wide_preg = 8'd5; narrow_preg = 8'd200;
    for (int t = 0; t < 4000; t++) begin
      wb_valid = ($urandom % 8) != 0;
      wb_preg = ($urandom % 2) ? 8'(112 + $urandom % 112) : 8'($urandom % 112);
      wb_value = {$urandom, $urandom} >> ($urandom % 64);
      wide_empty = ($urandom % 4) == 0; narrow_empty = ($urandom % 4) == 0;
      #1;
      ew = 0;
      for (int i = 0; i < 64; i++) if (wb_value[i]) ew = i + 1;
      fits = ew <= 16; shrt = wb_preg >= 112;
      e_stall = wb_valid && !fits && shrt && wide_empty;
      e_remap = wb_valid && ((!fits && shrt && !wide_empty) || (fits && !shrt && !narrow_empty));
      chk("stall", wb_stall, e_stall);
      chk("done", wb_done, wb_valid && !e_stall);
      chk("remap", remap, e_remap);
      chk("write", prf_wr_en, wb_valid && !e_stall);
      chk("write reg", prf_wr_preg, !e_remap ? wb_preg : (shrt ? 5 : 200));
      chk("take wide", take_wide, e_remap && shrt);
      chk("take short", take_narrow, e_remap && !shrt);
      chk("release", rel_en, e_remap);
      chk("release reg", rel_preg, wb_preg);
      chk("width", obs_width, ew);
      chk("zp", obs_zp, (64 - $countones(wb_value)) > 48);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

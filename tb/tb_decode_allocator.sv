// tb_decode_allocator: all combinations of valid, destination, prediction and bank state.
// Predicted ZP takes a short register, otherwise a wide one; an empty or busy bank stalls;
// a ZP-predicted instruction falls back to a wide register when the short bank is
// unavailable; an instruction without destination never stalls or allocates.
module tb_decode_allocator;
  int checks = 0, failures = 0;
  logic dec_valid, dec_has_dest, pred_zp, wide_empty, wide_busy, narrow_empty, narrow_busy;
  logic [7:0] wide_preg, narrow_preg, dest_preg;
  logic fire, stall, take_wide, take_narrow;

  decode_allocator dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit avail, efire, short;
    wide_preg = 8'd37; narrow_preg = 8'd150;
    for (int v = 0; v < 128; v++) begin
      {dec_valid, dec_has_dest, pred_zp, wide_empty, wide_busy, narrow_empty, narrow_busy} = 7'(v);
      #1;
      short = pred_zp && !(narrow_empty || narrow_busy);
      avail = !dec_has_dest || (short ? 1'b1 : !(wide_empty || wide_busy));
      efire = dec_valid && avail;
      checks += 5;
      if (fire !== efire) begin failures++; $display("FAIL fire v=%b", 7'(v)); end
      if (stall !== (dec_valid && !avail)) begin failures++; $display("FAIL stall v=%b", 7'(v)); end
      if (take_narrow !== (efire && dec_has_dest && short)) begin failures++; $display("FAIL tn v=%b", 7'(v)); end
      if (take_wide !== (efire && dec_has_dest && !short)) begin failures++; $display("FAIL tw v=%b", 7'(v)); end
      if (dest_preg !== (short ? 8'd150 : 8'd37)) begin failures++; $display("FAIL preg v=%b", 7'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

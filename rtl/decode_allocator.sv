// decode_allocator: destination-register allocation in the decode stage of the banked file.
//
// For each decoded instruction with a destination, the predicted zero predominance chooses
// the bank: pred_zp = 1 takes a short register from the narrow bank, pred_zp = 0 a wide one.
// If the chosen bank has no free register, or the remap unit takes that bank's offered
// register in this cycle (bank busy), the instruction stalls in decode and retries next cycle
// with a fresh prediction. An instruction without a destination passes without allocating.
// With NARROW_FALLBACK set (default), a ZP-predicted instruction that finds the short bank
// unavailable takes a wide register instead of stalling: a wide register holds any value, and
// without this a short bank filled by committed (live) values would stall decode for good.
// Allocation by predicted ZP and the stall on an empty bank follow the banked design; the
// fallback and the remap unit's priority over decode for a bank are this design's choices.
// Purely combinational: fire means the instruction leaves decode at the next clock edge.
module decode_allocator #(
  parameter int unsigned PW              = $clog2(nbti_pkg::NUM_PREGS),
  parameter bit          NARROW_FALLBACK = 1'b1
) (
  input  logic          dec_valid,
  input  logic          dec_has_dest,
  input  logic          pred_zp,
  input  logic          wide_empty,
  input  logic          wide_busy,
  input  logic [PW-1:0] wide_preg,
  input  logic          narrow_empty,
  input  logic          narrow_busy,
  input  logic [PW-1:0] narrow_preg,
  output logic          fire,
  output logic          stall,
  output logic          take_wide,
  output logic          take_narrow,
  output logic [PW-1:0] dest_preg
);
  logic n_ok, w_ok, use_short, avail;

  always_comb begin
    n_ok      = !(narrow_empty || narrow_busy);
    w_ok      = !(wide_empty || wide_busy);
    use_short = pred_zp && (n_ok || !NARROW_FALLBACK);
    avail     = !dec_has_dest || (use_short ? n_ok : w_ok);
    fire        = dec_valid && avail;
    stall       = dec_valid && !avail;
    take_narrow = fire && dec_has_dest && use_short;
    take_wide   = fire && dec_has_dest && !use_short;
    dest_preg   = use_short ? narrow_preg : wide_preg;
  end
endmodule

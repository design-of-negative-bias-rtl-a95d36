// remap_unit: bank-misprediction handling when an instruction writes back its result.
//
// The output value's width is computed (value_classifier). If it does not fit NARROW_W bits
// but the destination is a short register, the destination is remapped: a wide register is
// taken from the wide free list, the value is written there, the short register is returned
// to its free list and the remap is reported (remap, remap_old, remap_new) so that the rename
// map and every consumer holding the old tag can follow. With no free wide register the
// writeback stalls (wb_stall) and retries. If the value fits but the destination is wide, it
// is remapped into a short register when REMAP_TO_NARROW is set and one is free; otherwise it
// stays where it is, which is always correct.
// The observed ZP (more than 75% zero bits) is sent to the predictor when the writeback
// completes. Registers at or above NPREG/2 are short. Combinational; the register-file write
// and all list updates happen at the next clock edge.
// The width test and remapping in both directions follow the execute-stage flow; the stall
// when no wide register is free and the REMAP_TO_NARROW switch are this design's choices.
module remap_unit #(
  parameter int unsigned NPREG           = nbti_pkg::NUM_PREGS,
  parameter int unsigned W               = nbti_pkg::DATA_W,
  parameter int unsigned NARROW_W        = nbti_pkg::NARROW_W,
  parameter bit          REMAP_TO_NARROW = 1'b1,
  localparam int unsigned PW = $clog2(NPREG)
) (
  input  logic          wb_valid,
  input  logic [PW-1:0] wb_preg,
  input  logic [W-1:0]  wb_value,
  input  logic          wide_empty,
  input  logic [PW-1:0] wide_preg,
  input  logic          narrow_empty,
  input  logic [PW-1:0] narrow_preg,
  output logic          wb_stall,
  output logic          wb_done,
  output logic          obs_zp,
  output logic [$clog2(W+1)-1:0] obs_width,
  output logic          prf_wr_en,
  output logic [PW-1:0] prf_wr_preg,
  output logic          take_wide,
  output logic          take_narrow,
  output logic          rel_en,
  output logic [PW-1:0] rel_preg,
  output logic          remap,
  output logic [PW-1:0] remap_old,
  output logic [PW-1:0] remap_new
);
  logic fits, is_short;

  value_classifier #(.W(W), .NARROW_W(NARROW_W)) u_cls (
    .value(wb_value), .zp(obs_zp), .width(obs_width), .fits(fits));

  assign is_short = wb_preg >= PW'(NPREG / 2);

  always_comb begin
    wb_stall    = 1'b0;
    take_wide   = 1'b0;
    take_narrow = 1'b0;
    remap       = 1'b0;
    remap_new   = wb_preg;
    if (wb_valid) begin
      if (!fits && is_short) begin
        if (wide_empty) wb_stall = 1'b1;
        else begin
          remap     = 1'b1;
          take_wide = 1'b1;
          remap_new = wide_preg;
        end
      end else if (fits && !is_short && REMAP_TO_NARROW && !narrow_empty) begin
        remap       = 1'b1;
        take_narrow = 1'b1;
        remap_new   = narrow_preg;
      end
    end
    wb_done     = wb_valid && !wb_stall;
    prf_wr_en   = wb_done;
    prf_wr_preg = remap_new;
    rel_en      = remap;
    rel_preg    = wb_preg;
    remap_old   = wb_preg;
  end
endmodule

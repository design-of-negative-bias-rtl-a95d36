// value_classifier: classifies an instruction output value for the banked register file.
//
// zp    : zero predominance, 1 when more than 75% of the W bits are 0 (for W = 64: more than
//         48 zero bits). This is the property the stress predictors learn.
// width : number of significant bits, i.e. index of the highest 1 plus one (0 for value 0).
// fits  : the value fits a NARROW_W-bit register, i.e. width <= NARROW_W, so storing its low
//         NARROW_W bits and zero-extending on read loses nothing. Treating "narrow" as
//         zero-extended (not sign-extended) is this design's choice.
// Purely combinational.
module value_classifier #(
  parameter int unsigned W        = nbti_pkg::DATA_W,
  parameter int unsigned NARROW_W = nbti_pkg::NARROW_W,
  localparam int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  value,
  output logic          zp,
  output logic [CW-1:0] width,
  output logic          fits
);
  logic [CW-1:0] zeros;

  always_comb begin
    zeros = '0;
    width = '0;
    for (int unsigned i = 0; i < W; i++) begin
      zeros += CW'(!value[i]);
      if (value[i]) width = CW'(i + 1);
    end
  end

  // zeros > 3W/4  <=>  4*zeros > 3W
  assign zp   = ({2'b00, zeros} << 2) > (CW+2)'(3 * W);
  assign fits = width <= CW'(NARROW_W);
endmodule

// barrel_rotate: logarithmic barrel rotator for a W-bit vector, any W (not only powers of two).
//
// LEFT = 1: out[(i + amt) mod W] = in[i]   (bits move towards the MSB end)
// LEFT = 0: out[i] = in[(i + amt) mod W]   (bits move towards the LSB end)
// amt must be below W. Stage k rotates by the constant (2^k mod W) when bit k of amt is set,
// so each stage is a row of 2:1 multiplexers; rotation by a constant is only wiring.
// Combinational. It is used between the address decoder and the cell rows (register
// rotation) and on the data ports (bit rotation).
module barrel_rotate #(
  parameter int unsigned W    = 64,
  parameter bit          LEFT = 1'b1,
  localparam int unsigned SW  = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  in,
  input  logic [SW-1:0] amt,
  output logic [W-1:0]  out
);
  logic [W-1:0] stage [SW+1];

  assign stage[0] = in;
  for (genvar k = 0; k < SW; k++) begin : g_stage
    localparam int unsigned R = (2 ** k) % W;
    logic [W-1:0] rot;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (LEFT) begin : g_l
        assign rot[(i + R) % W] = stage[k][i];
      end else begin : g_r
        assign rot[i] = stage[k][(i + R) % W];
      end
    end
    assign stage[k+1] = amt[k] ? rot : stage[k];
  end
  assign out = stage[SW];
endmodule

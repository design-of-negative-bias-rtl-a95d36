// addr_decoder: register-number to one-hot select-line decoder.
//
// sel[i] is 1 when en is 1 and addr == i; all lines are 0 otherwise (also for addr >= N).
// Purely combinational. In the rotating register file its select lines feed the row barrel
// shifter rather than the cell rows directly; that placement follows the register rotation
// scheme, the decoder itself is an ordinary one.
module addr_decoder #(
  parameter int unsigned N  = 32,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  sel
);
  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < N; i++)
      sel[i] = en && (addr == AW'(i));
  end
endmodule

// tb_np_predictor: NP predictor (64 entries) against a reference that keeps, per entry, the
// full PC of the last instruction installed with a low-ZP outcome: a lookup predicts ZP = 0
// only for that instruction (same index and tag), ZP = 1 for all others; a ZP = 1 outcome of
// the tracked instruction removes it.
module tb_np_predictor;
  localparam int ENT = 64;
  bit          rv [ENT];
  logic [63:0] rpc [ENT];

  np_predictor #(.ENTRIES(ENT)) dut (.*);

  function automatic int idx(input logic [63:0] pc); return int'(pc[7:2]); endfunction
  function automatic bit same(input logic [63:0] a, input logic [63:0] b);
    return a[15:2] == b[15:2];   // index bits plus 8 tag bits
  endfunction
  function automatic void ref_reset(); for (int i = 0; i < ENT; i++) rv[i] = 0; endfunction
  function automatic logic ref_pred(input logic [63:0] pc);
    return !(rv[idx(pc)] && same(rpc[idx(pc)], pc));
  endfunction
  function automatic void ref_update(input logic [63:0] pc, input logic zpv);
    if (!zpv) begin rv[idx(pc)] = 1; rpc[idx(pc)] = pc; end
    else if (rv[idx(pc)] && same(rpc[idx(pc)], pc)) rv[idx(pc)] = 0;
  endfunction

  `include "tb_predictors.svh"
endmodule

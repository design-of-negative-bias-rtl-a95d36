// tb_last_value_predictor: last-value predictor (64 entries) against a reference that keeps
// the last ZP written to each entry (1 at reset).
module tb_last_value_predictor;
  localparam int ENT = 64;
  bit lv [ENT];

  last_value_predictor #(.ENTRIES(ENT)) dut (.*);

  function automatic int idx(input logic [63:0] pc); return int'(pc[7:2]); endfunction
  function automatic void ref_reset(); for (int i = 0; i < ENT; i++) lv[i] = 1; endfunction
  function automatic logic ref_pred(input logic [63:0] pc); return lv[idx(pc)]; endfunction
  function automatic void ref_update(input logic [63:0] pc, input logic zpv);
    lv[idx(pc)] = zpv;
  endfunction

  `include "tb_predictors.svh"
endmodule

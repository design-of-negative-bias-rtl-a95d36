// tb_bimodal_predictor: bimodal predictor (64 entries) against a reference saturating counter
// per entry (0 = strongly zero predominant at reset, 3 = strongly non-predominant; ZP = 1
// counts down, ZP = 0 up; states 0 and 1 predict ZP = 1).
module tb_bimodal_predictor;
  localparam int ENT = 64;
  int rc [ENT];

  bimodal_predictor #(.ENTRIES(ENT)) dut (.*);

  function automatic int idx(input logic [63:0] pc); return int'(pc[7:2]); endfunction
  function automatic void ref_reset(); for (int i = 0; i < ENT; i++) rc[i] = 0; endfunction
  function automatic logic ref_pred(input logic [63:0] pc); return rc[idx(pc)] < 2; endfunction
  function automatic void ref_update(input logic [63:0] pc, input logic zpv);
    if (zpv) rc[idx(pc)] = (rc[idx(pc)] > 0) ? rc[idx(pc)] - 1 : 0;
    else     rc[idx(pc)] = (rc[idx(pc)] < 3) ? rc[idx(pc)] + 1 : 3;
  endfunction

  `include "tb_predictors.svh"
endmodule

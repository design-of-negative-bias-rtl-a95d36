// rename_map_table: logical-to-physical register map of the renaming stage.
//
// NLREG entries of PW bits. Three combinational read ports: the two sources and the current
// mapping of the destination (the register to free when the renaming instruction commits).
// Two write ports, applied at the rising edge:
//   ren  : decode renames ren_lreg to ren_preg;
//   fix  : a bank remap moves logical register fix_lreg from fix_old to fix_new, applied only
//          if the entry still holds fix_old (a younger rename of the same register is kept),
//          and never when ren writes the same entry in the same cycle.
// Reset value: logical register i maps to i for i < INIT_WIDE (the wide bank), and to
// NARROW_BASE + (i - INIT_WIDE) otherwise (the narrow bank; all registers start at zero,
// which fits). The initial split is this design's choice.
module rename_map_table #(
  parameter int unsigned NLREG       = nbti_pkg::NUM_LREGS,
  parameter int unsigned PW          = $clog2(nbti_pkg::NUM_PREGS),
  parameter int unsigned INIT_WIDE   = 80,
  parameter int unsigned NARROW_BASE = nbti_pkg::NUM_PREGS / 2,
  localparam int unsigned LW = $clog2(NLREG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [LW-1:0] src_lreg [2],
  output logic [PW-1:0] src_preg [2],
  input  logic [LW-1:0] dst_lreg,
  output logic [PW-1:0] dst_old_preg,
  input  logic          ren_en,
  input  logic [LW-1:0] ren_lreg,
  input  logic [PW-1:0] ren_preg,
  input  logic          fix_en,
  input  logic [LW-1:0] fix_lreg,
  input  logic [PW-1:0] fix_old,
  input  logic [PW-1:0] fix_new
);
  logic [PW-1:0] map [NLREG];

  assign src_preg[0]  = map[src_lreg[0]];
  assign src_preg[1]  = map[src_lreg[1]];
  assign dst_old_preg = map[dst_lreg];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NLREG; i++)
        map[i] <= (i < INIT_WIDE) ? PW'(i) : PW'(NARROW_BASE + i - INIT_WIDE);
    end else begin
      if (fix_en && map[fix_lreg] == fix_old && !(ren_en && ren_lreg == fix_lreg))
        map[fix_lreg] <= fix_new;
      if (ren_en) map[ren_lreg] <= ren_preg;
    end
  end
endmodule

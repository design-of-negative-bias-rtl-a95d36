// bit_rotate_inv: data-port encoder and decoder for bit-level rotation with inversion.
//
// Write side: the register value is rotated left by bit_cnt (bit 0 lands in column bit_cnt)
// and then inverted when inv is set, giving the word stored in the cells.
// Read side: the cell word is inverted when inv is set and rotated right by bit_cnt, giving
// back the register value. With the same bit_cnt and inv on both sides, rd_value equals the
// wr_value that was stored. The write-side left rotation and the read-side inversion of the
// outgoing data follow the rotation/inversion scheme; applying the inversion after the
// rotation (the order is immaterial for a whole-word inversion) is this design's choice.
// Combinational; wr_* and rd_* are independent so that each may use its own mapping.
module bit_rotate_inv #(
  parameter int unsigned W  = 64,
  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1
) (
  // write side
  input  logic [W-1:0]  wr_value,
  input  logic [SW-1:0] wr_bit_cnt,
  input  logic          wr_inv,
  output logic [W-1:0]  wr_cells,
  // read side
  input  logic [W-1:0]  rd_cells,
  input  logic [SW-1:0] rd_bit_cnt,
  input  logic          rd_inv,
  output logic [W-1:0]  rd_value
);
  logic [W-1:0] wr_rot, rd_plain;

  barrel_rotate #(.W(W), .LEFT(1'b1)) u_wr_rot (.in(wr_value), .amt(wr_bit_cnt), .out(wr_rot));
  assign wr_cells = wr_rot ^ {W{wr_inv}};

  assign rd_plain = rd_cells ^ {W{rd_inv}};
  barrel_rotate #(.W(W), .LEFT(1'b0)) u_rd_rot (.in(rd_plain), .amt(rd_bit_cnt), .out(rd_value));
endmodule

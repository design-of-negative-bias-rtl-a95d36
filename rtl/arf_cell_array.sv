// arf_cell_array: the rows x columns of storage cells of the architecture register file.
//
// Rows are addressed by one-hot select lines, as they come out of the row barrel shifter.
// One write port: when wr_sel has a bit set, that row takes wr_cells at the rising clock edge.
// NRD read ports: rd_cells[p] is the OR over rows of (row AND rd_sel[p][row]), i.e. the selected
// row, combinationally (all zeros when no line is set). Reset clears every cell; the
// reset, the port count and the combinational read are this design's choices.
module arf_cell_array #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned W    = 64,
  parameter int unsigned NRD  = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ROWS-1:0]     wr_sel,
  input  logic [W-1:0]        wr_cells,
  input  logic [ROWS-1:0]     rd_sel   [NRD],
  output logic [W-1:0]        rd_cells [NRD]
);
  logic [W-1:0] cells [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < ROWS; r++) cells[r] <= '0;
    end else begin
      for (int unsigned r = 0; r < ROWS; r++)
        if (wr_sel[r]) cells[r] <= wr_cells;
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < NRD; p++) begin
      rd_cells[p] = '0;
      for (int unsigned r = 0; r < ROWS; r++)
        rd_cells[p] |= cells[r] & {W{rd_sel[p][r]}};
    end
  end
endmodule

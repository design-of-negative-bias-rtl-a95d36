// arf_rbr_inv: NBTI-tolerant architecture register file with register rotation, bit rotation
// and periodic inversion (RBR+INV).
//
// A plain register file keeps register r in the same row of cells, bit b in the same column,
// for the whole life of the chip, so the skewed values of programs (mostly zeros) hold the
// same cells at the same value and age them unevenly. Here the register number goes through
// the address decoder and then a barrel shifter that rotates the select lines by row_cnt, so
// register r uses row (r + row_cnt) mod N; data is rotated left by bit_cnt on the way in and
// right on the way out, so bit b uses column (b + bit_cnt) mod W; and the stored word is
// inverted in alternate mapping periods. Each mapping change (remap_req, meant to be issued at
// an operating-system context switch) moves every register one row, every bit one column and
// flips the inversion, so over time every cell sees every register bit in both polarities.
//
// Ports: NRD combinational read ports (rd_addr -> rd_data in the same cycle) and one write
// port (written at the rising edge). remap_migrate selects whether a mapping change carries
// the register contents over (value update, busy for N+1 cycles, ports ignored meanwhile) or
// only changes the mapping (contents saved and restored around the change by software).
// row_cnt / bit_cnt / inv show the current mapping. The two-read one-write port count, the
// combinational read and the reset to all zeros are this design's choices; the scheme does
// not fix them. Defaults: 32 registers of 64 bits (the SPARC V9 integer register groups).
module arf_rbr_inv #(
  parameter int unsigned N      = nbti_pkg::ARF_REGS,
  parameter int unsigned W      = nbti_pkg::DATA_W,
  parameter int unsigned NRD    = 2,
  parameter bit          EN_RR  = 1'b1,
  parameter bit          EN_BR  = 1'b1,
  parameter bit          EN_INV = 1'b1,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] rd_addr [NRD],
  output logic [W-1:0]  rd_data [NRD],
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          remap_req,
  input  logic          remap_migrate,
  output logic          busy,
  output logic [AW-1:0] row_cnt,
  output logic [SW-1:0] bit_cnt,
  output logic          inv
);
  logic [AW-1:0] rd_row_cnt, wr_row_cnt;
  logic [SW-1:0] rd_bit_cnt, wr_bit_cnt;
  logic          rd_inv, wr_inv;
  logic [AW-1:0] mig_rd_reg, mig_wr_reg;
  logic          mig_wr_en;
  logic [W-1:0]  mig_wr_data;

  rotation_controller #(.N(N), .W(W), .EN_RR(EN_RR), .EN_BR(EN_BR), .EN_INV(EN_INV)) u_ctrl (
    .clk, .rst_n, .remap_req, .remap_migrate, .busy,
    .rd_row_cnt, .rd_bit_cnt, .rd_inv, .wr_row_cnt, .wr_bit_cnt, .wr_inv,
    .mig_rd_reg, .mig_rd_data(rd_data[0]), .mig_wr_en, .mig_wr_reg, .mig_wr_data
  );

  // ---- write path: decoder -> row barrel shifter; data -> bit rotation + inversion
  logic          w_en;
  logic [AW-1:0] w_reg;
  logic [W-1:0]  w_value, w_cells;
  logic [N-1:0]  w_dec, w_sel;

  assign w_en    = busy ? mig_wr_en   : wr_en;
  assign w_reg   = busy ? mig_wr_reg  : wr_addr;
  assign w_value = busy ? mig_wr_data : wr_data;

  addr_decoder  #(.N(N))                u_wdec (.en(w_en), .addr(w_reg), .sel(w_dec));
  barrel_rotate #(.W(N), .LEFT(1'b1))   u_wrow (.in(w_dec), .amt(wr_row_cnt), .out(w_sel));

  // ---- read paths
  logic [N-1:0]  r_dec [NRD];
  logic [N-1:0]  r_sel [NRD];
  logic [W-1:0]  r_cells [NRD];
  logic [AW-1:0] r_reg [NRD];

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    assign r_reg[p] = (p == 0 && busy) ? mig_rd_reg : rd_addr[p];
    addr_decoder  #(.N(N))              u_rdec (.en(1'b1), .addr(r_reg[p]), .sel(r_dec[p]));
    barrel_rotate #(.W(N), .LEFT(1'b1)) u_rrow (.in(r_dec[p]), .amt(rd_row_cnt), .out(r_sel[p]));
    if (p == 0) begin : g_p0
      // port 0 shares its bit decoder with the write-side encoder
      bit_rotate_inv #(.W(W)) u_code (
        .wr_value(w_value), .wr_bit_cnt(wr_bit_cnt), .wr_inv(wr_inv), .wr_cells(w_cells),
        .rd_cells(r_cells[p]), .rd_bit_cnt(rd_bit_cnt), .rd_inv(rd_inv), .rd_value(rd_data[p]));
    end else begin : g_pn
      logic [W-1:0] unused_cells;
      bit_rotate_inv #(.W(W)) u_code (
        .wr_value('0), .wr_bit_cnt('0), .wr_inv(1'b0), .wr_cells(unused_cells),
        .rd_cells(r_cells[p]), .rd_bit_cnt(rd_bit_cnt), .rd_inv(rd_inv), .rd_value(rd_data[p]));
    end
  end

  arf_cell_array #(.ROWS(N), .W(W), .NRD(NRD)) u_cells (
    .clk, .rst_n, .wr_sel(w_sel), .wr_cells(w_cells), .rd_sel(r_sel), .rd_cells(r_cells));

  assign row_cnt = rd_row_cnt;
  assign bit_cnt = rd_bit_cnt;
  assign inv     = rd_inv;
endmodule

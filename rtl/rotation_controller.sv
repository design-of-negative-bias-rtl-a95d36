// rotation_controller: mapping state and value-update sequencer of the rotating register file.
//
// It holds the current mapping: the row shift count (register r lives in row (r+row_cnt) mod N),
// the bit shift count (register bit b lives in column (b+bit_cnt) mod W) and the inversion
// phase. On a mapping change (remap_req) each enabled mechanism advances by one step:
// row_cnt+1 mod N, bit_cnt+1 mod W, inv toggled. Row and bit counts advance together, one
// shift count per change as in the rotation scheme; stepping by one per change follows the
// scheme, the wrap of each count at its own size is this design's choice.
//
// Two ways to change the mapping:
//  * remap_migrate = 0: the mapping changes at the next clock edge and the cell contents are
//    not carried over. This is the context-switch use: the register state has been saved
//    before the change and is restored after it, so no value update is needed.
//  * remap_migrate = 1: value update. The registers are moved so that software sees the same
//    values under the new mapping. Because every register moves one row down, register r's
//    new row is register r+1's old row; the sequencer first copies register N-1 into a holding
//    register, then moves registers N-2 .. 0 one per cycle (read with the old mapping, written
//    with the new one), then writes register N-1 from the holding register. busy is high for
//    these N+1 cycles and the ports of the register file belong to the sequencer.
// The sequencer uses read port 0 (mig_rd_*) and the write port (mig_wr_*) of the register
// file; rd_* and wr_* mapping outputs tell the datapath which mapping each side uses.
// Because the inversion phase steps with the shift count, a given register bit always meets a
// given cell in the same polarity; balancing relies on the mix of registers and bits a cell sees.
// A remap_req while busy is ignored. EN_RR, EN_BR and EN_INV switch the three mechanisms, so
// RR, BR, RBR and RBR+INV are all available; all three are on by default (RBR+INV).
module rotation_controller #(
  parameter int unsigned N      = 32,
  parameter int unsigned W      = 64,
  parameter bit          EN_RR  = 1'b1,
  parameter bit          EN_BR  = 1'b1,
  parameter bit          EN_INV = 1'b1,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          remap_req,
  input  logic          remap_migrate,
  output logic          busy,
  // mapping used by the read ports and by the write port
  output logic [AW-1:0] rd_row_cnt,
  output logic [SW-1:0] rd_bit_cnt,
  output logic          rd_inv,
  output logic [AW-1:0] wr_row_cnt,
  output logic [SW-1:0] wr_bit_cnt,
  output logic          wr_inv,
  // value-update access to the register file
  output logic [AW-1:0] mig_rd_reg,
  input  logic [W-1:0]  mig_rd_data,
  output logic          mig_wr_en,
  output logic [AW-1:0] mig_wr_reg,
  output logic [W-1:0]  mig_wr_data
);
  logic [AW-1:0] row_cnt, row_nxt;
  logic [SW-1:0] bit_cnt, bit_nxt;
  logic          inv, inv_nxt;
  logic          mig;
  logic [AW:0]   step;      // 0 .. N
  logic [W-1:0]  hold;

  always_comb begin
    row_nxt = row_cnt;
    bit_nxt = bit_cnt;
    inv_nxt = inv;
    if (EN_RR)  row_nxt = (row_cnt == AW'(N - 1)) ? '0 : row_cnt + 1'b1;
    if (EN_BR)  bit_nxt = (bit_cnt == SW'(W - 1)) ? '0 : bit_cnt + 1'b1;
    if (EN_INV) inv_nxt = ~inv;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_cnt <= '0;
      bit_cnt <= '0;
      inv     <= 1'b0;
      mig     <= 1'b0;
      step    <= '0;
      hold    <= '0;
    end else if (!mig) begin
      if (remap_req) begin
        if (remap_migrate) begin
          mig  <= 1'b1;
          step <= '0;
        end else begin
          row_cnt <= row_nxt;
          bit_cnt <= bit_nxt;
          inv     <= inv_nxt;
        end
      end
    end else begin
      if (step == '0) hold <= mig_rd_data;
      if (step == (AW+1)'(N)) begin
        mig     <= 1'b0;
        row_cnt <= row_nxt;
        bit_cnt <= bit_nxt;
        inv     <= inv_nxt;
      end else begin
        step <= step + 1'b1;
      end
    end
  end

  assign busy       = mig;
  assign rd_row_cnt = row_cnt;
  assign rd_bit_cnt = bit_cnt;
  assign rd_inv     = inv;
  assign wr_row_cnt = mig ? row_nxt : row_cnt;
  assign wr_bit_cnt = mig ? bit_nxt : bit_cnt;
  assign wr_inv     = mig ? inv_nxt : inv;

  // step 0: read register N-1 into hold; step k (1..N-1): move register N-1-k;
  // step N: write register N-1 from hold.
  always_comb begin
    mig_rd_reg  = AW'(N - 1);
    mig_wr_en   = 1'b0;
    mig_wr_reg  = AW'(N - 1);
    mig_wr_data = mig_rd_data;
    if (mig && step != '0) begin
      mig_wr_en = 1'b1;
      if (step == (AW+1)'(N)) begin
        mig_wr_data = hold;
      end else begin
        mig_rd_reg = AW'((AW+1)'(N - 1) - step);
        mig_wr_reg = AW'((AW+1)'(N - 1) - step);
      end
    end
  end
endmodule

// banked_prf: physical register file split into a wide bank and a compressed narrow bank.
//
// Physical registers 0 .. NPREG/2-1 form the wide bank (W bits each), registers
// NPREG/2 .. NPREG-1 the narrow bank (NARROW_W bits each). In silicon the narrow bank is the
// one built from up-sized (NBTI-tolerant) cells; logically it simply stores fewer bits.
// A write to a narrow register keeps the low NARROW_W bits of the data; a read of a narrow
// register returns them zero-extended to W bits. The caller must only write values that fit
// (the remap unit guarantees this).
// Ports: NRD combinational read ports, NWR write ports written at the rising edge (a higher
// port number wins on a clash). Reset clears all registers. The two equal banks, 64/16-bit
// widths and 224 registers follow the banked design; the port counts, combinational read and
// reset are this design's choices.
module banked_prf #(
  parameter int unsigned NPREG    = nbti_pkg::NUM_PREGS,
  parameter int unsigned W        = nbti_pkg::DATA_W,
  parameter int unsigned NARROW_W = nbti_pkg::NARROW_W,
  parameter int unsigned NRD      = 2,
  parameter int unsigned NWR      = 1,
  localparam int unsigned PW   = $clog2(NPREG),
  localparam int unsigned HALF = NPREG / 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] rd_preg [NRD],
  output logic [W-1:0]  rd_data [NRD],
  input  logic          wr_en   [NWR],
  input  logic [PW-1:0] wr_preg [NWR],
  input  logic [W-1:0]  wr_data [NWR]
);
  logic [W-1:0]        wide   [HALF];
  logic [NARROW_W-1:0] narrow [NPREG - HALF];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < HALF; i++)         wide[i]   <= '0;
      for (int unsigned i = 0; i < NPREG - HALF; i++) narrow[i] <= '0;
    end else begin
      for (int unsigned p = 0; p < NWR; p++) begin
        if (wr_en[p]) begin
          if (wr_preg[p] < PW'(HALF)) wide[wr_preg[p]] <= wr_data[p];
          else narrow[wr_preg[p] - PW'(HALF)] <= wr_data[p][NARROW_W-1:0];
        end
      end
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < NRD; p++) begin
      if (rd_preg[p] < PW'(HALF)) rd_data[p] = wide[rd_preg[p]];
      else if (rd_preg[p] < PW'(NPREG)) rd_data[p] = W'(narrow[rd_preg[p] - PW'(HALF)]);
      else rd_data[p] = '0;
    end
  end
endmodule

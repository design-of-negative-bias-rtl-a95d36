// bank_free_list: free list of the physical registers of one bank.
//
// The bank holds registers BASE .. BASE+NENT-1. A bitmap keeps one free bit per register; the
// offered register (alloc_preg) is the lowest-numbered free one, and empty is 1 when none is
// free. alloc_take removes the offered register at the rising edge; each of the NREL release
// ports (rel_en/rel_preg) returns a register of this bank. A register taken and released in
// the same cycle ends free. At reset registers BASE .. BASE+INIT_USED-1 are in use (they hold
// the initial logical-register mappings) and the rest are free. R10K-style renaming keeps
// free lists; a bitmap with lowest-first choice, rather than a FIFO, is this design's choice.
// The assertion a_rel_ok (a released register belongs to this bank and is in use) is
// disabled during reset, so rst_n is also sampled at the clock edge by the checker; lint
// tools report this as a net used both synchronously and asynchronously. It stands: the
// checker is not hardware, and the flip-flops use rst_n only as an asynchronous reset.
module bank_free_list #(
  parameter int unsigned NENT      = nbti_pkg::NUM_PREGS / 2,
  parameter int unsigned BASE      = 0,
  parameter int unsigned INIT_USED = 0,
  parameter int unsigned PW        = $clog2(nbti_pkg::NUM_PREGS),
  parameter int unsigned NREL      = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          empty,
  output logic [PW-1:0] alloc_preg,
  input  logic          alloc_take,
  input  logic          rel_en   [NREL],
  input  logic [PW-1:0] rel_preg [NREL],
  output logic [$clog2(NENT+1)-1:0] free_count
);
  logic [NENT-1:0] free_q;

  always_comb begin
    alloc_preg = PW'(BASE);
    for (int i = NENT - 1; i >= 0; i--)
      if (free_q[i]) alloc_preg = PW'(BASE + i);
    free_count = '0;
    for (int unsigned i = 0; i < NENT; i++) free_count += free_q[i];
  end
  assign empty = (free_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NENT; i++) free_q[i] <= (i >= INIT_USED);
    end else begin
      if (alloc_take && !empty) free_q[alloc_preg - PW'(BASE)] <= 1'b0;
      for (int unsigned p = 0; p < NREL; p++)
        if (rel_en[p]) free_q[rel_preg[p] - PW'(BASE)] <= 1'b1;
    end
  end

  // A released register must belong to this bank and must be in use.
  for (genvar p = 0; p < NREL; p++) begin : g_chk
    a_rel_ok: assert property (@(posedge clk) disable iff (!rst_n)
      rel_en[p] |-> (rel_preg[p] >= PW'(BASE) && rel_preg[p] < PW'(BASE + NENT)
                     && !free_q[rel_preg[p] - PW'(BASE)]))
      else $error("bank_free_list: bad release of register %0d", rel_preg[p]);
  end
endmodule

// nbti_pkg: constants and types shared by the NBTI-tolerant register files.
//
// The architecture register file (rotation + inversion) defaults to 32 registers of 64 bits,
// the four SPARC V9 integer groups of eight registers. The physical register file defaults to
// 224 physical registers behind 160 logical (windowed) registers, split in two equal banks:
// a 64-bit bank and a 16-bit compressed bank. Predictor tables default to 8k entries.
package nbti_pkg;
  localparam int unsigned ARF_REGS     = 32;
  localparam int unsigned DATA_W       = 64;
  localparam int unsigned NARROW_W     = 16;
  localparam int unsigned NUM_PREGS    = 224;
  localparam int unsigned NUM_LREGS    = 160;
  localparam int unsigned PRED_ENTRIES = 8192;
  localparam int unsigned PC_W         = 64;

  // Which zero-predominance predictor the physical register file uses.
  typedef enum logic [1:0] {
    PRED_NP       = 2'd0,   // non-zero predominance predictor (the default)
    PRED_BIMODAL  = 2'd1,   // 2-bit saturating counters
    PRED_LASTVAL  = 2'd2    // last observed ZP
  } pred_kind_e;

  // States of the bimodal predictor's 2-bit counter.
  typedef enum logic [1:0] {
    BM_STRONG_ZP  = 2'd0,
    BM_WEAK_ZP    = 2'd1,
    BM_WEAK_NZP   = 2'd2,
    BM_STRONG_NZP = 2'd3
  } bimodal_state_e;
endpackage

// furbys_pkg: shared constants and types of the FURBYS micro-op cache.
//
// A micro-op cache keeps decoded micro-ops in fixed-size entries. A
// prediction window (PW) -- the run of micro-ops from a branch target up to
// a taken branch or the end of a 64-byte instruction-cache line -- occupies
// one or more entries of the same set and is kept or evicted as a whole.
// FURBYS adds to each entry a 3-bit weight (a profile-derived hit-rate
// group, 0 = coldest) and 2 SRRIP re-reference bits, and to each set a
// two-slot record of recently evicted ways.
//
// The entry format follows the evaluated design: 8 micro-ops of 56 bits and
// 4 immediates of 32 bits per entry (576 bits, 4608 bits per 8-way set).
// The 48-bit address, the cap of MAX_PW_ENTRIES entries per PW and the
// status and decision encodings are this design's own choices.
package furbys_pkg;

  localparam int unsigned ADDR_W         = 48;  // virtual fetch address width
  localparam int unsigned LINE_OFF_W     = 6;   // 64-byte icache line
  localparam int unsigned UOP_W          = 56;  // bits per micro-op
  localparam int unsigned IMM_W          = 32;  // bits per immediate
  localparam int unsigned UOPS_PER_ENTRY = 8;
  localparam int unsigned IMMS_PER_ENTRY = 4;
  localparam int unsigned WEIGHT_W       = 3;   // 8 hit-rate groups
  localparam int unsigned RRPV_W         = 2;   // SRRIP state per entry
  localparam int unsigned MAX_PW_ENTRIES = 4;   // largest PW, in entries

  localparam int unsigned EU_W  = $clog2(UOPS_PER_ENTRY + 1);               // uops in one entry
  localparam int unsigned EI_W  = $clog2(IMMS_PER_ENTRY + 1);               // imms in one entry
  localparam int unsigned PWU_W = $clog2(MAX_PW_ENTRIES * UOPS_PER_ENTRY + 1); // uops in one PW
  localparam int unsigned PWE_W = $clog2(MAX_PW_ENTRIES + 1);               // entries in one PW
  localparam int unsigned SEQ_W = (MAX_PW_ENTRIES > 1) ? $clog2(MAX_PW_ENTRIES) : 1;

  typedef logic [ADDR_W-1:0]   addr_t;
  typedef logic [WEIGHT_W-1:0] weight_t;
  typedef logic [RRPV_W-1:0]   rrpv_t;

  // Payload of one micro-op cache entry.
  typedef struct packed {
    logic [UOPS_PER_ENTRY-1:0][UOP_W-1:0] uops;
    logic [IMMS_PER_ENTRY-1:0][IMM_W-1:0] imms;
  } entry_t;

  // A fully accumulated prediction window, handed from the accumulation
  // buffer to the micro-op cache for insertion.
  typedef struct packed {
    addr_t                                start;       // PW start address (lookup index)
    weight_t                              weight;      // hit-rate group from the hint
    logic [PWE_W-1:0]                     n_entries;   // size: entries occupied
    logic [PWU_W-1:0]                     n_uops;      // cost: micro-ops held
    logic [MAX_PW_ENTRIES-1:0][EU_W-1:0]  entry_uops;  // valid uops per entry
    entry_t [MAX_PW_ENTRIES-1:0]          entries;
  } pw_t;

  // Final replacement decision; the values are the select inputs of the
  // decision multiplexer (0 FURBYS victim, 1 SRRIP victim, 2 bypass).
  typedef enum logic [1:0] {
    DEC_FURBYS = 2'd0,
    DEC_SRRIP  = 2'd1,
    DEC_BYPASS = 2'd2
  } decision_e;

  // Outcome of a lookup, reported with its last beat.
  typedef enum logic [1:0] {
    LK_MISS    = 2'd0,
    LK_HIT     = 2'd1,
    LK_PARTIAL = 2'd2
  } lookup_status_e;

endpackage

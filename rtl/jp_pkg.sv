// jp_pkg: types and constants shared by the Java bytecode/array prefetching
// memory system.
//
// Addresses are 32-bit byte addresses. The unit of caching and prefetching is
// a 16-byte block (one data-cache line), so a block number is the upper 28
// address bits. The 16-byte line and the 28-bit block numbers printed in the
// example tables of the design follow the described configuration; the 32-bit
// data word is this design's choice.
package jp_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned LINE_BYTES = 16;
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);   // 4
  localparam int unsigned BLK_W      = ADDR_W - OFF_W;        // 28
  localparam int unsigned WORD_W     = 32;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;        // 128
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / (WORD_W / 8);

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [BLK_W-1:0]  blk_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LINE_W-1:0] line_t;

  // How the bytecode PC arrived at its current value. Only meaningful on the
  // first fetch of a new block: it classifies the block transition (P, Q).
  typedef enum logic [1:0] {
    PC_FLOW   = 2'd0,   // sequential flow or branch
    PC_INVOKE = 2'd1,   // transfer caused by a method invocation
    PC_RETURN = 2'd2    // transfer caused by a method return
  } pc_kind_e;

  // Stored states of an NBPT entry. The fourth state, sequential with high
  // confidence (S-HC), is represented by the absence of an entry.
  typedef enum logic [1:0] {
    NB_S_LC  = 2'd1,
    NB_NS_LC = 2'd2,
    NB_NS_HC = 2'd3
  } nbpt_state_e;

  // Stride-table entry state (2-state design).
  typedef enum logic {
    ST_INIT   = 1'b0,
    ST_STEADY = 1'b1
  } st_state_e;

  // One-cycle event strobes of the bytecode prefetch unit.
  typedef struct packed {
    logic blk_switch;   // PC entered a new block
    logic pred_seq;     // sequential prediction Q+1
    logic pred_nonseq;  // prediction from a recorded next block
    logic pred_extra;   // extra block r+1 around invoke/return
    logic suppress;     // return into an invoking block, no prefetch
    logic insert;       // new entry (S-HC -> S-LC)
    logic remove;       // entry dropped (-> S-HC)
    logic retarget;     // next-block field replaced
    logic to_nshc;      // entry reached NS-HC
    logic to_nslc;      // entry moved to NS-LC
  } nbpt_ev_t;

  // One-cycle event strobes of the array prefetch unit.
  typedef struct packed {
    logic insert;         // array inserted in the stride table
    logic skip_single;    // array inside one block, not tracked
    logic steady;         // stride confirmed
    logic irregular;      // stride changed, back to Init
    logic small_pf;       // next-block prefetch (|stride| <= H)
    logic large_pf;       // depth prefetch (|stride| > H)
    logic trigger_gated;  // prefetch suppressed by the trigger block
    logic circular;       // a target wrapped to the other array end
  } st_ev_t;

  // One-cycle event strobes of the memory controller.
  typedef struct packed {
    logic cache_hit;    // demand read served by the cache
    logic pbuf_hit;     // demand read miss found in the prefetch buffer
    logic true_miss;    // demand read sent to memory
    logic late_merge;   // demand miss merged with the outstanding prefetch
    logic pf_issue;     // prefetch sent to memory
    logic pf_filtered;  // queued prefetch dropped: block already held
    logic stall;        // demand access waiting this cycle
    logic write;        // store written through
  } mc_ev_t;

  function automatic blk_t addr2blk(addr_t a);
    return blk_t'(a >> OFF_W);
  endfunction

endpackage

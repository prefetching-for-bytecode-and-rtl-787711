// nbpt_prefetcher: bytecode prefetch unit built around a non-sequential block
// prediction table (NBPT).
//
// The unit watches the bytecode program counter. When the PC enters a new
// 16-byte block Q coming from block P (a "block switch"), it does two things in
// the same cycle:
//   1. Prediction: Q is looked up in the NBPT. With no entry (state S-HC) or an
//      entry in S-LC the prediction is the sequential block Q+1. With an entry
//      in NS-LC or NS-HC the prediction is the recorded next block r; if the
//      entry's I-bit or R-bit is set, r+1 is predicted as well (the extra
//      prefetch that exploits the software work done on invoke/return). If the
//      switch (P,Q) is a method return and Q's entry has its I-bit set, the
//      invoked method is not prefetched again and nothing is issued.
//   2. Update: the entry of P is inserted, updated or removed by (P,Q):
//        no entry, non-sequential      -> insert (P,Q) in S-LC, I/R from kind
//        S-LC,  Q matches next         -> NS-HC
//        S-LC,  sequential, I-bit = 0  -> removed (S-HC)
//        S-LC,  sequential, I-bit = 1  -> NS-LC
//        S-LC,  other non-sequential   -> NS-LC, next := Q
//        NS-LC, Q matches next         -> NS-HC
//        NS-LC, sequential             -> removed (S-HC)
//        NS-LC, other non-sequential   -> NS-LC, next := Q
//        NS-HC, Q matches next         -> NS-HC
//        NS-HC, anything else          -> NS-LC
//   The states, the prediction rules, the I/R-bits and most arcs follow the
//   described design; the arcs for a non-sequential mismatch in S-LC and for a
//   sequential switch in NS-LC are this design's reading of the state diagram.
//
// The table is fully associative with NBPT_ENTRIES entries; a new entry takes
// the first invalid slot, else a round-robin victim (the replacement policy is
// this design's choice).
//
// Interface: pc_valid/pc/pc_kind report each bytecode fetch; pc_kind tells how
// the PC got there and is used on the first fetch of a block. en gates the
// prefetch outputs (the table keeps learning). pf_valid[i]/pf_blk[i] carry up
// to two prefetch block numbers, registered: they are valid for one cycle, the
// cycle after the fetch that caused the block switch.
module nbpt_prefetcher
  import jp_pkg::*;
#(
  parameter int unsigned NBPT_ENTRIES = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     pc_valid,
  input  addr_t    pc,
  input  pc_kind_e pc_kind,
  output logic     pf_valid [2],
  output blk_t     pf_blk   [2],
  output nbpt_ev_t ev
);

  localparam int unsigned IDX_W = (NBPT_ENTRIES > 1) ? $clog2(NBPT_ENTRIES) : 1;

  typedef struct packed {
    logic        valid;
    blk_t        cur;     // tag: current block P
    blk_t        nxt;     // recorded non-sequential next block
    nbpt_state_e state;
    logic        ibit;
    logic        rbit;
  } nbpt_entry_t;

  nbpt_entry_t tbl [NBPT_ENTRIES];
  logic [IDX_W-1:0] rr_ptr;

  blk_t cur_blk;
  logic cur_valid;

  blk_t q_blk;
  logic sw;            // block switch this cycle
  logic has_p;         // a previous block exists
  logic seq;

  // lookups
  logic              hit_q, hit_p, has_free;
  logic [IDX_W-1:0]  idx_q, idx_p, idx_free, victim;

  always_comb begin
    q_blk = addr2blk(pc);
    sw    = pc_valid && (!cur_valid || (q_blk != cur_blk));
    has_p = cur_valid;
    seq   = (q_blk == cur_blk + blk_t'(1));

    hit_q = 1'b0; idx_q = '0;
    hit_p = 1'b0; idx_p = '0;
    has_free = 1'b0; idx_free = '0;
    for (int i = NBPT_ENTRIES - 1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].cur == q_blk)   begin hit_q = 1'b1; idx_q = IDX_W'(i); end
      if (tbl[i].valid && tbl[i].cur == cur_blk) begin hit_p = 1'b1; idx_p = IDX_W'(i); end
      if (!tbl[i].valid)                         begin has_free = 1'b1; idx_free = IDX_W'(i); end
    end
    victim = has_free ? idx_free : rr_ptr;
  end

  // ---------------------------------------------------------------- prediction
  logic q_nonseq;      // Q's entry predicts a non-sequential block
  logic pred_extra;    // invoke/return extra block
  logic pred_suppress; // return into an invoking block: no prefetch
  blk_t pred_r;

  always_comb begin
    q_nonseq      = hit_q && (tbl[idx_q].state == NB_NS_LC || tbl[idx_q].state == NB_NS_HC);
    pred_r        = q_nonseq ? tbl[idx_q].nxt : q_blk + blk_t'(1);
    pred_extra    = q_nonseq && (tbl[idx_q].ibit || tbl[idx_q].rbit);
    pred_suppress = q_nonseq && (pc_kind == PC_RETURN) && tbl[idx_q].ibit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_valid[0] <= 1'b0;
      pf_valid[1] <= 1'b0;
      pf_blk[0]   <= '0;
      pf_blk[1]   <= '0;
    end else begin
      pf_valid[0] <= en && sw && !pred_suppress;
      pf_valid[1] <= en && sw && !pred_suppress && pred_extra;
      pf_blk[0]   <= pred_r;
      pf_blk[1]   <= pred_r + blk_t'(1);
    end
  end

  // -------------------------------------------------------------------- update
  logic upd;
  logic p_match;
  assign upd     = sw && has_p;
  assign p_match = hit_p && (tbl[idx_p].nxt == q_blk);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBPT_ENTRIES; i++) tbl[i] <= '0;
      rr_ptr    <= '0;
      cur_blk   <= '0;
      cur_valid <= 1'b0;
    end else begin
      if (sw) begin
        cur_blk   <= q_blk;
        cur_valid <= 1'b1;
      end
      if (upd) begin
        if (!hit_p) begin
          if (!seq) begin
            tbl[victim].valid <= 1'b1;
            tbl[victim].cur   <= cur_blk;
            tbl[victim].nxt   <= q_blk;
            tbl[victim].state <= NB_S_LC;
            tbl[victim].ibit  <= (pc_kind == PC_INVOKE);
            tbl[victim].rbit  <= (pc_kind == PC_RETURN);
            if (!has_free)
              rr_ptr <= (rr_ptr == IDX_W'(NBPT_ENTRIES - 1)) ? '0 : rr_ptr + 1'b1;
          end
        end else begin
          unique case (tbl[idx_p].state)
            NB_S_LC: begin
              if (p_match)                tbl[idx_p].state <= NB_NS_HC;
              else if (seq && tbl[idx_p].ibit) tbl[idx_p].state <= NB_NS_LC;
              else if (seq)               tbl[idx_p].valid <= 1'b0;
              else begin
                tbl[idx_p].state <= NB_NS_LC;
                tbl[idx_p].nxt   <= q_blk;
                tbl[idx_p].ibit  <= (pc_kind == PC_INVOKE);
                tbl[idx_p].rbit  <= (pc_kind == PC_RETURN);
              end
            end
            NB_NS_LC: begin
              if (p_match)   tbl[idx_p].state <= NB_NS_HC;
              else if (seq)  tbl[idx_p].valid <= 1'b0;
              else begin
                tbl[idx_p].nxt  <= q_blk;
                tbl[idx_p].ibit <= (pc_kind == PC_INVOKE);
                tbl[idx_p].rbit <= (pc_kind == PC_RETURN);
              end
            end
            NB_NS_HC: begin
              if (!p_match)  tbl[idx_p].state <= NB_NS_LC;
            end
            default: tbl[idx_p].valid <= 1'b0;
          endcase
        end
      end
    end
  end

  // ------------------------------------------------------------------- events
  // Single-cycle strobes (combinational, same cycle as the switch) for
  // performance counters and testbenches.
  always_comb begin
    ev.blk_switch      = sw;
    ev.pred_seq    = sw && !q_nonseq;
    ev.pred_nonseq = sw && q_nonseq && !pred_suppress;
    ev.pred_extra  = sw && pred_extra && !pred_suppress;
    ev.suppress    = sw && pred_suppress;
    ev.insert      = upd && !hit_p && !seq;
    ev.remove      = upd && hit_p && !p_match && seq &&
                     (tbl[idx_p].state == NB_NS_LC ||
                      (tbl[idx_p].state == NB_S_LC && !tbl[idx_p].ibit));
    ev.retarget    = upd && hit_p && !p_match && !seq && tbl[idx_p].state != NB_NS_HC;
    ev.to_nshc     = upd && hit_p && p_match && tbl[idx_p].state != NB_NS_HC;
    ev.to_nslc     = upd && hit_p && !p_match && (tbl[idx_p].state == NB_NS_HC ||
                     (tbl[idx_p].state == NB_S_LC && (!seq || tbl[idx_p].ibit)));
  end

endmodule

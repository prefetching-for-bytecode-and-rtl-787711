// stride_table_prefetcher: array prefetch unit built around a stride table (ST)
// tagged by array base address.
//
// On every array access the accelerator reports the array base, the element
// index, the element size and the array length (it knows all four while it
// executes an array load/store). The unit computes the byte offset
// (element size x index) and the element address (base + offset), then:
//   * Lookup by array base. On a miss the array is inserted with the stride set
//     to the element size and state Init, unless the whole array lies inside
//     one block (then it is ignored: it never needs prefetching).
//   * On a hit the new stride (offset - previous offset) is compared with the
//     stored stride. Equal: state Steady. Different: state Init, the stride
//     field takes the new stride and the trigger block is disabled.
//   * Stride-adaptive prefetch: if |stride| <= H the next block in the stride's
//     direction is prefetched; otherwise the blocks of the elements
//     addr + stride*k, k = 1..PREFETCH_DEPTH, are prefetched.
//   * Trigger block: in Steady a prefetch is generated only when the access
//     falls in the trigger block (or no trigger is armed); the trigger block is
//     then set to the last prefetched block. In Init a tentative prefetch is
//     always generated and the trigger is left disarmed.
//   * Circular prefetching: a target block beyond the array end wraps to the
//     array's first block (beyond the start, to its last block), so nothing
//     outside the array is fetched and a loop that restarts finds its head
//     prefetched.
// All of the above follows the described design. This design's own choices:
// the fully associative organisation with first-invalid/round-robin
// replacement, 32-bit offset and stride fields, strides counted in bytes and
// compared with H in bytes, and dropping a target that equals the accessed
// block or the previous target of the same access.
//
// Interface: acc_* is one access per cycle when acc_valid. en gates the
// prefetch outputs (the table keeps learning). pf_valid[k]/pf_blk[k],
// k < PREFETCH_DEPTH, are registered and valid for the one cycle after the
// access.
module stride_table_prefetcher
  import jp_pkg::*;
#(
  parameter int unsigned ST_ENTRIES     = 8,
  parameter int unsigned H              = 2,
  parameter int unsigned PREFETCH_DEPTH = 2,
  parameter bit          TRIGGER_EN     = 1'b1,
  parameter bit          CIRCULAR_EN    = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               acc_valid,
  input  addr_t              acc_base,
  input  logic signed [31:0] acc_index,
  input  logic [1:0]         acc_esize_log2,  // element size = 1 << acc_esize_log2 bytes
  input  logic [31:0]        acc_length,      // number of elements
  output logic               pf_valid [PREFETCH_DEPTH],
  output blk_t               pf_blk   [PREFETCH_DEPTH],
  output st_ev_t             ev
);

  localparam int unsigned IDX_W = (ST_ENTRIES > 1) ? $clog2(ST_ENTRIES) : 1;
  localparam int unsigned W     = 48;   // wide signed arithmetic for targets

  typedef logic signed [W-1:0] wide_t;

  typedef struct packed {
    logic               valid;
    addr_t              base;       // tag
    logic signed [31:0] prev_off;   // byte offset of the previous access
    logic signed [31:0] stride;     // bytes
    st_state_e          state;
    logic               trig_en;
    blk_t               trig_blk;
  } st_entry_t;

  st_entry_t tbl [ST_ENTRIES];
  logic [IDX_W-1:0] rr_ptr;

  // --------------------------------------------------------------- lookup
  logic              hit, has_free;
  logic [IDX_W-1:0]  idx, idx_free, victim;

  always_comb begin
    hit = 1'b0; idx = '0; has_free = 1'b0; idx_free = '0;
    for (int i = ST_ENTRIES - 1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].base == acc_base) begin hit = 1'b1; idx = IDX_W'(i); end
      if (!tbl[i].valid) begin has_free = 1'b1; idx_free = IDX_W'(i); end
    end
    victim = has_free ? idx_free : rr_ptr;
  end

  // ---------------------------------------------------- address arithmetic
  logic signed [31:0] offset, esize, new_stride, stride_n;
  logic [31:0]        abs_stride;
  wide_t              addr_w, size_w, first_blk_w, last_blk_w, cur_blk_w;
  logic               single_blk, do_access, match;
  st_state_e          state_n;
  logic               old_trig_en;
  blk_t               old_trig_blk;

  always_comb begin
    esize      = 32'sd1 <<< acc_esize_log2;
    offset     = acc_index <<< acc_esize_log2;
    addr_w     = wide_t'({1'b0, acc_base}) + wide_t'(offset);
    size_w     = wide_t'({1'b0, acc_length}) <<< acc_esize_log2;
    first_blk_w = wide_t'({1'b0, acc_base}) >>> OFF_W;
    last_blk_w  = (wide_t'({1'b0, acc_base}) + size_w - wide_t'(1)) >>> OFF_W;
    cur_blk_w   = addr_w >>> OFF_W;
    single_blk  = (acc_length == 32'd0) || (first_blk_w == last_blk_w);
    do_access   = acc_valid && (hit || !single_blk);

    new_stride = offset - tbl[idx].prev_off;
    match      = hit && (new_stride == tbl[idx].stride);
    if (hit) begin
      state_n      = match ? ST_STEADY : ST_INIT;
      stride_n     = match ? tbl[idx].stride : new_stride;
      old_trig_en  = tbl[idx].trig_en;
      old_trig_blk = tbl[idx].trig_blk;
    end else begin
      state_n      = ST_INIT;
      stride_n     = esize;
      old_trig_en  = 1'b0;
      old_trig_blk = '0;
    end
    abs_stride = stride_n[31] ? 32'(-stride_n) : 32'(stride_n);
  end

  // ------------------------------------------------- target generation
  logic  small_stride;
  logic  gen;            // this access may generate prefetches
  logic  gated;          // Steady access outside the armed trigger block
  logic  lane_ok  [PREFETCH_DEPTH];
  blk_t  lane_blk [PREFETCH_DEPTH];
  logic  lane_wrapped [PREFETCH_DEPTH];
  blk_t  trig_new;
  logic  trig_valid;

  always_comb begin
    wide_t t_blk, t_addr;
    small_stride = (abs_stride <= 32'(H));
    gated = TRIGGER_EN && (state_n == ST_STEADY) && old_trig_en &&
            (blk_t'(cur_blk_w) != old_trig_blk);
    gen   = do_access && !gated;
    trig_new   = '0;
    trig_valid = 1'b0;
    for (int k = 0; k < PREFETCH_DEPTH; k++) begin
      lane_ok[k]      = 1'b0;
      lane_blk[k]     = '0;
      lane_wrapped[k] = 1'b0;
      t_blk  = '0;
      t_addr = '0;
      if (small_stride) begin
        if (k == 0 && stride_n != 0) begin
          t_blk = (stride_n > 0) ? cur_blk_w + wide_t'(1) : cur_blk_w - wide_t'(1);
          lane_ok[k] = 1'b1;
        end
      end else begin
        t_addr = addr_w + wide_t'(stride_n) * (wide_t'(k) + wide_t'(1));
        t_blk  = t_addr >>> OFF_W;
        lane_ok[k] = 1'b1;
      end
      if (lane_ok[k]) begin
        if (t_blk > last_blk_w || t_blk < first_blk_w) begin
          lane_wrapped[k] = 1'b1;
          if (!CIRCULAR_EN)        lane_ok[k] = 1'b0;
          else if (stride_n > 0)   t_blk = first_blk_w;
          else                     t_blk = last_blk_w;
        end
      end
      lane_blk[k] = blk_t'(t_blk);
      if (lane_ok[k]) begin
        trig_new   = lane_blk[k];
        trig_valid = 1'b1;
      end
      // drop a target that is the accessed block or repeats the previous lane
      if (lane_ok[k] && lane_blk[k] == blk_t'(cur_blk_w)) lane_ok[k] = 1'b0;
      if (k > 0) begin
        if (lane_ok[k] && lane_blk[k] == lane_blk[k-1]) lane_ok[k] = 1'b0;
      end
    end
  end

  // ------------------------------------------------------ registered output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < PREFETCH_DEPTH; k++) begin
        pf_valid[k] <= 1'b0;
        pf_blk[k]   <= '0;
      end
    end else begin
      for (int k = 0; k < PREFETCH_DEPTH; k++) begin
        pf_valid[k] <= en && gen && lane_ok[k];
        pf_blk[k]   <= lane_blk[k];
      end
    end
  end

  // ---------------------------------------------------------- table update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ST_ENTRIES; i++) tbl[i] <= '0;
      rr_ptr <= '0;
    end else if (do_access) begin
      if (hit) begin
        tbl[idx].prev_off <= offset;
        tbl[idx].stride   <= stride_n;
        tbl[idx].state    <= state_n;
        if (state_n == ST_INIT) begin
          tbl[idx].trig_en  <= 1'b0;
          tbl[idx].trig_blk <= trig_new;
        end else if (gen && trig_valid) begin
          tbl[idx].trig_en  <= 1'b1;
          tbl[idx].trig_blk <= trig_new;
        end
      end else begin
        tbl[victim].valid    <= 1'b1;
        tbl[victim].base     <= acc_base;
        tbl[victim].prev_off <= offset;
        tbl[victim].stride   <= esize;
        tbl[victim].state    <= ST_INIT;
        tbl[victim].trig_en  <= 1'b0;
        tbl[victim].trig_blk <= trig_new;
        if (!has_free)
          rr_ptr <= (rr_ptr == IDX_W'(ST_ENTRIES - 1)) ? '0 : rr_ptr + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------ events
  // Single-cycle strobes (combinational, same cycle as the access).
  always_comb begin
    logic any_wrap;
    any_wrap = 1'b0;
    for (int k = 0; k < PREFETCH_DEPTH; k++) any_wrap |= lane_wrapped[k];
    ev.insert        = do_access && !hit;
    ev.skip_single   = acc_valid && !hit && single_blk;
    ev.steady        = do_access && state_n == ST_STEADY;
    ev.irregular     = do_access && hit && !match;
    ev.small_pf      = gen && small_stride && stride_n != 0;
    ev.large_pf      = gen && !small_stride;
    ev.trigger_gated = do_access && gated;
    ev.circular      = gen && CIRCULAR_EN && any_wrap;
  end

endmodule

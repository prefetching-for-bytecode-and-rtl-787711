// prefetch_buffer: small fully associative store for prefetched lines.
//
// Prefetched blocks are written here instead of into the data cache, so a
// useless prefetch cannot evict a useful cache line. On a demand miss the
// memory controller looks the block up here; on a hit the line is handed to
// the cache and the buffer entry is freed (take). Before a prefetch is sent to
// memory the controller probes the buffer so that a block already held is not
// fetched twice. A store to a buffered block invalidates it (inval).
//
// Interface: two combinational lookup ports (lk_* for demand, pr_* for the
// prefetch check), a fill port (one line per cycle) and take/inval strobes,
// all acting at the clock edge. A fill of a block already present overwrites
// it in place; otherwise it goes to a free entry or, when full, replaces the
// oldest fill (FIFO).
//
// The buffer, its full associativity and its size (8 lines of 16 bytes) follow
// the described configuration; FIFO replacement and the invalidate-on-store
// rule are this design's choices.
module prefetch_buffer
  import jp_pkg::*;
#(
  parameter int unsigned LINES = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // demand lookup
  input  blk_t  lk_blk,
  output logic  lk_hit,
  output line_t lk_line,
  input  logic  take,        // free the entry matching lk_blk
  // prefetch check
  input  blk_t  pr_blk,
  output logic  pr_hit,
  // fill from memory
  input  logic  fill,
  input  blk_t  fill_blk,
  input  line_t fill_line,
  // invalidate on store
  input  logic  inval,
  input  blk_t  inval_blk,
  output logic [$clog2(LINES+1)-1:0] occupancy
);

  localparam int unsigned IDX_W = (LINES > 1) ? $clog2(LINES) : 1;

  logic             valid [LINES];
  blk_t             tag   [LINES];
  line_t            data  [LINES];
  logic [IDX_W-1:0] fifo_ptr;

  logic [IDX_W-1:0] lk_idx, fill_hit_idx, free_idx, fill_idx;
  logic             fill_hit, has_free;

  always_comb begin
    lk_hit = 1'b0; lk_idx = '0;
    pr_hit = 1'b0;
    fill_hit = 1'b0; fill_hit_idx = '0;
    has_free = 1'b0; free_idx = '0;
    occupancy = '0;
    for (int i = LINES - 1; i >= 0; i--) begin
      if (valid[i] && tag[i] == lk_blk)   begin lk_hit = 1'b1; lk_idx = IDX_W'(i); end
      if (valid[i] && tag[i] == pr_blk)   pr_hit = 1'b1;
      if (valid[i] && tag[i] == fill_blk) begin fill_hit = 1'b1; fill_hit_idx = IDX_W'(i); end
      if (!valid[i])                      begin has_free = 1'b1; free_idx = IDX_W'(i); end
      if (valid[i]) occupancy = occupancy + 1'b1;
    end
    lk_line  = data[lk_idx];
    fill_idx = fill_hit ? fill_hit_idx : (has_free ? free_idx : fifo_ptr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) begin
        valid[i] <= 1'b0;
        tag[i]   <= '0;
      end
      fifo_ptr <= '0;
    end else begin
      for (int i = 0; i < LINES; i++) begin
        if (take  && lk_hit && lk_idx == IDX_W'(i))            valid[i] <= 1'b0;
        if (inval && valid[i] && tag[i] == inval_blk)           valid[i] <= 1'b0;
      end
      if (fill) begin
        valid[fill_idx] <= 1'b1;
        tag[fill_idx]   <= fill_blk;
        if (!fill_hit && !has_free)
          fifo_ptr <= (fifo_ptr == IDX_W'(LINES - 1)) ? '0 : fifo_ptr + 1'b1;
      end
    end
  end

  // Line data needs no reset: it is only read behind a valid tag.
  always_ff @(posedge clk) begin
    if (fill) data[fill_idx] <= fill_line;
  end

endmodule

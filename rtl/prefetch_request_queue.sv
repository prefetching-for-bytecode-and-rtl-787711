// prefetch_request_queue: FIFO of prefetch block numbers between the prefetch
// units and the memory controller.
//
// Several prefetch units can each produce a few requests in the same cycle, so
// the queue has NPUSH push lanes. The valid lanes of one cycle are written in
// lane order; a request that finds the queue full is dropped (prefetches are
// hints, and an old request is more likely to be late than a new one is to be
// useless), and `dropped` reports how many were lost that cycle. The consumer
// sees the oldest entry on head_valid/head_blk and removes it with pop; a pop
// and pushes may happen in the same cycle, and the slot freed by the pop is
// usable by that cycle's pushes.
//
// The queue itself is part of the described organisation (prefetcher ->
// request queue -> memory); its depth, the lane order and the drop-on-full
// policy are this design's choices.
module prefetch_request_queue
  import jp_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NPUSH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push_valid [NPUSH],
  input  blk_t push_blk   [NPUSH],
  output logic head_valid,
  output blk_t head_blk,
  input  logic pop,
  output logic [$clog2(NPUSH+1)-1:0] dropped,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);
  localparam int unsigned DRP_W = $clog2(NPUSH + 1);

  blk_t             mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic [CNT_W-1:0] cnt;

  // DEPTH is a power of two, so pointers wrap by plain overflow.
  function automatic logic [PTR_W-1:0] wrap_add(logic [PTR_W-1:0] p, logic [PTR_W-1:0] n);
    return p + n;
  endfunction

  if ((1 << PTR_W) != DEPTH) begin : g_depth_check
    $error("prefetch_request_queue: DEPTH must be a power of two");
  end

  logic do_pop;
  assign do_pop     = pop && (cnt != '0);
  assign head_valid = (cnt != '0);
  assign head_blk   = mem[rd_ptr];
  assign count      = cnt;

  // Lanes accepted this cycle, their slot offsets from wr_ptr, and drops.
  int unsigned      n_acc, n_drop, room;
  logic             lane_acc  [NPUSH];
  logic [PTR_W-1:0] lane_slot [NPUSH];
  always_comb begin
    room   = DEPTH - int'(cnt) + (do_pop ? 1 : 0);
    n_acc  = 0;
    n_drop = 0;
    for (int l = 0; l < NPUSH; l++) begin
      lane_acc[l]  = 1'b0;
      lane_slot[l] = PTR_W'(n_acc);
      if (push_valid[l]) begin
        if (n_acc < room) begin
          lane_acc[l] = 1'b1;
          n_acc++;
        end else begin
          n_drop++;
        end
      end
    end
    dropped = DRP_W'(n_drop);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      wr_ptr <= wrap_add(wr_ptr, PTR_W'(n_acc));
      if (do_pop) rd_ptr <= wrap_add(rd_ptr, PTR_W'(1));
      cnt <= CNT_W'(int'(cnt) + int'(n_acc) - (do_pop ? 1 : 0));
    end
  end

  // Storage needs no reset: an entry is only read once it has been written.
  always_ff @(posedge clk) begin
    for (int l = 0; l < NPUSH; l++)
      if (lane_acc[l]) mem[wrap_add(wr_ptr, lane_slot[l])] <= push_blk[l];
  end

  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n) cnt <= CNT_W'(DEPTH))
    else $error("prefetch_request_queue: count %0d exceeds depth", cnt);

endmodule

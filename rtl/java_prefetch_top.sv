// java_prefetch_top: memory system of an embedded Java accelerator with
// bytecode and array prefetching.
//
// The accelerator fetches bytecode and Java data through one data cache.
// Two prefetch units watch what it does and predict the blocks it will need:
//   * nbpt_prefetcher follows the bytecode PC and, at every block switch,
//     predicts the next bytecode block with the non-sequential block
//     prediction table (up to two blocks per switch);
//   * stride_table_prefetcher follows array loads/stores, learns each array's
//     stride and prefetches ahead of it (up to ST_DEPTH blocks per access).
// Their requests go through prefetch_request_queue (bytecode lanes first) to
// memory_controller, which checks the data cache and prefetch_buffer, fetches
// missing blocks into the buffer, and moves a buffered line into the cache
// when a demand access needs it.
//
// Interface:
//   pc_*      one bytecode fetch per cycle: PC and how it got there
//   arr_*     one array access per cycle: base, index, element size, length
//   d_*       demand word access (read or byte-enabled write), acknowledged by
//             d_ready in the cycle it completes
//   m_*       main-memory port (request/ready, one-cycle line response)
//   cfg_*_en  enable the bytecode / array prefetch outputs
//   *_ev, pfq_dropped  per-cycle event strobes for performance counters
//   pfq_count, pbuf_occupancy  current fill levels
// The organisation (prefetchers -> request queue -> memory, prefetch buffer
// beside the cache) and all default sizes follow the described configuration:
// 16-entry NBPT, 8-entry stride table with H = 2 and prefetch depth 2, 8-line
// prefetch buffer, 4 KB cache with 16-byte lines. The queue depth is this
// design's choice.
// m_req_wdata and m_req_be are d_wdata and d_be passed straight through:
// stores are written through unchanged, so they carry no logic of their own.
module java_prefetch_top
  import jp_pkg::*;
#(
  parameter int unsigned NBPT_ENTRIES = 16,
  parameter int unsigned ST_ENTRIES   = 8,
  parameter int unsigned ST_H         = 2,
  parameter int unsigned ST_DEPTH     = 2,
  parameter int unsigned PFQ_DEPTH    = 8,
  parameter int unsigned PBUF_LINES   = 8,
  parameter int unsigned CACHE_BYTES  = 4096
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_bc_pf_en,
  input  logic               cfg_arr_pf_en,
  // bytecode PC
  input  logic               pc_valid,
  input  addr_t              pc,
  input  pc_kind_e           pc_kind,
  // array access information
  input  logic               arr_valid,
  input  addr_t              arr_base,
  input  logic signed [31:0] arr_index,
  input  logic [1:0]         arr_esize_log2,
  input  logic [31:0]        arr_length,
  // demand access
  input  logic               d_valid,
  input  logic               d_we,
  input  addr_t              d_addr,
  input  word_t              d_wdata,
  input  logic [3:0]         d_be,
  output logic               d_ready,
  output word_t              d_rdata,
  // main memory
  output logic               m_req_valid,
  input  logic               m_req_ready,
  output logic               m_req_we,
  output addr_t              m_req_addr,
  output word_t              m_req_wdata,
  output logic [3:0]         m_req_be,
  input  logic               m_rsp_valid,
  input  line_t              m_rsp_line,
  // events
  output nbpt_ev_t           nbpt_ev,
  output st_ev_t             st_ev,
  output mc_ev_t             mc_ev,
  output logic [$clog2(ST_DEPTH+3)-1:0] pfq_dropped,
  output logic [$clog2(PFQ_DEPTH+1)-1:0] pfq_count,
  output logic [$clog2(PBUF_LINES+1)-1:0] pbuf_occupancy
);

  localparam int unsigned NPUSH = 2 + ST_DEPTH;

  // ------------------------------------------------------------ prefetchers
  logic bc_pf_valid [2];
  blk_t bc_pf_blk   [2];
  logic ar_pf_valid [ST_DEPTH];
  blk_t ar_pf_blk   [ST_DEPTH];

  nbpt_prefetcher #(.NBPT_ENTRIES(NBPT_ENTRIES)) u_nbpt (
    .clk, .rst_n,
    .en       (cfg_bc_pf_en),
    .pc_valid, .pc, .pc_kind,
    .pf_valid (bc_pf_valid),
    .pf_blk   (bc_pf_blk),
    .ev       (nbpt_ev)
  );

  stride_table_prefetcher #(
    .ST_ENTRIES(ST_ENTRIES), .H(ST_H), .PREFETCH_DEPTH(ST_DEPTH)
  ) u_st (
    .clk, .rst_n,
    .en             (cfg_arr_pf_en),
    .acc_valid      (arr_valid),
    .acc_base       (arr_base),
    .acc_index      (arr_index),
    .acc_esize_log2 (arr_esize_log2),
    .acc_length     (arr_length),
    .pf_valid       (ar_pf_valid),
    .pf_blk         (ar_pf_blk),
    .ev             (st_ev)
  );

  // ------------------------------------------------------------ request queue
  logic push_valid [NPUSH];
  blk_t push_blk   [NPUSH];
  always_comb begin
    for (int l = 0; l < 2; l++) begin
      push_valid[l] = bc_pf_valid[l];
      push_blk[l]   = bc_pf_blk[l];
    end
    for (int l = 0; l < ST_DEPTH; l++) begin
      push_valid[2+l] = ar_pf_valid[l];
      push_blk[2+l]   = ar_pf_blk[l];
    end
  end

  logic q_valid, q_pop;
  blk_t q_blk;

  prefetch_request_queue #(.DEPTH(PFQ_DEPTH), .NPUSH(NPUSH)) u_pfq (
    .clk, .rst_n,
    .push_valid, .push_blk,
    .head_valid (q_valid),
    .head_blk   (q_blk),
    .pop        (q_pop),
    .dropped    (pfq_dropped),
    .count      (pfq_count)
  );

  // ------------------------------------------------------- cache and buffer
  addr_t      c_rd_addr, c_wr_addr;
  logic       c_rd_hit, c_pr_hit, c_fill, c_wr;
  word_t      c_rd_word, c_wr_data;
  blk_t       c_pr_blk, c_fill_blk;
  line_t      c_fill_line;
  logic [3:0] c_wr_be;

  data_cache #(.CACHE_BYTES(CACHE_BYTES)) u_cache (
    .clk, .rst_n,
    .rd_addr (c_rd_addr), .rd_hit (c_rd_hit), .rd_word (c_rd_word),
    .pr_blk  (c_pr_blk),  .pr_hit (c_pr_hit),
    .fill    (c_fill),    .fill_blk (c_fill_blk), .fill_line (c_fill_line),
    .wr      (c_wr),      .wr_addr (c_wr_addr), .wr_data (c_wr_data), .wr_be (c_wr_be)
  );

  blk_t  b_lk_blk, b_pr_blk, b_fill_blk, b_inval_blk;
  logic  b_lk_hit, b_take, b_pr_hit, b_fill, b_inval;
  line_t b_lk_line, b_fill_line;

  prefetch_buffer #(.LINES(PBUF_LINES)) u_pbuf (
    .clk, .rst_n,
    .lk_blk (b_lk_blk), .lk_hit (b_lk_hit), .lk_line (b_lk_line), .take (b_take),
    .pr_blk (b_pr_blk), .pr_hit (b_pr_hit),
    .fill   (b_fill),   .fill_blk (b_fill_blk), .fill_line (b_fill_line),
    .inval  (b_inval),  .inval_blk (b_inval_blk),
    .occupancy (pbuf_occupancy)
  );

  // -------------------------------------------------------- memory controller
  memory_controller u_mc (
    .clk, .rst_n,
    .d_valid, .d_we, .d_addr, .d_wdata, .d_be, .d_ready, .d_rdata,
    .c_rd_addr, .c_rd_hit, .c_rd_word, .c_pr_blk, .c_pr_hit,
    .c_fill, .c_fill_blk, .c_fill_line,
    .c_wr, .c_wr_addr, .c_wr_data, .c_wr_be,
    .b_lk_blk, .b_lk_hit, .b_lk_line, .b_take, .b_pr_blk, .b_pr_hit,
    .b_fill, .b_fill_blk, .b_fill_line, .b_inval, .b_inval_blk,
    .q_valid, .q_blk, .q_pop,
    .m_req_valid, .m_req_ready, .m_req_we, .m_req_addr, .m_req_wdata, .m_req_be,
    .m_rsp_valid, .m_rsp_line,
    .ev (mc_ev)
  );

endmodule

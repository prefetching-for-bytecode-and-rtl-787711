// data_cache: direct-mapped data cache with 16-byte lines.
//
// In an interpreter-style Java system both bytecode and Java data (arrays,
// objects) reach the accelerator through the data cache, so this one cache
// serves every demand access of the memory system.
//
// Interface: a combinational read port (rd_addr -> rd_hit, rd_word), a
// combinational probe port used by the prefetch check (pr_blk -> pr_hit), a
// line fill port and a word write port with byte enables; fill and write act
// at the clock edge. A write only updates a line that is present (the memory
// controller writes through to memory and does not allocate on a write miss).
//
// The 4 KB capacity and 16-byte line follow the described configuration;
// direct mapping, write-through without write allocation and the 32-bit word
// port are this design's choices.
module data_cache
  import jp_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 4096
) (
  input  logic       clk,
  input  logic       rst_n,
  input  addr_t      rd_addr,
  output logic       rd_hit,
  output word_t      rd_word,
  input  blk_t       pr_blk,
  output logic       pr_hit,
  input  logic       fill,
  input  blk_t       fill_blk,
  input  line_t      fill_line,
  input  logic       wr,
  input  addr_t      wr_addr,
  input  word_t      wr_data,
  input  logic [3:0] wr_be
);

  localparam int unsigned LINES = CACHE_BYTES / LINE_BYTES;
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = BLK_W - IDX_W;
  localparam int unsigned WSEL_W = $clog2(WORDS_PER_LINE);

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  logic  valid [LINES];
  tag_t  tags  [LINES];
  line_t data  [LINES];

  function automatic idx_t idx_of(blk_t b);
    return idx_t'(b);
  endfunction
  function automatic tag_t tag_of(blk_t b);
    return tag_t'(b >> IDX_W);
  endfunction

  blk_t                rd_blk, wr_blk;
  logic [WSEL_W-1:0]   rd_wsel, wr_wsel;
  logic                wr_hit;

  always_comb begin
    rd_blk  = addr2blk(rd_addr);
    wr_blk  = addr2blk(wr_addr);
    rd_wsel = rd_addr[OFF_W-1:2];
    wr_wsel = wr_addr[OFF_W-1:2];
    rd_hit  = valid[idx_of(rd_blk)] && tags[idx_of(rd_blk)] == tag_of(rd_blk);
    rd_word = data[idx_of(rd_blk)][rd_wsel*WORD_W +: WORD_W];
    pr_hit  = valid[idx_of(pr_blk)] && tags[idx_of(pr_blk)] == tag_of(pr_blk);
    wr_hit  = valid[idx_of(wr_blk)] && tags[idx_of(wr_blk)] == tag_of(wr_blk);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) valid[i] <= 1'b0;
    end else if (fill) begin
      valid[idx_of(fill_blk)] <= 1'b1;
    end
  end

  // Tags and data need no reset: they are only used behind a valid bit.
  always_ff @(posedge clk) begin
    if (fill) begin
      tags[idx_of(fill_blk)] <= tag_of(fill_blk);
      data[idx_of(fill_blk)] <= fill_line;
    end else if (wr && wr_hit) begin
      for (int b = 0; b < 4; b++)
        if (wr_be[b]) data[idx_of(wr_blk)][wr_wsel*WORD_W + b*8 +: 8] <= wr_data[b*8 +: 8];
    end
  end

endmodule

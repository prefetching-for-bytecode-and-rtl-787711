// memory_controller: serves demand accesses and issues prefetches over the
// single main-memory port.
//
// Demand reads are answered in the same cycle on a cache hit. On a miss the
// prefetch buffer is checked: a hit there moves the line into the cache (one
// extra cycle), otherwise the block is read from memory and filled into the
// cache (a "true miss"). A demand miss to the block that an outstanding
// prefetch is already fetching waits for that prefetch and takes its data
// straight into the cache (a late prefetch). Stores are written through to
// memory, update the cache line if present and invalidate any buffered copy.
//
// When no demand access needs the memory port and no read is outstanding,
// the oldest queued prefetch is checked against the cache and the prefetch
// buffer; a block already held is dropped, otherwise it is read from memory
// and its line goes into the prefetch buffer.
//
// Following the described organisation: prefetched data goes to the prefetch
// buffer, a demand miss checks the buffer before memory, and every prefetch
// checks cache and buffer before it is issued. This design's choices: one
// outstanding memory read at a time, demand accesses before prefetches, the
// late-prefetch merge, and write-through stores issued only while no read is
// outstanding (which keeps memory ordering trivial).
//
// Interface: d_* is the accelerator's demand port; d_ready acknowledges the
// access in the cycle it completes (with d_rdata for a read). c_* drive a
// data_cache, b_* a prefetch_buffer, q_* the head of a prefetch_request_queue,
// m_* the memory port: a request is taken when m_req_valid && m_req_ready;
// a read is answered later by one m_rsp_valid cycle carrying the whole line.
// Most address and data outputs are inputs routed through unchanged (the
// demand address and store data to the cache and memory, the response line
// to the cache or buffer); only the strobes and the selections carry logic.
module memory_controller
  import jp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // demand port
  input  logic       d_valid,
  input  logic       d_we,
  input  addr_t      d_addr,
  input  word_t      d_wdata,
  input  logic [3:0] d_be,
  output logic       d_ready,
  output word_t      d_rdata,
  // data cache
  output addr_t      c_rd_addr,
  input  logic       c_rd_hit,
  input  word_t      c_rd_word,
  output blk_t       c_pr_blk,
  input  logic       c_pr_hit,
  output logic       c_fill,
  output blk_t       c_fill_blk,
  output line_t      c_fill_line,
  output logic       c_wr,
  output addr_t      c_wr_addr,
  output word_t      c_wr_data,
  output logic [3:0] c_wr_be,
  // prefetch buffer
  output blk_t       b_lk_blk,
  input  logic       b_lk_hit,
  input  line_t      b_lk_line,
  output logic       b_take,
  output blk_t       b_pr_blk,
  input  logic       b_pr_hit,
  output logic       b_fill,
  output blk_t       b_fill_blk,
  output line_t      b_fill_line,
  output logic       b_inval,
  output blk_t       b_inval_blk,
  // prefetch request queue head
  input  logic       q_valid,
  input  blk_t       q_blk,
  output logic       q_pop,
  // main memory
  output logic       m_req_valid,
  input  logic       m_req_ready,
  output logic       m_req_we,
  output addr_t      m_req_addr,
  output word_t      m_req_wdata,
  output logic [3:0] m_req_be,
  input  logic       m_rsp_valid,
  input  line_t      m_rsp_line,
  // events
  output mc_ev_t     ev
);

  typedef enum logic [1:0] {
    MC_IDLE    = 2'd0,
    MC_PF_WAIT = 2'd1,   // prefetch read outstanding
    MC_DM_WAIT = 2'd2    // demand read outstanding
  } mc_state_e;

  mc_state_e state, state_n;
  blk_t      out_blk, out_blk_n;   // block of the outstanding read

  blk_t d_blk;
  logic rd, wr, rd_hit, rd_miss;

  always_comb begin
    d_blk   = addr2blk(d_addr);
    rd      = d_valid && !d_we;
    wr      = d_valid && d_we;
    rd_hit  = rd && c_rd_hit;
    rd_miss = rd && !c_rd_hit;

    state_n   = state;
    out_blk_n = out_blk;

    c_rd_addr   = d_addr;
    d_rdata     = c_rd_word;
    d_ready     = rd_hit;
    c_pr_blk    = q_blk;
    b_pr_blk    = q_blk;
    b_lk_blk    = d_blk;
    c_fill      = 1'b0;
    c_fill_blk  = d_blk;
    c_fill_line = b_lk_line;
    c_wr        = 1'b0;
    c_wr_addr   = d_addr;
    c_wr_data   = d_wdata;
    c_wr_be     = d_be;
    b_take      = 1'b0;
    b_fill      = 1'b0;
    b_fill_blk  = out_blk;
    b_fill_line = m_rsp_line;
    b_inval     = 1'b0;
    b_inval_blk = d_blk;
    q_pop       = 1'b0;
    m_req_valid = 1'b0;
    m_req_we    = 1'b0;
    m_req_addr  = {d_blk, {OFF_W{1'b0}}};
    m_req_wdata = d_wdata;
    m_req_be    = d_be;
    ev          = '0;

    ev.cache_hit = rd_hit;

    // Demand read miss that hits the prefetch buffer: move the line.
    if (rd_miss && b_lk_hit) begin
      c_fill      = 1'b1;
      b_take      = 1'b1;
      ev.pbuf_hit = 1'b1;
    end

    unique case (state)
      MC_IDLE: begin
        if (rd_miss && !b_lk_hit) begin
          m_req_valid = 1'b1;
          if (m_req_ready) begin
            state_n      = MC_DM_WAIT;
            out_blk_n    = d_blk;
            ev.true_miss = 1'b1;
          end
        end else if (wr) begin
          m_req_valid = 1'b1;
          m_req_we    = 1'b1;
          m_req_addr  = d_addr;
          if (m_req_ready) begin
            c_wr     = 1'b1;
            b_inval  = 1'b1;
            d_ready  = 1'b1;
            ev.write = 1'b1;
          end
        end else if (!rd_miss && q_valid) begin
          if (c_pr_hit || b_pr_hit) begin
            q_pop          = 1'b1;
            ev.pf_filtered = 1'b1;
          end else begin
            m_req_valid = 1'b1;
            m_req_addr  = {q_blk, {OFF_W{1'b0}}};
            if (m_req_ready) begin
              q_pop       = 1'b1;
              state_n     = MC_PF_WAIT;
              out_blk_n   = q_blk;
              ev.pf_issue = 1'b1;
            end
          end
        end
      end
      MC_PF_WAIT: begin
        if (m_rsp_valid) begin
          state_n = MC_IDLE;
          if (rd_miss && !b_lk_hit && d_blk == out_blk) begin
            c_fill        = 1'b1;
            c_fill_blk    = out_blk;
            c_fill_line   = m_rsp_line;
            ev.late_merge = 1'b1;
          end else begin
            b_fill = 1'b1;
          end
        end
      end
      MC_DM_WAIT: begin
        if (m_rsp_valid) begin
          state_n     = MC_IDLE;
          c_fill      = 1'b1;
          c_fill_blk  = out_blk;
          c_fill_line = m_rsp_line;
        end
      end
      default: state_n = MC_IDLE;
    endcase

    ev.stall = d_valid && !d_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= MC_IDLE;
      out_blk <= '0;
    end else begin
      state   <= state_n;
      out_blk <= out_blk_n;
    end
  end

  // A response only arrives while a read is outstanding.
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   m_rsp_valid |-> state != MC_IDLE)
    else $error("memory_controller: unexpected memory response");

endmodule

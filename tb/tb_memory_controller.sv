// tb_memory_controller: the controller wired to a data_cache, a
// prefetch_buffer, a one-lane prefetch_request_queue and a 50-cycle memory
// model. Directed cases, each with the data and the cycle count checked:
//   1 read miss  -> memory, answered LAT+1 cycles after the request
//   2 read hit   -> answered in the request cycle
//   3 queued prefetch lands in the buffer; a read of it costs one cycle
//   4 a prefetch of a cached block is filtered (no memory read)
//   5 a read of the block being prefetched merges with the prefetch
//   6 stores: write-through, byte enables, buffered copy invalidated
//   7 a demand miss goes before waiting prefetches
// Expected data is recomputed from the memory model's fill pattern plus the
// testbench's own record of the stores.
module tb_memory_controller;
  import jp_pkg::*;

  localparam int unsigned LAT = 50;

  logic clk = 1'b0, rst_n = 1'b0;

  // demand
  logic d_valid = 1'b0, d_we = 1'b0, d_ready;
  addr_t d_addr = '0;
  word_t d_wdata = '0, d_rdata;
  logic [3:0] d_be = 4'hF;
  // queue push
  logic push_valid [1];
  blk_t push_blk [1];

  // internal wiring
  addr_t c_rd_addr, c_wr_addr, m_req_addr;
  logic c_rd_hit, c_pr_hit, c_fill, c_wr, b_lk_hit, b_take, b_pr_hit, b_fill, b_inval;
  word_t c_rd_word, c_wr_data, m_req_wdata;
  blk_t c_pr_blk, c_fill_blk, b_lk_blk, b_pr_blk, b_fill_blk, b_inval_blk, q_blk;
  line_t c_fill_line, b_lk_line, b_fill_line, m_rsp_line;
  logic [3:0] c_wr_be, m_req_be;
  logic q_valid, q_pop, m_req_valid, m_req_ready, m_req_we, m_rsp_valid;
  logic [0:0] q_dropped;
  logic [3:0] q_count;
  logic [3:0] b_occ;
  int unsigned n_reads, n_writes;
  mc_ev_t ev;

  int checks = 0, failures = 0;
  int n_pbuf = 0, n_filt = 0, n_merge = 0, n_true = 0;
  word_t shadow [addr_t];

  memory_controller dut (.*);
  data_cache u_cache (.clk, .rst_n, .rd_addr(c_rd_addr), .rd_hit(c_rd_hit), .rd_word(c_rd_word),
    .pr_blk(c_pr_blk), .pr_hit(c_pr_hit), .fill(c_fill), .fill_blk(c_fill_blk),
    .fill_line(c_fill_line), .wr(c_wr), .wr_addr(c_wr_addr), .wr_data(c_wr_data), .wr_be(c_wr_be));
  prefetch_buffer u_pbuf (.clk, .rst_n, .lk_blk(b_lk_blk), .lk_hit(b_lk_hit), .lk_line(b_lk_line),
    .take(b_take), .pr_blk(b_pr_blk), .pr_hit(b_pr_hit), .fill(b_fill), .fill_blk(b_fill_blk),
    .fill_line(b_fill_line), .inval(b_inval), .inval_blk(b_inval_blk), .occupancy(b_occ));
  prefetch_request_queue #(.DEPTH(8), .NPUSH(1)) u_q (.clk, .rst_n, .push_valid, .push_blk,
    .head_valid(q_valid), .head_blk(q_blk), .pop(q_pop), .dropped(q_dropped), .count(q_count));
  mem_model #(.LATENCY(LAT)) u_mem (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && $test$plusargs("trace") && (m_req_valid && m_req_ready || ev.pf_filtered || m_rsp_valid)) $display("%0t req we=%0d a=%h filt=%0d rsp=%0d st=%0d q=%0d", $time, m_req_we, m_req_addr, ev.pf_filtered, m_rsp_valid, dut.state, q_count);
  always @(posedge clk) if (rst_n) begin
    n_pbuf  += int'(ev.pbuf_hit);
    n_filt  += int'(ev.pf_filtered);
    n_merge += int'(ev.late_merge);
    n_true  += int'(ev.true_miss);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic word_t expect_word(addr_t a);
    if (shadow.exists(a)) return shadow[a];
    return {a[31:2], 2'b00} * 32'h9E37_79B1 + 32'h1234_5678;
  endfunction

  // Demand read; returns the number of cycles until d_ready (0 = same cycle).
  task automatic rd(addr_t a, output int cycles);
    word_t exp;
    exp = expect_word(a);
    @(negedge clk);
    d_valid = 1'b1; d_we = 1'b0; d_addr = a;
    cycles = 0;
    #1;
    while (!d_ready) begin
      @(negedge clk); #1;
      cycles++;
    end
    check(d_rdata == exp, $sformatf("read %h: %h expected %h", a, d_rdata, exp));
    @(posedge clk); #1;
    d_valid = 1'b0;
  endtask

  task automatic wr(addr_t a, word_t w, logic [3:0] be);
    word_t old;
    old = expect_word(a);
    for (int b = 0; b < 4; b++) if (be[b]) old[b*8 +: 8] = w[b*8 +: 8];
    shadow[a] = old;
    @(negedge clk);
    d_valid = 1'b1; d_we = 1'b1; d_addr = a; d_wdata = w; d_be = be;
    #1;
    while (!d_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    d_valid = 1'b0; d_we = 1'b0; d_be = 4'hF;
  endtask

  task automatic prefetch(blk_t b);
    @(negedge clk);
    push_valid[0] = 1'b1; push_blk[0] = b;
    @(negedge clk);
    push_valid[0] = 1'b0;
  endtask

  initial begin
    int c, reads0;
    push_valid[0] = 1'b0; push_blk[0] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1 read miss
    rd(32'h0000_1008, c);
    check(c == LAT + 1, $sformatf("1: miss latency %0d, expected %0d", c, LAT + 1));
    // 2 read hit, other word of the same line
    rd(32'h0000_100C, c);
    check(c == 0, "2: hit answered in the same cycle");
    // 3 prefetch into the buffer, then a read of it
    prefetch(28'h0000201);
    repeat (LAT + 5) @(posedge clk);
    check(b_occ == 1, "3: prefetched line in the buffer");
    rd(32'h0000_2014, c);
    check(c == 1, $sformatf("3: buffer hit costs one cycle, took %0d", c));
    check(b_occ == 0, "3: line moved out of the buffer");
    // 4 prefetch of a cached block is filtered
    reads0 = int'(n_reads);
    prefetch(28'h0000100);
    repeat (5) @(posedge clk);
    check(int'(n_reads) == reads0 && n_filt == 1, "4: cached block filtered, no memory read");
    // 5 read of a block while its prefetch is outstanding
    prefetch(28'h0000302);
    repeat (20) @(posedge clk);
    rd(32'h0000_3020, c);
    check(n_merge == 1 && c < LAT - 10 && c > 0, $sformatf("5: merged with the prefetch after %0d cycles", c));
    rd(32'h0000_3024, c);
    check(c == 0, "5: merged line is in the cache");
    // 6 stores
    wr(32'h0000_1008, 32'hCAFE_BABE, 4'b0011);
    rd(32'h0000_1008, c);
    check(c == 0, "6: store hit keeps the line");
    check(n_writes == 1, "6: store written through");
    prefetch(28'h0000403);
    repeat (LAT + 5) @(posedge clk);
    check(b_occ == 1, "6: block in the buffer");
    wr(32'h0000_4030, 32'h1122_3344, 4'b1111);
    check(b_occ == 0, "6: store invalidated the buffered copy");
    rd(32'h0000_4030, c);
    check(c == LAT + 1, "6: read after store is a true miss with the new data");
    // 7 demand before prefetches: a miss that waits behind an outstanding
    //   prefetch is issued before the next queued prefetch
    prefetch(28'h0000504);
    prefetch(28'h0000605);
    repeat (10) @(posedge clk);
    rd(32'h0000_7060, c);
    check(c > LAT + 1 && c < 2 * LAT, $sformatf("7: demand miss served first (%0d cycles)", c));
    repeat (LAT + 5) @(posedge clk);
    rd(32'h0000_6050, c);
    check(c == 1, "7: the waiting prefetch was issued afterwards");
    rd(32'h0000_5040, c);
    check(c == 1, "7: the earlier prefetch is in the buffer");

    check(n_pbuf == 3 && n_true == 3, $sformatf("event totals pbuf=%0d true=%0d", n_pbuf, n_true));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_prefetch_buffer: random fills, demand lookups with take, prefetch probes
// and invalidations against a reference model of an 8-entry fully associative
// buffer with FIFO replacement. Checks hit/miss on both lookup ports, the line
// returned, the occupancy, and that the oldest fill is replaced when full.
module tb_prefetch_buffer;
  import jp_pkg::*;

  localparam int unsigned LINES = 8;

  logic  clk = 1'b0, rst_n = 1'b0;
  blk_t  lk_blk = '0, pr_blk = '0, fill_blk = '0, inval_blk = '0;
  logic  lk_hit, pr_hit;
  line_t lk_line, fill_line = '0;
  logic  take = 1'b0, fill = 1'b0, inval = 1'b0;
  logic [$clog2(LINES+1)-1:0] occupancy;

  int checks = 0, failures = 0, n_hits = 0, n_evict = 0;

  // model: slot contents
  bit    m_valid [LINES];
  blk_t  m_tag   [LINES];
  line_t m_data  [LINES];
  int    m_ptr;

  prefetch_buffer #(.LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic int find(blk_t b);
    for (int i = 0; i < LINES; i++) if (m_valid[i] && m_tag[i] == b) return i;
    return -1;
  endfunction

  initial begin
    m_ptr = 0;
    foreach (m_valid[i]) m_valid[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int li, pi, occ;
      bit pre_valid [LINES];
      @(negedge clk);
      // small block space so hits are common
      lk_blk    = blk_t'($urandom % 24);
      pr_blk    = blk_t'($urandom % 24);
      take      = ($urandom % 3 == 0);
      fill      = ($urandom % 2 == 0);
      fill_blk  = blk_t'($urandom % 24);
      fill_line = {$urandom, $urandom, $urandom, $urandom};
      inval     = ($urandom % 10 == 0);
      inval_blk = blk_t'($urandom % 24);
      if (fill && (fill_blk == lk_blk || fill_blk == inval_blk)) fill = 1'b0;
      #1;
      li = find(lk_blk);
      pi = find(pr_blk);
      occ = 0;
      foreach (m_valid[i]) occ += int'(m_valid[i]);
      check(lk_hit == (li >= 0), "lookup hit");
      if (li >= 0) begin
        check(lk_line == m_data[li], "lookup line");
        n_hits++;
      end
      check(pr_hit == (pi >= 0), "probe hit");
      check(int'(occupancy) == occ, "occupancy");
      // model update at the clock edge; free slots are those before this edge
      pre_valid = m_valid;
      if (take && li >= 0) m_valid[li] = 0;
      if (inval) begin
        int ii;
        ii = find(inval_blk);
        if (ii >= 0) m_valid[ii] = 0;
      end
      if (fill) begin
        int fi, free_i;
        fi = find(fill_blk);
        free_i = -1;
        // free slots as seen before this edge's take/inval
        for (int i = LINES - 1; i >= 0; i--) if (!pre_valid[i]) free_i = i;
        if (fi < 0) begin
          if (free_i >= 0) fi = free_i;
          else begin fi = m_ptr; m_ptr = (m_ptr + 1) % LINES; n_evict++; end
        end
        m_valid[fi] = 1; m_tag[fi] = fill_blk; m_data[fi] = fill_line;
      end
    end
    check(n_hits > 100, "lookup hits happened");
    check(n_evict > 10, "FIFO replacement happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

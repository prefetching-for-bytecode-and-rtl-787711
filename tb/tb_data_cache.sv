// tb_data_cache: fills, reads, probes and byte-enabled writes on the 4 KB
// direct-mapped cache, compared with a reference model indexed by block
// number. Addresses come from a range four times the cache size so that
// conflicting lines replace each other.
module tb_data_cache;
  import jp_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  addr_t      rd_addr = '0, wr_addr = '0;
  logic       rd_hit, pr_hit;
  word_t      rd_word, wr_data = '0;
  blk_t       pr_blk = '0, fill_blk = '0;
  logic       fill = 1'b0, wr = 1'b0;
  line_t      fill_line = '0;
  logic [3:0] wr_be = '0;

  int checks = 0, failures = 0, n_hits = 0, n_conflict = 0;

  // model: per cache index, which block is held and its data
  localparam int unsigned LINES = 4096 / 16;
  bit    m_valid [LINES];
  blk_t  m_blk   [LINES];
  line_t m_data  [LINES];

  data_cache dut (.*);

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

  initial begin
    foreach (m_valid[i]) m_valid[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int ri, pi, wi;
      @(negedge clk);
      rd_addr   = addr_t'(($urandom % 16384) & ~3);
      pr_blk    = blk_t'($urandom % 1024);
      fill      = ($urandom % 2 == 0);
      fill_blk  = blk_t'($urandom % 1024);
      fill_line = {$urandom, $urandom, $urandom, $urandom};
      wr        = !fill && ($urandom % 2 == 0);
      wr_addr   = addr_t'(($urandom % 16384) & ~3);
      wr_data   = $urandom;
      wr_be     = 4'($urandom);
      #1;
      ri = int'(rd_addr[11:4]);
      pi = int'(pr_blk[7:0]);
      check(rd_hit == (m_valid[ri] && m_blk[ri] == addr2blk(rd_addr)), "read hit");
      if (rd_hit) begin
        n_hits++;
        check(rd_word == m_data[ri][rd_addr[3:2]*32 +: 32], "read word");
      end
      check(pr_hit == (m_valid[pi] && m_blk[pi] == pr_blk), "probe hit");
      if (fill) begin
        wi = int'(fill_blk[7:0]);
        if (m_valid[wi] && m_blk[wi] != fill_blk) n_conflict++;
        m_valid[wi] = 1; m_blk[wi] = fill_blk; m_data[wi] = fill_line;
      end else if (wr) begin
        wi = int'(wr_addr[11:4]);
        if (m_valid[wi] && m_blk[wi] == addr2blk(wr_addr))
          for (int b = 0; b < 4; b++)
            if (wr_be[b]) m_data[wi][wr_addr[3:2]*32 + b*8 +: 8] = wr_data[b*8 +: 8];
      end
    end
    check(n_hits > 200, "read hits happened");
    check(n_conflict > 100, "conflict replacements happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_java_prefetch_top: end-to-end test of the prefetching memory system at
// its default configuration, against a 50-cycle memory model.
//
// The testbench plays the accelerator. It runs a small synthetic program:
// a loop in method M of five 16-byte bytecode blocks m0..m4 that
//   m0  reads int A[i mod 64]        (stride 4 bytes, above H; wraps)
//   m1  invokes a virtual method: F normally, G on two iterations in ten
//   F/G two blocks, then return into the middle of m1
//   m2  reads byte B[i]              (stride 1, next-block prefetch), and on
//       every third iteration branches forward over m3
//   m3  reads int C[8j]              (stride 32 bytes) and stores int D[j],
//       j counting the passes through m3
//   m4  reads a two-element array    (inside one block) and loops back
// Every bytecode is a demand word read followed by a few compute cycles, so
// a block is occupied for about 40-50 cycles. A final phase issues array
// accesses back to back to fill the prefetch request queue.
//
// The program runs twice, with prefetching disabled and enabled. Every read
// is checked against the memory pattern and the stores made so far; the
// first miss must take LAT+1 cycles; demand stall cycles of bytecode and of
// array reads are added up per run, and prefetching must reduce both
// (remaining stall ratio below 1). Each mechanism of the design must have
// happened at least once in the prefetching run.
module tb_java_prefetch_top;
  import jp_pkg::*;

  localparam int unsigned LAT     = 50;
  localparam int unsigned ITERS   = 120;
  localparam int unsigned COMPUTE = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_bc_pf_en = 1'b0, cfg_arr_pf_en = 1'b0;
  logic pc_valid = 1'b0;
  addr_t pc = '0;
  pc_kind_e pc_kind = PC_FLOW;
  logic arr_valid = 1'b0;
  addr_t arr_base = '0;
  logic signed [31:0] arr_index = '0;
  logic [1:0] arr_esize_log2 = '0;
  logic [31:0] arr_length = '0;
  logic d_valid = 1'b0, d_we = 1'b0, d_ready;
  addr_t d_addr = '0;
  word_t d_wdata = '0, d_rdata;
  logic [3:0] d_be = 4'hF;
  logic m_req_valid, m_req_ready, m_req_we, m_rsp_valid;
  addr_t m_req_addr;
  word_t m_req_wdata;
  logic [3:0] m_req_be;
  line_t m_rsp_line;
  nbpt_ev_t nbpt_ev;
  st_ev_t st_ev;
  mc_ev_t mc_ev;
  logic [2:0] pfq_dropped;
  logic [3:0] pfq_count;
  logic [3:0] pbuf_occupancy;
  int unsigned n_reads, n_writes;

  java_prefetch_top dut (.*);
  mem_model #(.LATENCY(LAT)) u_mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t shadow [addr_t];

  // mechanism counters
  int c_nb_insert, c_nb_nshc, c_nb_nslc, c_nb_remove, c_nb_retarget, c_nb_nonseq, c_nb_extra, c_nb_supp;
  int c_st_insert, c_st_single, c_st_steady, c_st_irreg, c_st_small, c_st_large, c_st_gated, c_st_circ;
  int c_mc_hit, c_mc_pbuf, c_mc_true, c_mc_merge, c_mc_pf, c_mc_filt, c_mc_wr, c_q_drop;

  task automatic clear_counters();
    c_nb_insert = 0; c_nb_nshc = 0; c_nb_nslc = 0; c_nb_remove = 0; c_nb_retarget = 0;
    c_nb_nonseq = 0; c_nb_extra = 0; c_nb_supp = 0;
    c_st_insert = 0; c_st_single = 0; c_st_steady = 0; c_st_irreg = 0; c_st_small = 0;
    c_st_large = 0; c_st_gated = 0; c_st_circ = 0;
    c_mc_hit = 0; c_mc_pbuf = 0; c_mc_true = 0; c_mc_merge = 0; c_mc_pf = 0; c_mc_filt = 0;
    c_mc_wr = 0; c_q_drop = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    c_nb_insert += int'(nbpt_ev.insert);    c_nb_nshc   += int'(nbpt_ev.to_nshc);
    c_nb_nslc   += int'(nbpt_ev.to_nslc);   c_nb_remove += int'(nbpt_ev.remove);
    c_nb_retarget += int'(nbpt_ev.retarget); c_nb_nonseq += int'(nbpt_ev.pred_nonseq);
    c_nb_extra  += int'(nbpt_ev.pred_extra); c_nb_supp   += int'(nbpt_ev.suppress);
    c_st_insert += int'(st_ev.insert);      c_st_single += int'(st_ev.skip_single);
    c_st_steady += int'(st_ev.steady);      c_st_irreg  += int'(st_ev.irregular);
    c_st_small  += int'(st_ev.small_pf);    c_st_large  += int'(st_ev.large_pf);
    c_st_gated  += int'(st_ev.trigger_gated); c_st_circ += int'(st_ev.circular);
    c_mc_hit    += int'(mc_ev.cache_hit && d_ready);
    c_mc_pbuf   += int'(mc_ev.pbuf_hit);    c_mc_true   += int'(mc_ev.true_miss);
    c_mc_merge  += int'(mc_ev.late_merge);  c_mc_pf     += int'(mc_ev.pf_issue);
    c_mc_filt   += int'(mc_ev.pf_filtered); c_mc_wr     += int'(mc_ev.write);
    c_q_drop    += int'(pfq_dropped);
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  int stall_bc, stall_arr, stall_wr, first_lat;

  // Hints to present together with the next demand access.
  bit       h_pc = 1'b0, h_arr = 1'b0;
  addr_t    h_pc_addr, h_arr_base;
  pc_kind_e h_kind;
  int       h_idx, h_esz, h_len;

  // One demand access. d_ready is combinational: the access completes at the
  // rising edge where d_ready is high. Hints are pulsed in its first cycle.
  task automatic demand(addr_t a, bit is_bc, bit we = 1'b0, word_t w = '0);
    int cyc;
    word_t exp;
    a = {a[31:2], 2'b00};
    if (we) shadow[a] = w;
    exp = expect_word(a);
    @(negedge clk);
    d_valid = 1'b1; d_we = we; d_addr = a; d_wdata = w; d_be = 4'hF;
    pc_valid = h_pc;  pc = h_pc_addr; pc_kind = h_kind;
    arr_valid = h_arr; arr_base = h_arr_base; arr_index = h_idx;
    arr_esize_log2 = 2'(h_esz); arr_length = 32'(h_len);
    h_pc = 1'b0; h_arr = 1'b0;
    cyc = 0;
    #1;
    while (!d_ready) begin
      @(negedge clk);
      pc_valid = 1'b0; arr_valid = 1'b0; pc_kind = PC_FLOW;
      cyc++;
      #1;
    end
    if (!we) check(d_rdata == exp, $sformatf("read %h: %h expected %h", a, d_rdata, exp));
    @(negedge clk);
    d_valid = 1'b0; d_we = 1'b0;
    pc_valid = 1'b0; arr_valid = 1'b0; pc_kind = PC_FLOW;
    if (first_lat < 0) first_lat = cyc;
    if (we) stall_wr += cyc; else if (is_bc) stall_bc += cyc; else stall_arr += cyc;
  endtask

  task automatic fetch(addr_t a, pc_kind_e k = PC_FLOW);
    h_pc = 1'b1; h_pc_addr = a; h_kind = k;
    demand(a, 1'b1);
    repeat (COMPUTE) @(negedge clk);
  endtask

  task automatic array_rw(addr_t base, int idx, int esz_log2, int len, bit we = 1'b0, word_t w = '0);
    h_arr = 1'b1; h_arr_base = base; h_idx = idx; h_esz = esz_log2; h_len = len;
    demand(base + addr_t'(idx << esz_log2), 1'b0, we, w);
  endtask

  // Code and objects are spread over the cache indices like a real heap.
  localparam addr_t M = 32'h0001_0000, F = 32'h0002_0100, G = 32'h0003_0200;
  localparam addr_t A = 32'h0010_0400, B = 32'h0011_0600, C = 32'h0012_0800;
  localparam addr_t DD = 32'h0014_0000, S = 32'h0015_0F08;

  task automatic run_program();
    int j = 0;   // iteration count of the m3 path
    for (int it = 0; it < ITERS; it++) begin
      addr_t t;
      // m0
      fetch(M + 0); fetch(M + 4);
      array_rw(A, it % 64, 2, 64);
      fetch(M + 8); fetch(M + 12);
      // m1 and the call
      fetch(M + 16); fetch(M + 20); fetch(M + 24);
      t = (it % 10 == 5 || it % 10 == 6) ? G : F;
      fetch(t + 0, PC_INVOKE); fetch(t + 4); fetch(t + 8); fetch(t + 12);
      fetch(t + 16); fetch(t + 20); fetch(t + 24); fetch(t + 28);
      fetch(M + 28, PC_RETURN);
      // m2
      fetch(M + 32); fetch(M + 36);
      array_rw(B, it % 300, 0, 300);
      fetch(M + 40);
      if (it % 3 != 2) begin
        // m3
        fetch(M + 48);
        array_rw(C, (8 * j) % 2048, 2, 2048);
        array_rw(DD, j % 512, 2, 512, 1'b1, word_t'(it * 7 + 1));
        j++;
        fetch(M + 52); fetch(M + 56); fetch(M + 60);
      end
      // m4
      fetch(M + 64);
      array_rw(S, it % 2, 2, 2);
      fetch(M + 68);
    end
    // burst phase: back-to-back large-stride accesses on four arrays
    for (int k = 0; k < 64; k++)
      array_rw(32'h0020_0000 + addr_t'((k % 4) * 32'h1_0000), 16 * (k / 4), 2, 1024);
  endtask

  int off_bc, off_arr, off_wr;

  initial begin
    clear_counters();
    stall_bc = 0; stall_arr = 0; stall_wr = 0; first_lat = -1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ------------------------------------------------ run 1: no prefetching
    run_program();
    off_bc = stall_bc; off_arr = stall_arr; off_wr = stall_wr;
    check(first_lat == LAT + 1, $sformatf("first miss took %0d cycles, expected %0d", first_lat, LAT + 1));
    check(c_mc_pf == 0 && c_mc_pbuf == 0, "no prefetch traffic while disabled");

    // ------------------------------------------------ run 2: prefetching on
    @(negedge clk);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cfg_bc_pf_en = 1'b1; cfg_arr_pf_en = 1'b1;
    clear_counters();
    stall_bc = 0; stall_arr = 0; stall_wr = 0;
    run_program();

    $display("stall cycles without prefetching: bytecode %0d array %0d", off_bc, off_arr);
    $display("stall cycles with prefetching:    bytecode %0d array %0d", stall_bc, stall_arr);
    $display("store stall cycles: without %0d with %0d", off_wr, stall_wr);
    $display("RSR(bytecode) = %0.3f  RSR(array) = %0.3f",
             real'(stall_bc) / real'(off_bc), real'(stall_arr) / real'(off_arr));
    $display("NBPT: insert %0d ->NS-HC %0d ->NS-LC %0d remove %0d retarget %0d nonseq-pred %0d extra %0d suppressed %0d",
             c_nb_insert, c_nb_nshc, c_nb_nslc, c_nb_remove, c_nb_retarget, c_nb_nonseq, c_nb_extra, c_nb_supp);
    $display("ST:   insert %0d one-block %0d steady %0d irregular %0d small %0d large %0d gated %0d circular %0d",
             c_st_insert, c_st_single, c_st_steady, c_st_irreg, c_st_small, c_st_large, c_st_gated, c_st_circ);
    $display("MC:   hits %0d pbuf-hits %0d true-misses %0d late-merge %0d pf-issued %0d filtered %0d writes %0d queue-drops %0d",
             c_mc_hit, c_mc_pbuf, c_mc_true, c_mc_merge, c_mc_pf, c_mc_filt, c_mc_wr, c_q_drop);

    check(stall_bc < off_bc,   "bytecode prefetching reduces bytecode stalls");
    check(stall_arr < off_arr, "array prefetching reduces array stalls");
    check(c_nb_insert > 0,   "NBPT insertion happened");
    check(c_nb_nshc > 0,     "NBPT move to NS-HC happened");
    check(c_nb_nslc > 0,     "NBPT move to NS-LC happened");
    check(c_nb_remove > 0,   "NBPT entry removal happened");
    check(c_nb_retarget > 0, "NBPT next-block replacement happened");
    check(c_nb_nonseq > 0,   "NBPT non-sequential prediction happened");
    check(c_nb_extra > 0,    "NBPT extra invoke/return prefetch happened");
    check(c_nb_supp > 0,     "NBPT return suppression happened");
    check(c_st_insert > 0,   "ST insertion happened");
    check(c_st_single > 0,   "ST one-block array skipped");
    check(c_st_steady > 0,   "ST steady state reached");
    check(c_st_irreg > 0,    "ST irregular stride seen");
    check(c_st_small > 0,    "ST small-stride prefetch happened");
    check(c_st_large > 0,    "ST large-stride prefetch happened");
    check(c_st_gated > 0,    "ST trigger-block gating happened");
    check(c_st_circ > 0,     "ST circular prefetch happened");
    check(c_mc_hit > 0,      "cache hit happened");
    check(c_mc_pbuf > 0,     "prefetch buffer hit happened");
    check(c_mc_true > 0,     "true miss happened");
    check(c_mc_merge > 0,    "late prefetch merge happened");
    check(c_mc_pf > 0,       "prefetch issue happened");
    check(c_mc_filt > 0,     "prefetch filtering happened");
    check(c_mc_wr > 0,       "write-through happened");
    check(c_q_drop > 0,      "request queue overflow happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nbpt_prefetcher: self-checking test of the bytecode prefetch unit.
//
// Drives bytecode PC sequences that walk through the situations the NBPT is
// designed for and checks, after every block switch, the prefetch blocks that
// come out one cycle later and the state of the table entries:
//   * a method invocation and return traced over three calls (insertion with
//     I/R-bits, S-LC -> NS-LC on the sequential exit, the extra block r+1, no
//     re-prefetch of the method on return),
//   * selection between two targets Rx/Ry in the documented order of states,
//   * a loop entered twice, a forward branch that is rarely taken,
//   * the en gate and round-robin replacement of a full table.
// Expected values are written out by hand from the state rules.
module tb_nbpt_prefetcher;
  import jp_pkg::*;

  localparam int unsigned N = 16;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     en = 1'b1;
  logic     pc_valid = 1'b0;
  addr_t    pc = '0;
  pc_kind_e pc_kind = PC_FLOW;
  logic     pf_valid [2];
  blk_t     pf_blk   [2];
  nbpt_ev_t ev;

  int checks = 0, failures = 0;

  nbpt_prefetcher #(.NBPT_ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Fetch one bytecode in block b; return the prefetches seen one cycle later.
  logic got_v0, got_v1;
  blk_t got_b0, got_b1;
  task automatic go(blk_t b, pc_kind_e k = PC_FLOW);
    @(negedge clk);
    pc_valid = 1'b1;
    pc       = {b, 4'h3};
    pc_kind  = k;
    @(negedge clk);
    pc_valid = 1'b0;
    pc_kind  = PC_FLOW;
    got_v0 = pf_valid[0]; got_b0 = pf_blk[0];
    got_v1 = pf_valid[1]; got_b1 = pf_blk[1];
  endtask

  task automatic expect_pf(int n, blk_t b0, blk_t b1, string what);
    check(got_v0 == (n >= 1) && got_v1 == (n >= 2), {what, ": prefetch count"});
    if (n >= 1) check(got_b0 == b0, $sformatf("%s: first prefetch %h != %h", what, got_b0, b0));
    if (n >= 2) check(got_b1 == b1, $sformatf("%s: second prefetch %h != %h", what, got_b1, b1));
  endtask

  // Table inspection: state of the entry tagged b (0 = no entry, i.e. S-HC).
  function automatic int st_of(blk_t b);
    for (int i = 0; i < N; i++)
      if (dut.tbl[i].valid && dut.tbl[i].cur == b) return int'(dut.tbl[i].state);
    return 0;
  endfunction
  function automatic blk_t nxt_of(blk_t b);
    for (int i = 0; i < N; i++)
      if (dut.tbl[i].valid && dut.tbl[i].cur == b) return dut.tbl[i].nxt;
    return '0;
  endfunction
  function automatic logic [1:0] ir_of(blk_t b);
    for (int i = 0; i < N; i++)
      if (dut.tbl[i].valid && dut.tbl[i].cur == b) return {dut.tbl[i].ibit, dut.tbl[i].rbit};
    return 2'b00;
  endfunction

  localparam int SHC = 0, SLC = 1, NSLC = 2, NSHC = 3;

  initial begin
    blk_t Q, R1, R2, R3, X, Rx, Ry, L0, L1, L2, F0, F1, F5;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------------------------------------- invocation and return
    Q = 28'h0021000; R1 = 28'h0034000; R2 = R1 + 1; R3 = Q + 1; X = 28'h0050000;
    go(Q);                   expect_pf(1, R3, '0, "a: first entry of Q");
    check(st_of(Q) == SHC, "a: Q not in table");
    go(R1, PC_INVOKE);       expect_pf(1, R1 + 1, '0, "b: R1 predicts sequential");
    check(st_of(Q) == SLC && nxt_of(Q) == R1 && ir_of(Q) == 2'b10, "b: (Q,R1) inserted S-LC, I=1");
    go(R2);                  check(st_of(R1) == SHC, "b: sequential R1->R2 not inserted");
    go(Q, PC_RETURN);        expect_pf(1, R3, '0, "c: Q in S-LC predicts sequential");
    check(st_of(R2) == SLC && nxt_of(R2) == Q && ir_of(R2) == 2'b01, "c: (R2,Q) inserted S-LC, R=1");
    go(R3);                  check(st_of(Q) == NSLC, "d: sequential with I=1 -> NS-LC");
    go(X);                   // leave, then come back to Q through a jump
    go(Q);                   expect_pf(2, R1, R1 + 1, "e: Q in NS-LC predicts R1 and R1+1");
    go(R1, PC_INVOKE);       check(st_of(Q) == NSHC, "f: (Q,R1) NS-LC -> NS-HC");
    go(R2);                  expect_pf(1, R2 + 1, '0, "f: (R2,Q) still S-LC, sequential");
    go(Q, PC_RETURN);        expect_pf(0, '0, '0, "g: no re-prefetch of the invoked method");
    check(st_of(R2) == NSHC, "g: (R2,Q) S-LC -> NS-HC");
    check(ev.suppress == 1'b0, "g: suppress strobe is single-cycle");
    go(R3);                  check(st_of(Q) == NSLC && nxt_of(Q) == R1, "h: (Q,R1) NS-HC -> NS-LC");
    go(X);
    go(Q);
    go(R1, PC_INVOKE);       check(st_of(Q) == NSHC, "h: back to NS-HC on the next call");
    go(R2);                  expect_pf(2, Q, Q + 1, "i: return block prefetches Q and Q+1");
    go(Q, PC_RETURN);        expect_pf(0, '0, '0, "i: no re-prefetch of the invoked method");

    // ------------------------------------- selection between two targets
    Q = 28'h0100000; Rx = 28'h0200000; Ry = 28'h0300000;
    begin
      blk_t pat [8];
      int   exp_st [8];
      blk_t exp_nx [8];
      pat    = '{Rx,  Rx,   Ry,   Rx,   Ry,   Ry,   Ry,   Rx};
      exp_st = '{SLC, NSHC, NSLC, NSHC, NSLC, NSLC, NSHC, NSLC};
      exp_nx = '{Rx,  Rx,   Rx,   Rx,   Rx,   Ry,   Ry,   Ry};
      for (int i = 0; i < 8; i++) begin
        go(Q);
        if (i >= 1) begin
          if (exp_st[i-1] >= NSLC) expect_pf(1, exp_nx[i-1], '0, $sformatf("sel %0d: predict recorded", i));
          else                     expect_pf(1, Q + 1, '0, $sformatf("sel %0d: predict sequential", i));
        end
        go(pat[i]);
        check(st_of(Q) == exp_st[i] && nxt_of(Q) == exp_nx[i],
              $sformatf("sel %0d: state %0d next %h", i, st_of(Q), nxt_of(Q)));
      end
    end

    // ------------------------------------------------------------------ loop
    L0 = 28'h0400000; L1 = L0 + 1; L2 = L1 + 1;
    go(L0); go(L1);
    for (int it = 0; it < 4; it++) begin go(L0); go(L1); end
    check(st_of(L1) == NSHC && nxt_of(L1) == L0, "loop: NS-HC while looping");
    expect_pf(1, L0, '0, "loop: L1 predicts loop head");
    go(L2);                  check(st_of(L1) == NSLC, "loop: exit -> NS-LC");
    go(L0); go(L1);          expect_pf(1, L0, '0, "loop: re-entry still predicts head");
    go(L0);                  check(st_of(L1) == NSHC, "loop: back to NS-HC");

    // -------------------------------------------------------- forward branch
    F0 = 28'h0500000; F1 = F0 + 1; F5 = F0 + 5;
    go(F0); go(F5);          check(st_of(F0) == SLC, "fwd: taken once -> S-LC");
    go(F0); go(F1);          check(st_of(F0) == SHC, "fwd: fall-through with I=0 removes the entry");
    check(ev.remove == 1'b0, "fwd: remove strobe is single-cycle");

    // ------------------------------------------------------------- en gate
    en = 1'b0;
    go(28'h0600000);         expect_pf(0, '0, '0, "en=0: no prefetch");
    en = 1'b1;
    go(28'h0600009);         expect_pf(1, 28'h060000A, '0, "en=1: prefetch again");

    // ------------------------------------------------- replacement when full
    for (int i = 0; i < N + 2; i++) begin
      go(28'h0700000 + blk_t'(16 * i));
    end
    begin
      int valid_cnt;
      valid_cnt = 0;
      for (int i = 0; i < N; i++) valid_cnt += int'(dut.tbl[i].valid);
      check(valid_cnt == N, "full: every entry in use");
    end
    check(st_of(28'h0700000 + blk_t'(16 * N)) == SLC, "full: newest pair inserted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

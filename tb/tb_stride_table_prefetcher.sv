// tb_stride_table_prefetcher: self-checking test of the array prefetch unit
// at its default configuration (8 entries, H = 2 bytes, depth 2).
//
// Each scenario sweeps one array and checks, one cycle after each access, the
// prefetched blocks, worked out by hand from the stride rules:
//   A int[64] at 0x1000, index 0..63 then 0..2 again: stride 4 > H, depth-2
//     targets, trigger gating, circular wrap at the tail and the re-entry;
//   B byte[100] at 0x2000: stride 1 <= H, next-block prefetch every 16th access;
//   C short[40] at 0x3000 walked backwards: negative stride, wrap at the head;
//   D int[256] at 0x4000 every 8th element: stride 32, two blocks ahead;
//   E arrays inside one block are not tracked;
//   F replacement once all entries are used, and the en gate.
module tb_stride_table_prefetcher;
  import jp_pkg::*;

  localparam int unsigned D = 2;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               en = 1'b1;
  logic               acc_valid = 1'b0;
  addr_t              acc_base = '0;
  logic signed [31:0] acc_index = '0;
  logic [1:0]         acc_esize_log2 = '0;
  logic [31:0]        acc_length = '0;
  logic               pf_valid [D];
  blk_t               pf_blk   [D];
  st_ev_t             ev;

  int checks = 0, failures = 0;
  int n_gated = 0, n_circular = 0;

  stride_table_prefetcher dut (.*);

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

  // One access; returns the set of prefetched blocks (one cycle later).
  blk_t got [$];
  st_ev_t got_ev;
  task automatic access(addr_t base, int idx, int esz_log2, int len);
    @(negedge clk);
    acc_valid      = 1'b1;
    acc_base       = base;
    acc_index      = idx;
    acc_esize_log2 = 2'(esz_log2);
    acc_length     = 32'(len);
    #1 got_ev = ev;
    if (ev.trigger_gated) n_gated++;
    if (ev.circular)      n_circular++;
    @(negedge clk);
    acc_valid = 1'b0;
    got.delete();
    for (int k = 0; k < D; k++) if (pf_valid[k]) got.push_back(pf_blk[k]);
    @(negedge clk);
    for (int k = 0; k < D; k++) check(!pf_valid[k], "prefetch strobe lasts one cycle");
  endtask

  task automatic expect_set(blk_t exp [$], string what);
    bit ok;
    ok = (got.size() == exp.size());
    if (ok) foreach (exp[i]) ok &= (got[i] == exp[i]);
    check(ok, $sformatf("%s: got %p expected %p", what, got, exp));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // --------------------------------------------------------------- A
    for (int i = 0; i < 64; i++) begin
      access(32'h1000, i, 2, 64);
      if (i >= 2 && i % 4 == 2)
        expect_set('{(i == 62) ? 28'h100 : 28'h100 + blk_t'(i / 4 + 1)}, $sformatf("A i=%0d", i));
      else
        expect_set('{}, $sformatf("A i=%0d", i));
      if (i >= 2 && i % 4 == 3) check(got_ev.trigger_gated, $sformatf("A i=%0d gated", i));
      if (i == 62) check(got_ev.circular, "A i=62 circular wrap to head");
    end
    access(32'h1000, 0, 2, 64);  expect_set('{28'h10F}, "A restart: irregular stride, wrapped target");
    check(got_ev.irregular, "A restart flagged irregular");
    access(32'h1000, 1, 2, 64);  expect_set('{}, "A restart i=1");
    access(32'h1000, 2, 2, 64);  expect_set('{28'h101}, "A restart i=2");

    // --------------------------------------------------------------- B
    for (int i = 0; i < 100; i++) begin
      access(32'h2000, i, 0, 100);
      if (i == 0 || i == 1)          expect_set('{28'h201}, $sformatf("B i=%0d", i));
      else if (i == 96)              expect_set('{28'h200}, "B i=96 circular");
      else if (i % 16 == 0)          expect_set('{28'h200 + blk_t'(i / 16 + 1)}, $sformatf("B i=%0d", i));
      else                           expect_set('{}, $sformatf("B i=%0d", i));
      if (i == 1) check(got_ev.steady && got_ev.small_pf, "B i=1 steady small-stride prefetch");
    end

    // --------------------------------------------------------------- C
    for (int i = 39; i >= 0; i--) begin
      access(32'h3000, i, 1, 40);
      case (i)
        39:      expect_set('{28'h300}, "C i=39 tentative, wrapped");
        38, 37:  expect_set('{28'h303}, $sformatf("C i=%0d", i));
        31:      expect_set('{28'h302}, "C i=31");
        23:      expect_set('{28'h301}, "C i=23");
        15:      expect_set('{28'h300}, "C i=15");
        7:       expect_set('{28'h304}, "C i=7 wrap to tail");
        default: expect_set('{}, $sformatf("C i=%0d", i));
      endcase
    end

    // --------------------------------------------------------------- D
    access(32'h4000, 0, 2, 256);   expect_set('{}, "D i=0");
    access(32'h4000, 8, 2, 256);   expect_set('{28'h404, 28'h406}, "D i=8 Init, two ahead");
    check(got_ev.large_pf && got_ev.irregular, "D i=8 large-stride, irregular");
    access(32'h4000, 16, 2, 256);  expect_set('{28'h406, 28'h408}, "D i=16");
    access(32'h4000, 24, 2, 256);  expect_set('{}, "D i=24 gated");
    access(32'h4000, 32, 2, 256);  expect_set('{28'h40A, 28'h40C}, "D i=32");

    // --------------------------------------------------------------- E
    access(32'h5000, 1, 2, 4);     expect_set('{}, "E one-block array");
    check(got_ev.skip_single && !got_ev.insert, "E not inserted");
    access(32'h5008, 0, 2, 4);     check(got_ev.insert, "E two-block array inserted");
    expect_set('{28'h501}, "E two-block array tentative prefetch");

    // --------------------------------------------------------------- F
    // Entries now: A B C D E2 -> fill three more, then one more evicts A.
    for (int a = 0; a < 4; a++) access(32'h8000 + addr_t'(a * 32'h100), 0, 0, 64);
    access(32'h1000, 5, 2, 64);    check(got_ev.insert, "F array A was replaced and re-inserted");
    en = 1'b0;
    access(32'h2000, 50, 0, 100);  expect_set('{}, "F en=0 gates prefetch");
    check(got_ev.insert, "F B was replaced next (round robin); insert still happens with en=0");
    en = 1'b1;

    check(n_gated > 20, "trigger block gated repeated prefetches");
    check(n_circular >= 3, "circular prefetching used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_prefetch_request_queue: random pushes on four lanes and random pops,
// compared with a reference FIFO kept as a SystemVerilog queue. Checks the
// head entry, the count, the number of dropped requests when full, that the
// slot freed by a pop is reusable in the same cycle, and that data appears at
// the head one cycle after its push.
module tb_prefetch_request_queue;
  import jp_pkg::*;

  localparam int unsigned DEPTH = 8;
  localparam int unsigned NPUSH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push_valid [NPUSH];
  blk_t push_blk   [NPUSH];
  logic head_valid, pop;
  blk_t head_blk;
  logic [$clog2(NPUSH+1)-1:0] dropped;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0, drops_seen = 0, full_pop_push = 0;
  blk_t model [$];

  prefetch_request_queue #(.DEPTH(DEPTH), .NPUSH(NPUSH)) dut (.*);

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
    pop = 1'b0;
    for (int l = 0; l < NPUSH; l++) begin push_valid[l] = 1'b0; push_blk[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int exp_drop, room;
      bit popping;
      @(negedge clk);
      // compare the visible state with the model
      check(head_valid == (model.size() != 0), "head_valid");
      if (model.size() != 0) check(head_blk == model[0], $sformatf("head %h vs %h", head_blk, model[0]));
      check(int'(count) == model.size(), "count");
      // new stimulus; phases: fill hard, drain, mixed
      pop = (cyc % 600 < 200) ? ($urandom % 4 == 0) : (cyc % 600 < 400) ? 1'b1 : ($urandom % 2 == 0);
      for (int l = 0; l < NPUSH; l++) begin
        push_valid[l] = (cyc % 600 < 200) ? ($urandom % 2 == 0) : (cyc % 600 < 400) ? ($urandom % 8 == 0) : ($urandom % 4 == 0);
        push_blk[l]   = blk_t'($urandom);
      end
      #1;
      popping = pop && model.size() != 0;
      room = DEPTH - model.size() + (popping ? 1 : 0);
      exp_drop = 0;
      if (popping) void'(model.pop_front());
      if (model.size() + (popping ? 1 : 0) == DEPTH && popping) full_pop_push++;
      for (int l = 0; l < NPUSH; l++) if (push_valid[l]) begin
        if (room > 0) begin model.push_back(push_blk[l]); room--; end
        else exp_drop++;
      end
      check(int'(dropped) == exp_drop, $sformatf("dropped %0d vs %0d", dropped, exp_drop));
      drops_seen += exp_drop;
    end
    check(drops_seen > 0, "overflow happened");
    check(full_pop_push > 0, "pop while full happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

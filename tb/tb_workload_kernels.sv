// tb_workload_kernels: three small kernels in the style of the embedded Java
// benchmarks, each run through the complete memory system (default
// parameters, 50-cycle memory) once without and once with prefetching.
//
//   image  : a 3x3 box filter over a 20x20 int image held as one array per
//            row (the row references are kept in locals); a small clamp()
//            method is invoked per pixel
//            (image-processing style: row walks, invoke/return per pixel)
//   queens : recursive 6-queens backtracking over an int[6] board; place()
//            calls safe() per candidate and itself per accepted queen
//            (deep invoke/return, short loops, small array)
//   crypto : a byte stream run through a 256-entry int S-box and written out
//            (table lookups with data-dependent, irregular strides)
//
// The testbench plays the accelerator: every bytecode is a demand word read
// of its PC with the pc_* hint, every array element a demand access with the
// arr_* hint, followed by a few compute cycles. The kernels compute with the
// values that come back through the memory system; every load is compared
// with the memory pattern and the stores made so far, and each kernel's
// result is checked (filter output read back against a reference computed
// from the pattern, the number of 6-queens solutions, the S-box output read
// back). Demand stall cycles are reported per kernel as remaining stall
// ratios (with prefetching / without); the image kernel's array stalls must
// go down.
module tb_workload_kernels;
  import jp_pkg::*;

  localparam int unsigned LAT     = 50;
  localparam int unsigned COMPUTE = 6;

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

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // Contents of a word never stored: the memory model's fill pattern.
  function automatic word_t pattern(addr_t a);
    return {a[31:2], 2'b00} * 32'h9E37_79B1 + 32'h1234_5678;
  endfunction

  function automatic word_t expect_word(addr_t a);
    if (shadow.exists(a)) return shadow[a];
    return pattern(a);
  endfunction

  int stall_bc, stall_arr;

  bit       h_pc = 1'b0, h_arr = 1'b0;
  addr_t    h_pc_addr, h_arr_base;
  pc_kind_e h_kind;
  int       h_idx, h_esz, h_len;

  // One demand word access with the pending hints; returns the loaded word.
  task automatic demand(addr_t a, bit is_bc, bit we, word_t w, output word_t r);
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
    r = d_rdata;
    if (!we) check(d_rdata == exp, $sformatf("load %h: %h expected %h", a, d_rdata, exp));
    @(negedge clk);
    d_valid = 1'b0; d_we = 1'b0;
    pc_valid = 1'b0; arr_valid = 1'b0; pc_kind = PC_FLOW;
    if (is_bc) stall_bc += cyc; else stall_arr += cyc;
  endtask

  // Execute the bytecodes of one block from byte offset `from` to `to`
  // (word steps); the first fetch carries `k`.
  task automatic run_block(addr_t blk_addr, int from, int to, pc_kind_e k = PC_FLOW);
    word_t r;
    for (int o = from; o <= to; o += 4) begin
      h_pc = 1'b1; h_pc_addr = blk_addr + addr_t'(o); h_kind = (o == from) ? k : PC_FLOW;
      demand(blk_addr + addr_t'(o), 1'b1, 1'b0, '0, r);
      repeat (COMPUTE) @(negedge clk);
    end
  endtask

  task automatic aload(addr_t base, int idx, int esz_log2, int len, output word_t r);
    h_arr = 1'b1; h_arr_base = base; h_idx = idx; h_esz = esz_log2; h_len = len;
    demand(base + addr_t'(idx << esz_log2), 1'b0, 1'b0, '0, r);
  endtask

  task automatic astore(addr_t base, int idx, int len, word_t w);
    word_t r;
    h_arr = 1'b1; h_arr_base = base; h_idx = idx; h_esz = 2; h_len = len;
    demand(base + addr_t'(idx << 2), 1'b0, 1'b1, w, r);
  endtask

  // ------------------------------------------------------------------ image
  localparam int    N      = 20;
  localparam addr_t IM_M   = 32'h0004_0000;   // filter method, 4 blocks
  localparam addr_t IM_CL  = 32'h0004_4140;   // clamp(), 1 block
  localparam addr_t IM_SRC = 32'h0020_0008;   // int[N][N]: row r at +r*0x60
  localparam addr_t IM_DST = 32'h0022_0408;

  function automatic addr_t row_src(int r); return IM_SRC + addr_t'(r * 32'h60); endfunction
  function automatic addr_t row_dst(int r); return IM_DST + addr_t'(r * 32'h60); endfunction

  task automatic image_kernel();
    word_t v, s;
    for (int y = 1; y < N - 1; y++) begin
      run_block(IM_M, 0, 12);                       // row setup
      for (int x = 1; x < N - 1; x++) begin
        run_block(IM_M + 16, 0, 8);
        s = '0;
        for (int dy = -1; dy <= 1; dy++) begin
          for (int dx = -1; dx <= 1; dx++) begin
            aload(row_src(y + dy), x + dx, 2, N, v);
            s += v;
          end
          run_block(IM_M + 32, 0, 4);
        end
        run_block(IM_CL, 0, 12, PC_INVOKE);         // clamp(s)
        s = s >> 4;
        run_block(IM_M + 32, 8, 12, PC_RETURN);
        astore(row_dst(y), x, N, s);
        run_block(IM_M + 48, 0, 4);                 // x loop back edge
      end
    end
  endtask

  task automatic image_check();
    word_t v, s;
    for (int y = 1; y < N - 1; y++)
      for (int x = 1; x < N - 1; x++) begin
        s = '0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            s += pattern(row_src(y + dy) + addr_t'((x + dx) * 4));
        aload(row_dst(y), x, 2, N, v);
        check(v == (s >> 4), $sformatf("filter output (%0d,%0d)", y, x));
      end
  endtask

  // ----------------------------------------------------------------- queens
  localparam int    Q      = 6;
  localparam addr_t QP     = 32'h0005_0200;    // place(), 3 blocks
  localparam addr_t QS     = 32'h0005_2680;    // safe(),  3 blocks
  localparam addr_t QBOARD = 32'h0024_0808;    // int[Q]

  int solutions;

  task automatic q_safe(int row, int col, output bit ok);
    word_t c;
    int cv;
    run_block(QS, 0, 12, PC_INVOKE);
    ok = 1'b1;
    for (int r = 0; r < row && ok; r++) begin
      run_block(QS + 16, 0, 4);
      aload(QBOARD, r, 2, Q, c);
      cv = int'(c);
      if (cv == col || cv - col == row - r || col - cv == row - r) ok = 1'b0;
      run_block(QS + 16, 8, 12);
    end
    run_block(QS + 32, 0, 4);
  endtask

  task automatic q_place(int row);
    bit ok;
    run_block(QP, 0, 12, PC_INVOKE);
    if (row == Q) begin
      solutions++;
      return;
    end
    for (int col = 0; col < Q; col++) begin
      run_block(QP + 16, 0, 8);
      q_safe(row, col, ok);
      run_block(QP + 16, 12, 12, PC_RETURN);
      if (ok) begin
        run_block(QP + 32, 0, 4);
        astore(QBOARD, row, Q, word_t'(col));
        q_place(row + 1);
        run_block(QP + 32, 8, 12, PC_RETURN);
      end
    end
  endtask

  // ----------------------------------------------------------------- crypto
  localparam int    CN    = 256;
  localparam addr_t CR_M  = 32'h0006_0300;    // loop, 3 blocks
  localparam addr_t SBOX  = 32'h0026_0C08;    // int[256]
  localparam addr_t C_IN  = 32'h0027_0008;    // byte[CN]
  localparam addr_t C_OUT = 32'h0028_0508;    // int[CN]

  function automatic logic [7:0] in_byte(int i);
    word_t w;
    w = pattern(C_IN + addr_t'(i));
    return w[8 * (i % 4) +: 8];
  endfunction

  task automatic crypto_kernel();
    word_t w, sv;
    logic [7:0] b;
    for (int i = 0; i < CN; i++) begin
      run_block(CR_M, 0, 8);
      aload(C_IN, i, 0, CN, w);
      b = w[8 * (i % 4) +: 8];
      run_block(CR_M + 16, 0, 4);
      aload(SBOX, int'(b), 2, 256, sv);
      astore(C_OUT, i, CN, sv ^ word_t'(i));
      run_block(CR_M + 32, 0, 8);
    end
  endtask

  task automatic crypto_check();
    word_t v;
    for (int i = 0; i < CN; i++) begin
      aload(C_OUT, i, 2, CN, v);
      check(v == (pattern(SBOX + addr_t'(in_byte(i)) * 4) ^ word_t'(i)), $sformatf("S-box output %0d", i));
    end
  endtask

  // ------------------------------------------------------------------ runs
  task automatic reset_system(bit pf);
    @(negedge clk);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cfg_bc_pf_en = pf; cfg_arr_pf_en = pf;
    stall_bc = 0; stall_arr = 0;
  endtask

  int ob, oa;

  task automatic report(string name, int off_bc, int off_arr);
    $display("%-7s stalls bytecode %6d -> %6d  array %6d -> %6d  RSR(bytecode) %0.3f  RSR(array) %0.3f",
             name, off_bc, stall_bc, off_arr, stall_arr,
             real'(stall_bc) / real'(off_bc > 0 ? off_bc : 1),
             real'(stall_arr) / real'(off_arr > 0 ? off_arr : 1));
  endtask

  initial begin
    repeat (3) @(posedge clk);

    reset_system(1'b0); image_kernel();  ob = stall_bc; oa = stall_arr;
    reset_system(1'b1); image_kernel();  report("image", ob, oa);
    check(stall_arr < oa, "image: array prefetching reduces array stalls");
    image_check();

    reset_system(1'b0); solutions = 0; q_place(0); ob = stall_bc; oa = stall_arr;
    check(solutions == 4, $sformatf("queens: %0d solutions, expected 4", solutions));
    reset_system(1'b1); solutions = 0; q_place(0); report("queens", ob, oa);
    check(solutions == 4, $sformatf("queens: %0d solutions with prefetching, expected 4", solutions));

    reset_system(1'b0); crypto_kernel(); ob = stall_bc; oa = stall_arr;
    reset_system(1'b1); crypto_kernel(); report("crypto", ob, oa);
    crypto_check();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

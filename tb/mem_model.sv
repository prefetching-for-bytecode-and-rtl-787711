// mem_model: behavioural model of main memory for testbenches (not
// synthesizable logic; it stands in for an external memory device).
//
// One request is accepted per cycle while no read is outstanding. A read
// returns the whole 16-byte line LATENCY cycles after it was accepted, as one
// m_rsp_valid cycle. A write updates one word (byte enables) and needs no
// response. Words never written read as init_word(address), a fixed pattern a
// testbench can recompute on its own. Writes are kept in an associative array.
module mem_model
  import jp_pkg::*;
#(
  parameter int unsigned LATENCY = 50
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       m_req_valid,
  output logic       m_req_ready,
  input  logic       m_req_we,
  input  addr_t      m_req_addr,
  input  word_t      m_req_wdata,
  input  logic [3:0] m_req_be,
  output logic       m_rsp_valid,
  output line_t      m_rsp_line,
  output int unsigned n_reads,
  output int unsigned n_writes
);

  word_t store [addr_t];

  function automatic word_t init_word(addr_t a);
    return {a[31:2], 2'b00} * 32'h9E37_79B1 + 32'h1234_5678;
  endfunction

  function automatic word_t read_word(addr_t a);
    addr_t wa;
    wa = {a[31:2], 2'b00};
    if (store.exists(wa)) return store[wa];
    return init_word(wa);
  endfunction

  logic        busy;
  int unsigned timer;
  addr_t       rd_addr;

  assign m_req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      timer       <= 0;
      rd_addr     <= '0;
      m_rsp_valid <= 1'b0;
      m_rsp_line  <= '0;
      n_reads     <= 0;
      n_writes    <= 0;
    end else begin
      m_rsp_valid <= 1'b0;
      if (m_req_valid && !busy) begin
        if (m_req_we) begin
          word_t w;
          addr_t wa;
          wa = {m_req_addr[31:2], 2'b00};
          w  = read_word(wa);
          for (int b = 0; b < 4; b++)
            if (m_req_be[b]) w[b*8 +: 8] = m_req_wdata[b*8 +: 8];
          store[wa] = w;
          n_writes <= n_writes + 1;
        end else begin
          busy    <= 1'b1;
          timer   <= (LATENCY > 1) ? LATENCY - 1 : 0;
          rd_addr <= {m_req_addr[31:OFF_W], {OFF_W{1'b0}}};
          n_reads <= n_reads + 1;
        end
      end
      if (busy) begin
        if (timer <= 1) begin
          line_t l;
          for (int w = 0; w < WORDS_PER_LINE; w++)
            l[w*WORD_W +: WORD_W] = read_word(rd_addr + addr_t'(4*w));
          m_rsp_line  <= l;
          m_rsp_valid <= 1'b1;
          busy        <= 1'b0;
        end else begin
          timer <= timer - 1;
        end
      end
    end
  end

endmodule

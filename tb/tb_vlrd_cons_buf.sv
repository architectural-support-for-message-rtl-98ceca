// tb_vlrd_cons_buf: random traffic against a reference model of consBuf:
// allocation through the round-robin free register (CIFR), arrival order of
// the input list (CIHR/CITR) under simultaneous append and pop, per-slot
// contents and nextL links, release of slots, and refusal when full.
module tb_vlrd_cons_buf;
  import vl_pkg::*;

  localparam int DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, head_valid, pop, ln_en, fr_en;
  sqi_t in_sqi, head_sqi;
  pa_t  in_tgt, rd_tgt;
  src_t rd_src;
  // core id paired with an address: a fixed function, so the model needs no extra state
  function automatic src_t src_of(pa_t t);
    return src_t'(t[9:6] ^ t[21:18] ^ t[33:30]);
  endfunction
  idx_t head_idx, rd_idx, rd_next_l, ln_idx, ln_next, fr_idx;
  logic [IDX_W-1:0] used;

  vlrd_cons_buf #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n,
    .in_valid_i(in_valid), .in_sqi_i(in_sqi), .in_tgt_i(in_tgt), .in_src_i(src_of(in_tgt)), .in_ready_o(in_ready),
    .head_valid_o(head_valid), .head_idx_o(head_idx), .head_sqi_o(head_sqi), .pop_i(pop),
    .rd_idx_i(rd_idx), .rd_tgt_o(rd_tgt), .rd_src_o(rd_src), .rd_next_l_o(rd_next_l),
    .ln_en_i(ln_en), .ln_idx_i(ln_idx), .ln_next_i(ln_next),
    .fr_en_i(fr_en), .fr_idx_i(fr_idx), .used_o(used)
  );

  int checks = 0, failures = 0;
  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  bit   m_valid [1:DEPTH];
  int   m_sqi   [1:DEPTH];
  pa_t  m_tgt   [1:DEPTH];
  int   m_nextl [1:DEPTH];
  int   m_inq [$];       // input list
  int   m_out [$];       // popped, still valid (may be released)
  int   m_cifr;
  int   n_full = 0, n_both = 0;

  function automatic int next_free(int start);
    for (int i = 0; i < DEPTH; i++) begin
      int c;
      c = ((start - 1 + i) % DEPTH) + 1;
      if (!m_valid[c]) return c;
    end
    return 0;
  endfunction

  initial begin
    int exp_slot, k, cnt;
    in_valid = 0; pop = 0; ln_en = 0; fr_en = 0;
    in_sqi = '0; in_tgt = '0; rd_idx = '0; ln_idx = '0; ln_next = '0; fr_idx = '0;
    for (int i = 1; i <= DEPTH; i++) begin m_valid[i] = 0; m_nextl[i] = 0; end
    m_cifr = 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      // drive
      in_valid = ($urandom_range(0, 2) != 0);
      in_sqi   = sqi_t'($urandom_range(0, 63));
      in_tgt   = pa_t'({$urandom(), $urandom()}) & ~pa_t'(63);
      pop      = (m_inq.size() > 0) && ($urandom_range(0, 2) == 0);
      fr_en    = (m_out.size() > 0) && ($urandom_range(0, 2) == 0);
      k        = fr_en ? $urandom_range(0, m_out.size() - 1) : 0;
      fr_idx   = fr_en ? idx_t'(m_out[k]) : '0;
      ln_en    = ($urandom_range(0, 3) == 0);
      ln_idx   = idx_t'($urandom_range(1, DEPTH));
      ln_next  = idx_t'($urandom_range(0, DEPTH));
      rd_idx   = idx_t'($urandom_range(1, DEPTH));
      #1;
      // check outputs against the model
      exp_slot = m_cifr;
      check(in_ready == (exp_slot != 0 && !m_valid[exp_slot]), $sformatf("in_ready %0b", in_ready));
      check(head_valid == (m_inq.size() > 0), "head_valid");
      if (m_inq.size() > 0) begin
        check(int'(head_idx) == m_inq[0], $sformatf("head %0d, expected %0d", head_idx, m_inq[0]));
        check(int'(head_sqi) == m_sqi[m_inq[0]], "head sqi");
      end
      if (m_valid[rd_idx]) begin
        check(rd_tgt == m_tgt[rd_idx], $sformatf("slot %0d tgt", rd_idx));
        check(rd_src == src_of(m_tgt[rd_idx]), $sformatf("slot %0d core", rd_idx));
        check(int'(rd_next_l) == m_nextl[rd_idx], $sformatf("slot %0d nextL", rd_idx));
      end
      cnt = 0;
      for (int i = 1; i <= DEPTH; i++) cnt += m_valid[i];
      check(int'(used) == cnt, "occupancy");
      if (in_valid && !in_ready) n_full++;
      if (in_valid && in_ready && pop) n_both++;
      @(posedge clk);
      // update the model
      if (pop) begin
        m_out.push_back(m_inq.pop_front());
      end
      if (fr_en) begin
        m_valid[m_out[k]] = 0;
        m_out.delete(k);
      end
      if (ln_en && m_valid[ln_idx]) m_nextl[ln_idx] = ln_next;
      if (in_valid && exp_slot != 0 && !m_valid[exp_slot]) begin
        m_valid[exp_slot] = 1;
        m_sqi[exp_slot]   = in_sqi;
        m_tgt[exp_slot]   = in_tgt;
        m_nextl[exp_slot] = 0;
        m_inq.push_back(exp_slot);
      end
      m_cifr = next_free(m_cifr == 0 ? 1 : m_cifr);
    end
    check(n_full > 0, "buffer never full");
    check(n_both > 0, "append and pop never in the same cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

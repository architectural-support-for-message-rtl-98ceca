// tb_srd_spec_buf: random traffic against a reference model of specBuf:
// registration into the lowest free entry and refusal when full, target
// address base + offset * 64 B, offset advance on a hit with wrap at len
// (len 0 = 64 lines), on_fly set by a take and cleared by the answer, loop
// links, and the send time / history of the Odelay and adapt algorithms.
module tb_srd_spec_buf;
  import vl_pkg::*;

  localparam int DEPTH = 8;
  localparam int DELTA = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ts_t       tsc, rd_send_at;
  spec_alg_e alg;
  logic      rg_valid, rg_ready, rd_valid, rd_on_fly, ln0_en, ln1_en, tk_en, rs_en, rs_hit;
  pa_t       rg_base, rd_tgt;
  src_t      rd_src;
  // core id paired with an address: a fixed function, so the model needs no extra state
  function automatic src_t src_of(pa_t t);
    return src_t'(t[9:6] ^ t[21:18] ^ t[33:30]);
  endfunction
  len_t      rg_len;
  idx_t      rg_idx, rd_idx, rd_next, ln0_idx, ln0_next, ln1_idx, ln1_next, tk_idx, rs_idx;
  logic [IDX_W-1:0] used;

  srd_spec_buf #(.DEPTH(DEPTH), .DELTA(DELTA)) dut (
    .clk, .rst_n, .tsc_i(tsc), .alg_i(alg),
    .rg_valid_i(rg_valid), .rg_base_i(rg_base), .rg_len_i(rg_len), .rg_src_i(src_of(rg_base)),
    .rg_ready_o(rg_ready), .rg_idx_o(rg_idx),
    .rd_idx_i(rd_idx), .rd_valid_o(rd_valid), .rd_on_fly_o(rd_on_fly), .rd_next_o(rd_next),
    .rd_tgt_o(rd_tgt), .rd_src_o(rd_src), .rd_send_at_o(rd_send_at),
    .ln0_en_i(ln0_en), .ln0_idx_i(ln0_idx), .ln0_next_i(ln0_next),
    .ln1_en_i(ln1_en), .ln1_idx_i(ln1_idx), .ln1_next_i(ln1_next),
    .tk_en_i(tk_en), .tk_idx_i(tk_idx),
    .rs_en_i(rs_en), .rs_idx_i(rs_idx), .rs_hit_i(rs_hit), .used_o(used)
  );

  int checks = 0, failures = 0;
  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL [%0t]: %s", $time, msg); end
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          m_valid [1:DEPTH];
  bit          m_fly   [1:DEPTH];
  longint      m_base  [1:DEPTH];
  int          m_len   [1:DEPTH];
  int          m_off   [1:DEPTH];
  int          m_next  [1:DEPTH];
  longint      m_delay [1:DEPTH];
  int          n_wrap = 0, n_full = 0;

  function automatic int pick(bit want_fly);
    int c [$];
    for (int i = 1; i <= DEPTH; i++) if (m_valid[i] && m_fly[i] == want_fly) c.push_back(i);
    if (c.size() == 0) return 0;
    return c[$urandom_range(0, c.size() - 1)];
  endfunction

  initial begin
    int exp_free, t, r, lenv;
    longint exp_tgt;
    rg_valid = 0; ln0_en = 0; ln1_en = 0; tk_en = 0; rs_en = 0; rs_hit = 0;
    rg_base = '0; rg_len = '0; rd_idx = '0; ln0_idx = '0; ln0_next = '0; ln1_idx = '0;
    ln1_next = '0; tk_idx = '0; rs_idx = '0; tsc = '0; alg = ALG_ODELAY;
    for (int i = 1; i <= DEPTH; i++) m_valid[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      tsc      = tsc + 1;
      alg      = (n < 3000) ? ALG_ODELAY : ALG_ADAPT;
      rg_valid = ($urandom_range(0, 30) == 0);
      rg_base  = pa_t'({$urandom(), $urandom()}) & ~pa_t'(63);
      rg_len   = ($urandom_range(0, 5) == 0) ? len_t'(0) : len_t'($urandom_range(1, 3));
      t        = pick(1'b0);
      tk_en    = (t != 0) && ($urandom_range(0, 2) == 0);
      tk_idx   = idx_t'(t);
      r        = pick(1'b1);
      rs_en    = (r != 0) && ($urandom_range(0, 1) == 0);
      rs_idx   = idx_t'(r);
      rs_hit   = ($urandom_range(0, 3) != 0);
      ln0_en   = ($urandom_range(0, 7) == 0);
      ln0_idx  = idx_t'($urandom_range(1, DEPTH));
      ln0_next = idx_t'($urandom_range(1, DEPTH));
      ln1_en   = ($urandom_range(0, 7) == 0);
      ln1_idx  = idx_t'($urandom_range(1, DEPTH));
      ln1_next = idx_t'($urandom_range(1, DEPTH));
      if (ln1_idx == ln0_idx) ln1_en = 0;
      rd_idx   = idx_t'($urandom_range(1, DEPTH));
      #1;
      exp_free = 0;
      for (int i = DEPTH; i >= 1; i--) if (!m_valid[i]) exp_free = i;
      check(rg_ready == (exp_free != 0), "rg_ready");
      if (exp_free != 0) check(int'(rg_idx) == exp_free, $sformatf("registered into %0d, expected %0d", rg_idx, exp_free));
      check(rd_valid == m_valid[rd_idx], "rd_valid");
      if (m_valid[rd_idx]) begin
        exp_tgt = m_base[rd_idx] + longint'(m_off[rd_idx]) * 64;
        check(rd_tgt == pa_t'(exp_tgt), $sformatf("entry %0d target %h, expected %h", rd_idx, rd_tgt, exp_tgt));
        check(rd_on_fly == m_fly[rd_idx], "on_fly");
        check(rd_src == src_of(pa_t'(m_base[rd_idx])), "registering core");
        check(int'(rd_next) == m_next[rd_idx], "next");
        if (alg == ALG_ODELAY) check(rd_send_at == tsc, "Odelay send time");
        else check(rd_send_at == ts_t'(tsc + ts_t'(m_delay[rd_idx])), "adapt send time");
      end
      if (rg_valid && !rg_ready) n_full++;
      @(posedge clk);
      if (rg_valid && exp_free != 0) begin
        m_valid[exp_free] = 1; m_fly[exp_free] = 0; m_base[exp_free] = longint'(rg_base);
        m_len[exp_free] = rg_len; m_off[exp_free] = 0; m_next[exp_free] = exp_free;
        m_delay[exp_free] = 0;
      end
      if (ln0_en) m_next[ln0_idx] = ln0_next;
      if (ln1_en) m_next[ln1_idx] = ln1_next;
      if (tk_en) m_fly[t] = 1;
      if (rs_en) begin
        m_fly[r] = 0;
        lenv = (m_len[r] == 0) ? 64 : m_len[r];
        if (rs_hit) begin
          m_off[r] = (m_off[r] + 1) % lenv;
          if (m_off[r] == 0) n_wrap++;
        end
        if (alg == ALG_ADAPT) begin
          if (rs_hit) m_delay[r] = m_delay[r] / 2;
          else if (m_delay[r] < DELTA) m_delay[r] = DELTA;
          else m_delay[r] = m_delay[r] * 2;
        end
      end
    end
    check(n_wrap > 0, "offset never wrapped");
    check(n_full > 0, "specBuf never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

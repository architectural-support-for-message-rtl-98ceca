// tb_vlrd_prod_buf: random traffic against a reference model of prodBuf.
// Lines are pushed (round-robin free register PIFR, refusal when full),
// taken from the IN list, parked in the LINK partition, mapped to a
// consumer (sending queue, FIFO order) or to a speculation target with a
// send time; the send port must offer the sending queue head first and
// otherwise the lowest-numbered speculative slot whose time has come, with
// the right address and data. Answers free the slot on a hit and put it back
// at the tail of the IN list on a miss.
module tb_vlrd_prod_buf;
  import vl_pkg::*;

  localparam int DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ts_t   tsc;
  logic  in_valid, in_ready, head_valid, pop;
  sqi_t  in_sqi, head_sqi, rsp_sqi;
  line_t in_data, out_data;
  idx_t  head_idx, rd_idx, rd_next_l;
  logic  ln_en, lk_en, mo_en, ms_en;
  idx_t  ln_idx, ln_next, lk_idx, mo_idx, mo_mapped, ms_idx, ms_spec;
  pa_t   mo_tgt, ms_tgt, out_tgt;
  src_t  out_dst;
  // core id paired with an address: a fixed function, so the model needs no extra state
  function automatic src_t src_of(pa_t t);
    return src_t'(t[9:6] ^ t[21:18] ^ t[33:30]);
  endfunction
  ts_t   ms_send_at;
  logic  out_valid, out_ready, out_spec;
  idx_t  out_idx;
  logic  rsp_en, rsp_hit, rsp_is_spec, rsp_sent;
  idx_t  rsp_idx, rsp_mapped, rsp_spec;
  logic [IDX_W-1:0] used;

  vlrd_prod_buf #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .tsc_i(tsc),
    .in_valid_i(in_valid), .in_sqi_i(in_sqi), .in_data_i(in_data), .in_ready_o(in_ready),
    .head_valid_o(head_valid), .head_idx_o(head_idx), .head_sqi_o(head_sqi), .pop_i(pop),
    .rd_idx_i(rd_idx), .rd_next_l_o(rd_next_l),
    .ln_en_i(ln_en), .ln_idx_i(ln_idx), .ln_next_i(ln_next),
    .lk_en_i(lk_en), .lk_idx_i(lk_idx),
    .mo_en_i(mo_en), .mo_idx_i(mo_idx), .mo_tgt_i(mo_tgt), .mo_dst_i(src_of(mo_tgt)), .mo_mapped_i(mo_mapped),
    .ms_en_i(ms_en), .ms_idx_i(ms_idx), .ms_tgt_i(ms_tgt), .ms_dst_i(src_of(ms_tgt)), .ms_spec_i(ms_spec),
    .ms_send_at_i(ms_send_at),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_idx_o(out_idx),
    .out_tgt_o(out_tgt), .out_dst_o(out_dst), .out_data_o(out_data), .out_spec_o(out_spec),
    .rsp_en_i(rsp_en), .rsp_idx_i(rsp_idx), .rsp_hit_i(rsp_hit),
    .rsp_is_spec_o(rsp_is_spec), .rsp_mapped_o(rsp_mapped), .rsp_spec_o(rsp_spec),
    .rsp_sqi_o(rsp_sqi), .rsp_sent_o(rsp_sent), .used_o(used)
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

  // reference model; st: 0 free, 1 IN list, 2 taken from IN, 3 LINK, 4 OUT, 5 SPEC, 6 SENT
  int    m_st     [1:DEPTH];
  int    m_sqi    [1:DEPTH];
  line_t m_data   [1:DEPTH];
  pa_t   m_tgt    [1:DEPTH];
  int    m_mapped [1:DEPTH];
  int    m_spec   [1:DEPTH];
  ts_t   m_at     [1:DEPTH];
  bit    m_isspec [1:DEPTH];
  int    m_nextl  [1:DEPTH];
  int    m_inq [$];
  int    m_outq [$];
  int    m_pifr;
  int    n_spec_sent = 0, n_out_sent = 0, n_requeue = 0, n_full = 0, n_out_over_spec = 0;

  function automatic int next_free(int start);
    for (int i = 0; i < DEPTH; i++) begin
      int c;
      c = ((start - 1 + i) % DEPTH) + 1;
      if (m_st[c] == 0) return c;
    end
    return 0;
  endfunction

  function automatic int pick_state(int s1, int s2);
    int cand [$];
    for (int i = 1; i <= DEPTH; i++) if (m_st[i] == s1 || m_st[i] == s2) cand.push_back(i);
    if (cand.size() == 0) return 0;
    return cand[$urandom_range(0, cand.size() - 1)];
  endfunction

  initial begin
    int exp_slot, act, tk, sn, exp_send, spec_ready, cnt;
    in_valid = 0; pop = 0; ln_en = 0; lk_en = 0; mo_en = 0; ms_en = 0; rsp_en = 0; out_ready = 0;
    in_sqi = '0; in_data = '0; rd_idx = '0; ln_idx = '0; ln_next = '0; lk_idx = '0;
    mo_idx = '0; mo_tgt = '0; mo_mapped = '0; ms_idx = '0; ms_tgt = '0; ms_spec = '0;
    ms_send_at = '0; rsp_idx = '0; rsp_hit = 0; tsc = '0;
    for (int i = 1; i <= DEPTH; i++) m_st[i] = 0;
    m_pifr = 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      tsc = tsc + 1;
      in_valid = ($urandom_range(0, 2) == 0);
      in_sqi   = sqi_t'($urandom_range(0, 63));
      in_data  = {16{$urandom()}};
      pop      = (m_inq.size() > 0) && ($urandom_range(0, 1) == 0);
      // one pipeline action on a slot taken from IN or parked in LINK
      lk_en = 0; mo_en = 0; ms_en = 0;
      act = $urandom_range(0, 3);
      tk  = pick_state(2, 3);
      if (tk != 0 && act == 1 && m_st[tk] == 2) begin lk_en = 1; lk_idx = idx_t'(tk); end
      if (tk != 0 && act == 2) begin
        mo_en = 1; mo_idx = idx_t'(tk); mo_tgt = pa_t'({$urandom(), $urandom()});
        mo_mapped = idx_t'($urandom_range(1, 60));
      end
      if (tk != 0 && act == 3) begin
        ms_en = 1; ms_idx = idx_t'(tk); ms_tgt = pa_t'({$urandom(), $urandom()});
        ms_spec = idx_t'($urandom_range(1, 60)); ms_send_at = tsc + ts_t'($urandom_range(0, 30));
      end
      ln_en   = ($urandom_range(0, 3) == 0);
      ln_idx  = idx_t'(pick_state(3, 3));
      ln_next = idx_t'($urandom_range(0, DEPTH));
      rd_idx  = idx_t'($urandom_range(1, DEPTH));
      out_ready = ($urandom_range(0, 3) != 0);
      sn = pick_state(6, 6);
      rsp_en  = (sn != 0) && ($urandom_range(0, 2) == 0);
      rsp_idx = idx_t'(sn);
      rsp_hit = ($urandom_range(0, 2) != 0);
      #1;
      // outputs
      exp_slot = m_pifr;
      check(in_ready == (exp_slot != 0 && m_st[exp_slot] == 0), "in_ready");
      check(head_valid == (m_inq.size() > 0), "head_valid");
      if (m_inq.size() > 0) begin
        check(int'(head_idx) == m_inq[0], $sformatf("IN head %0d, expected %0d", head_idx, m_inq[0]));
        check(int'(head_sqi) == m_sqi[m_inq[0]], "IN head sqi");
      end
      if (m_st[rd_idx] == 3) check(int'(rd_next_l) == m_nextl[rd_idx], "nextL read");
      spec_ready = 0;
      for (int i = DEPTH; i >= 1; i--)
        if (m_st[i] == 5 && $signed(tsc - m_at[i]) >= 0) spec_ready = i;
      exp_send = (m_outq.size() > 0) ? m_outq[0] : spec_ready;
      check(out_valid == (exp_send != 0), $sformatf("out_valid %0b, expected slot %0d", out_valid, exp_send));
      if (exp_send != 0) begin
        check(int'(out_idx) == exp_send, $sformatf("sent slot %0d, expected %0d", out_idx, exp_send));
        check(out_tgt == m_tgt[exp_send] && out_data == m_data[exp_send], "sent address/data");
        check(out_dst == src_of(m_tgt[exp_send]), "sent destination core");
        check(out_spec == m_isspec[exp_send], "sent spec flag");
        if (m_outq.size() > 0 && spec_ready != 0 && out_ready) n_out_over_spec++;
      end
      if (rsp_en) begin
        check(rsp_sent, "rsp_sent");
        check(rsp_is_spec == m_isspec[sn] && int'(rsp_sqi) == m_sqi[sn], "answer bookkeeping");
        if (m_isspec[sn]) check(int'(rsp_spec) == m_spec[sn], "answer spec entry");
        else              check(int'(rsp_mapped) == m_mapped[sn], "answer consBuf slot");
      end
      cnt = 0;
      for (int i = 1; i <= DEPTH; i++) cnt += (m_st[i] != 0);
      check(int'(used) == cnt, "occupancy");
      if (in_valid && !in_ready) n_full++;
      @(posedge clk);
      // model update, in the order the hardware applies it
      if (pop) m_st[m_inq.pop_front()] = 2;
      if (rsp_en && !rsp_hit) begin m_st[sn] = 1; m_inq.push_back(sn); n_requeue++; end
      if (in_valid && exp_slot != 0 && m_st[exp_slot] == 0) begin
        m_st[exp_slot] = 1; m_sqi[exp_slot] = in_sqi; m_data[exp_slot] = in_data;
        m_isspec[exp_slot] = 0; m_inq.push_back(exp_slot);
      end
      if (ln_en && ln_idx != 0) m_nextl[ln_idx] = ln_next;
      if (lk_en) begin m_st[tk] = 3; m_nextl[tk] = 0; end
      if (mo_en) begin
        m_st[tk] = 4; m_tgt[tk] = mo_tgt; m_mapped[tk] = mo_mapped; m_isspec[tk] = 0;
      end
      if (ms_en) begin
        m_st[tk] = 5; m_tgt[tk] = ms_tgt; m_spec[tk] = ms_spec; m_at[tk] = ms_send_at; m_isspec[tk] = 1;
      end
      if (out_ready && exp_send != 0) begin
        if (m_outq.size() > 0) begin void'(m_outq.pop_front()); n_out_sent++; end
        else n_spec_sent++;
        m_st[exp_send] = 6;
      end
      if (mo_en) m_outq.push_back(tk);
      if (rsp_en && rsp_hit) m_st[sn] = 0;
      m_pifr = next_free(m_pifr == 0 ? 1 : m_pifr);
    end
    check(n_spec_sent > 0 && n_out_sent > 0, "both queues must send");
    check(n_requeue > 0, "no miss was re-queued");
    check(n_full > 0, "buffer never full");
    check(n_out_over_spec > 0, "sending queue never had priority over a ready speculative push");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

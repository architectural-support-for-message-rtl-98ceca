// tb_srd_map_pipeline: tests the address mapping pipeline with the real link
// table and behavioural models of consBuf, prodBuf and specBuf.
//   1. The documented cycle-by-cycle example: two requests on two SQIs,
//      then data on the first SQI (its consHead is forwarded from Stage 3),
//      data on a third SQI, and more data. Decisions and the Stage 3 cycle
//      of each item are checked.
//   2. Random requests and data on a few SQIs: every pairing must match a
//      per-SQI FIFO model (n-th request of an SQI gets its n-th line), and
//      the same-SQI interlock must stall.
//   3. Speculation: two registered targets on one SQI take data in turn,
//      a third line finds both busy and is parked, and the answer for a
//      target lets a RETRY item move it to that target.
//   Every mapping must carry the core id of its consBuf or specBuf entry.
module tb_srd_map_pipeline;
  import vl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic c_valid, c_pop, p_valid, p_pop, sreg_en, retry_en;
  idx_t c_idx, p_idx, sreg_idx;
  sqi_t c_sqi, p_sqi, sreg_sqi, retry_sqi;
  sqi_t lt_rd_sqi, lt_wr_sqi;
  link_row_t lt_rd_row, lt_wr_row;
  logic lt_wr_en;
  idx_t cb_rd_idx, cb_rd_next_l, cb_ln_idx, cb_ln_next;
  pa_t  cb_rd_tgt;
  src_t cb_rd_src, sb_rd_src, pb_mo_dst, pb_ms_dst;
  logic cb_ln_en;
  idx_t pb_rd_idx, pb_rd_next_l, pb_ln_idx, pb_ln_next, pb_lk_idx, pb_mo_idx, pb_mo_mapped;
  idx_t pb_ms_idx, pb_ms_spec;
  logic pb_ln_en, pb_lk_en, pb_mo_en, pb_ms_en;
  pa_t  pb_mo_tgt, pb_ms_tgt;
  ts_t  pb_ms_send_at;
  idx_t sb_rd_idx, sb_rd_next, sb_ln0_idx, sb_ln0_next, sb_ln1_idx, sb_ln1_next, sb_tk_idx;
  logic sb_rd_valid, sb_rd_on_fly, sb_ln0_en, sb_ln1_en, sb_tk_en;
  pa_t  sb_rd_tgt;
  ts_t  sb_rd_send_at;
  logic ev_stall, ev_valid, idle;
  map_dec_e ev_dec;

  vlrd_link_tab #(.NUM_SQI(64)) u_lt (
    .clk, .rst_n, .rd_sqi_i(lt_rd_sqi), .rd_row_o(lt_rd_row),
    .wr_en_i(lt_wr_en), .wr_sqi_i(lt_wr_sqi), .wr_row_i(lt_wr_row)
  );

  srd_map_pipeline #(.NUM_SQI(64), .SPEC_DEPTH(8)) dut (
    .clk, .rst_n,
    .c_valid_i(c_valid), .c_idx_i(c_idx), .c_sqi_i(c_sqi), .c_pop_o(c_pop),
    .p_valid_i(p_valid), .p_idx_i(p_idx), .p_sqi_i(p_sqi), .p_pop_o(p_pop),
    .sreg_en_i(sreg_en), .sreg_idx_i(sreg_idx), .sreg_sqi_i(sreg_sqi),
    .retry_en_i(retry_en), .retry_sqi_i(retry_sqi),
    .lt_rd_sqi_o(lt_rd_sqi), .lt_rd_row_i(lt_rd_row),
    .lt_wr_en_o(lt_wr_en), .lt_wr_sqi_o(lt_wr_sqi), .lt_wr_row_o(lt_wr_row),
    .cb_rd_idx_o(cb_rd_idx), .cb_rd_tgt_i(cb_rd_tgt), .cb_rd_src_i(cb_rd_src), .cb_rd_next_l_i(cb_rd_next_l),
    .cb_ln_en_o(cb_ln_en), .cb_ln_idx_o(cb_ln_idx), .cb_ln_next_o(cb_ln_next),
    .pb_rd_idx_o(pb_rd_idx), .pb_rd_next_l_i(pb_rd_next_l),
    .pb_ln_en_o(pb_ln_en), .pb_ln_idx_o(pb_ln_idx), .pb_ln_next_o(pb_ln_next),
    .pb_lk_en_o(pb_lk_en), .pb_lk_idx_o(pb_lk_idx),
    .pb_mo_en_o(pb_mo_en), .pb_mo_idx_o(pb_mo_idx), .pb_mo_tgt_o(pb_mo_tgt), .pb_mo_dst_o(pb_mo_dst),
    .pb_mo_mapped_o(pb_mo_mapped),
    .pb_ms_en_o(pb_ms_en), .pb_ms_idx_o(pb_ms_idx), .pb_ms_tgt_o(pb_ms_tgt), .pb_ms_dst_o(pb_ms_dst),
    .pb_ms_spec_o(pb_ms_spec), .pb_ms_send_at_o(pb_ms_send_at),
    .sb_rd_idx_o(sb_rd_idx), .sb_rd_valid_i(sb_rd_valid), .sb_rd_on_fly_i(sb_rd_on_fly),
    .sb_rd_next_i(sb_rd_next), .sb_rd_tgt_i(sb_rd_tgt), .sb_rd_src_i(sb_rd_src), .sb_rd_send_at_i(sb_rd_send_at),
    .sb_ln0_en_o(sb_ln0_en), .sb_ln0_idx_o(sb_ln0_idx), .sb_ln0_next_o(sb_ln0_next),
    .sb_ln1_en_o(sb_ln1_en), .sb_ln1_idx_o(sb_ln1_idx), .sb_ln1_next_o(sb_ln1_next),
    .sb_tk_en_o(sb_tk_en), .sb_tk_idx_o(sb_tk_idx),
    .ev_stall_o(ev_stall), .ev_valid_o(ev_valid), .ev_dec_o(ev_dec), .idle_o(idle)
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

  // ---------------- behavioural buffers ----------------
  pa_t  cb_tgt   [0:127];
  idx_t cb_nextl [0:127];
  idx_t pb_nextl [0:127];
  bit   sb_valid [0:15];
  bit   sb_fly   [0:15];
  idx_t sb_next  [0:15];
  int   cq [$];          // consBuf input list: slot numbers
  int   pq [$];          // prodBuf IN list
  int   c_sqi_of [int];
  int   p_sqi_of [int];

  assign cb_rd_tgt     = cb_tgt[cb_rd_idx];
  assign cb_rd_next_l  = cb_nextl[cb_rd_idx];
  assign cb_rd_src     = src_t'(cb_rd_idx) ^ 4'h9;   // each consBuf entry's requesting core
  assign sb_rd_src     = src_t'(sb_rd_idx) ^ 4'h5;   // each specBuf entry's registered core
  assign pb_rd_next_l  = pb_nextl[pb_rd_idx];
  assign sb_rd_valid   = sb_valid[sb_rd_idx[3:0]];
  assign sb_rd_on_fly  = sb_fly[sb_rd_idx[3:0]];
  assign sb_rd_next    = sb_next[sb_rd_idx[3:0]];
  assign sb_rd_tgt     = pa_t'(64'h5000) + pa_t'(sb_rd_idx) * 64;
  assign sb_rd_send_at = ts_t'(1000) + ts_t'(sb_rd_idx);

  always_comb begin
    c_valid = cq.size() > 0;
    c_idx   = c_valid ? idx_t'(cq[0]) : '0;
    c_sqi   = c_valid ? sqi_t'(c_sqi_of[cq[0]]) : '0;
    p_valid = pq.size() > 0;
    p_idx   = p_valid ? idx_t'(pq[0]) : '0;
    p_sqi   = p_valid ? sqi_t'(p_sqi_of[pq[0]]) : '0;
  end

  // record of Stage 3 actions
  typedef struct { longint cyc; map_dec_e dec; int p; int c; int spec; } act_t;
  act_t acts [$];
  longint cyc = 0;
  int n_stall = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (c_pop) void'(cq.pop_front());
      if (p_pop) void'(pq.pop_front());
      if (cb_ln_en) cb_nextl[cb_ln_idx] = cb_ln_next;
      if (pb_ln_en) pb_nextl[pb_ln_idx] = pb_ln_next;
      if (pb_lk_en) pb_nextl[pb_lk_idx] = '0;
      if (sb_ln0_en) sb_next[sb_ln0_idx[3:0]] = sb_ln0_next;
      if (sb_ln1_en) sb_next[sb_ln1_idx[3:0]] = sb_ln1_next;
      if (sb_tk_en) sb_fly[sb_tk_idx[3:0]] = 1'b1;
      if (ev_stall) n_stall++;
      if (ev_valid) begin
        act_t a;
        a = '{cyc: cyc, dec: ev_dec, p: 0, c: 0, spec: 0};
        if (pb_mo_en) begin
          a.p = pb_mo_idx; a.c = pb_mo_mapped;
          check(pb_mo_tgt == cb_tgt[pb_mo_mapped], "mapped target is not the request's consTgt");
          check(pb_mo_dst == (src_t'(pb_mo_mapped) ^ 4'h9), "mapped core is not the request's core");
        end
        if (pb_ms_en) begin
          a.p = pb_ms_idx; a.spec = pb_ms_spec;
          check(pb_ms_tgt == pa_t'(64'h5000) + pa_t'(pb_ms_spec) * 64, "speculative target");
          check(pb_ms_dst == (src_t'(pb_ms_spec) ^ 4'h5), "speculative core is not the registered core");
          check(pb_ms_send_at == ts_t'(1000) + ts_t'(pb_ms_spec), "speculative send time");
        end
        acts.push_back(a);
      end
    end
  end

  task automatic add_cons(int slot, int sqi);
    cb_tgt[slot] = pa_t'(64'h9_0000) + pa_t'(slot) * 64;
    cb_nextl[slot] = '0;
    c_sqi_of[slot] = sqi;
    cq.push_back(slot);
  endtask

  task automatic add_prod(int slot, int sqi);
    pb_nextl[slot] = '0;
    p_sqi_of[slot] = sqi;
    pq.push_back(slot);
  endtask

  task automatic drain();
    int n;
    n = 0;
    while ((cq.size() > 0 || pq.size() > 0 || !idle) && n < 1000) begin
      @(negedge clk);
      n++;
    end
    repeat (3) @(negedge clk);
  endtask

  // golden per-SQI FIFO pairing
  int gq_data [int][$];
  int gq_req  [int][$];
  int exp_pair [int];     // prodBuf slot -> consBuf slot

  initial begin
    longint t0;
    int s, slot_c, slot_p, n_pairs;
    sreg_en = 0; retry_en = 0; sreg_idx = '0; sreg_sqi = '0; retry_sqi = '0;
    for (int i = 0; i < 128; i++) begin cb_tgt[i] = '0; cb_nextl[i] = '0; pb_nextl[i] = '0; end
    for (int i = 0; i < 16; i++) begin sb_valid[i] = 0; sb_fly[i] = 0; sb_next[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- 1. documented example ----
    t0 = cyc;                 // items present from this cycle on
    add_cons(1, 1);           // blue request
    add_cons(2, 0);           // orange request
    add_prod(1, 1);           // blue data
    add_prod(2, 2);           // green data (no request)
    add_prod(3, 1);           // blue data again
    drain();
    check(acts.size() == 5, $sformatf("example: %0d Stage 3 actions, expected 5", acts.size()));
    if (acts.size() == 5) begin
      // same order as the documented example: the blue data is blocked behind
      // the blue request in Stage 2, so the orange request goes first and the
      // blue data then reads consHead forwarded from Stage 3
      check(acts[0].dec == MD_CONS_MISS && acts[0].cyc == t0 + 2, "example: blue request buffered, 3 stages");
      check(acts[1].dec == MD_CONS_MISS && acts[1].cyc == t0 + 3, "example: orange request fills the blocked slot");
      check(acts[2].dec == MD_PROD_HIT && acts[2].p == 1 && acts[2].c == 1 && acts[2].cyc == t0 + 4,
            "example: blue data must meet the blue request (consHead forwarded)");
      check(acts[3].dec == MD_PROD_MISS && acts[3].cyc == t0 + 5, "example: green data must be buffered");
      check(acts[4].dec == MD_PROD_MISS && acts[4].cyc == t0 + 6, "example: second blue data must be buffered");
    end
    // clean up: requests on SQI 0 and 2 so every list ends empty
    add_cons(3, 2); add_cons(4, 1); add_prod(4, 0);
    drain();
    check(acts.size() == 8, "example clean-up");
    if (acts.size() == 8) begin
      check(acts[5].dec == MD_CONS_HIT && acts[5].p == 2 && acts[5].c == 3, "green data to the late request");
      check(acts[6].dec == MD_PROD_HIT && acts[6].p == 4 && acts[6].c == 2, "orange request served");
      check(acts[7].dec == MD_CONS_HIT && acts[7].p == 3 && acts[7].c == 4, "second blue data served");
    end
    acts.delete();

    // ---- 2. random traffic against a per-SQI FIFO model ----
    slot_c = 10; slot_p = 10;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 2) == 0 && slot_c < 127) begin
        s = $urandom_range(20, 22);
        add_cons(slot_c, s);
        gq_req[s].push_back(slot_c);
        slot_c++;
      end
      if ($urandom_range(0, 2) == 0 && slot_p < 127) begin
        s = $urandom_range(20, 22);
        add_prod(slot_p, s);
        gq_data[s].push_back(slot_p);
        slot_p++;
      end
    end
    drain();
    for (int q = 20; q <= 22; q++) begin
      while (gq_data[q].size() > 0 && gq_req[q].size() > 0)
        exp_pair[gq_data[q].pop_front()] = gq_req[q].pop_front();
    end
    n_pairs = 0;
    foreach (acts[i]) begin
      if (acts[i].dec inside {MD_PROD_HIT, MD_CONS_HIT}) begin
        n_pairs++;
        check(exp_pair.exists(acts[i].p) && exp_pair[acts[i].p] == acts[i].c,
              $sformatf("data slot %0d paired with request %0d", acts[i].p, acts[i].c));
      end
    end
    check(n_pairs == exp_pair.size(), $sformatf("%0d pairings, expected %0d", n_pairs, exp_pair.size()));
    check(n_stall > 0, "interlock never stalled");
    acts.delete();

    // ---- 3. speculation on SQI 7 with entries 3 and 5 ----
    sb_valid[3] = 1; sb_next[3] = 3;
    sb_valid[5] = 1; sb_next[5] = 5;
    @(negedge clk);
    sreg_en = 1; sreg_idx = 3; sreg_sqi = 7;
    @(negedge clk);
    sreg_idx = 5;
    @(negedge clk);
    sreg_en = 0;
    drain();
    check(acts.size() >= 2 && acts[0].dec == MD_SREG && acts[1].dec == MD_SREG, "registrations linked");
    check(sb_next[3] == 5 && sb_next[5] == 3, "two entries must form a loop");
    acts.delete();
    add_prod(100, 7);
    add_prod(101, 7);
    add_prod(102, 7);
    drain();
    check(acts.size() == 3, $sformatf("speculation: %0d actions", acts.size()));
    if (acts.size() == 3) begin
      check(acts[0].dec == MD_PROD_SPEC && acts[0].spec == 3, "first line to entry 3");
      check(acts[1].dec == MD_PROD_SPEC && acts[1].spec == 5, "second line to entry 5");
      check(acts[2].dec == MD_PROD_MISS, "third line finds both targets busy");
    end
    acts.delete();
    // entry 5 answered: RETRY moves the parked line
    sb_fly[5] = 0;
    @(negedge clk);
    retry_en = 1; retry_sqi = 7;
    @(negedge clk);
    retry_en = 0;
    drain();
    check(acts.size() == 1 && acts[0].dec == MD_RETRY_SPEC && acts[0].p == 102 && acts[0].spec == 5,
          "retry must send the parked line to the free entry");
    acts.delete();
    // nothing parked: a retry with a busy head only rotates
    sb_fly[5] = 1;
    @(negedge clk);
    retry_en = 1; retry_sqi = 7;
    @(negedge clk);
    retry_en = 0;
    drain();
    check(acts.size() == 1 && acts[0].dec == MD_RETRY_ROT, "retry with nothing to send rotates");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

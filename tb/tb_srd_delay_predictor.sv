// tb_srd_delay_predictor: compares the three delay prediction algorithms
// with a reference model written from their textual description, over
// random histories and times, plus directed cases: Odelay sends at once,
// adapt halves on a hit and doubles on a miss, tuned sends at once while
// initialising, steps by delta before the deadline and doubles after it.
module tb_srd_delay_predictor;
  import vl_pkg::*;

  localparam int ZETA = 128, TAU = 48, DELTA = 32, ALPHA = 1, BETA = 2;

  spec_alg_e   alg;
  ts_t         tsc, send_at;
  pred_state_t st, st_upd;
  logic        hit;

  srd_delay_predictor #(.ZETA(ZETA), .TAU(TAU), .DELTA(DELTA), .ALPHA(ALPHA), .BETA(BETA)) dut (
    .alg_i(alg), .tsc_i(tsc), .st_i(st), .send_at_o(send_at), .hit_i(hit), .st_upd_o(st_upd)
  );

  int checks = 0, failures = 0;
  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model (64-bit arithmetic, then reduced to 32 bits) ----
  function automatic longint unsigned sat32(longint unsigned v);
    return (v > 64'hFFFF_FFFF) ? 64'hFFFF_FFFF : v;
  endfunction

  function automatic ts_t ref_send(spec_alg_e a, ts_t t, pred_state_t s);
    longint unsigned el, hv, d;
    int sh;
    d  = s.delay;
    el = ts_t'(t - s.last);
    sh = ((s.delay[0] ^ t[0]) + (s.delay[1] ^ t[1]) + (s.delay[2] ^ t[2]) + (s.delay[3] ^ t[3])) % 2;
    hv = d >> sh;
    if (a == ALG_ODELAY) return t;
    if (a == ALG_ADAPT)  return ts_t'(t + s.delay);
    if (s.nfills < BETA) return s.failed ? ts_t'(t + DELTA) : t;
    if (el < hv)         return ts_t'(s.last + ts_t'(hv));
    if (el < d)          return ts_t'(s.last + s.delay);
    if (!s.failed)       return t;
    if (el < s.ddl)      return ts_t'(t + DELTA);
    return ts_t'(t + s.delay);
  endfunction

  function automatic pred_state_t ref_upd(spec_alg_e a, ts_t t, pred_state_t s, bit h);
    pred_state_t r;
    longint unsigned el;
    r = s;
    r.failed = !h;
    el = ts_t'(t - s.last);
    if (a == ALG_ADAPT) begin
      if (h) r.delay = s.delay / 2;
      else if (s.delay < DELTA) r.delay = DELTA;
      else r.delay = ts_t'(sat32(longint'(s.delay) * 2));
    end else if (a == ALG_TUNED) begin
      if (h) begin
        r.delay  = (el > TAU) ? ts_t'(el - TAU) : 0;
        r.ddl    = ts_t'(sat32(el + ZETA));
        r.nfills = (s.nfills == 255) ? 255 : s.nfills + 1;
        r.last   = t;
      end else if (s.delay < s.ddl) begin
        r.delay = ts_t'(sat32(longint'(s.delay) + DELTA));
      end else begin
        r.delay = ts_t'(sat32(longint'(s.delay) * (2 ** ALPHA)));
      end
    end
    return r;
  endfunction

  task automatic apply_and_check(string what);
    ts_t exp_send;
    pred_state_t exp_st;
    #1;
    exp_send = ref_send(alg, tsc, st);
    exp_st   = ref_upd(alg, tsc, st, hit);
    check(send_at == exp_send, $sformatf("%s: alg %0d send_at %0d, expected %0d", what, alg, send_at, exp_send));
    check(st_upd == exp_st, $sformatf("%s: alg %0d update %h, expected %h", what, alg, st_upd, exp_st));
  endtask

  initial begin
    // directed: Odelay
    alg = ALG_ODELAY; tsc = 1000; st = '0; st.delay = 500; hit = 1'b0;
    #1 check(send_at == 1000, "Odelay must send at once");
    // directed: adapt doubles then halves
    alg = ALG_ADAPT; st = '0; st.delay = 40; hit = 1'b0;
    #1 check(send_at == 1040 && st_upd.delay == 80, "adapt: send after delay, double on miss");
    hit = 1'b1;
    #1 check(st_upd.delay == 20, "adapt: halve on hit");
    // directed: tuned initialising phase
    alg = ALG_TUNED; st = '0; st.nfills = 1; st.failed = 1'b1; hit = 1'b0; tsc = 5000;
    #1 check(send_at == 5000 + DELTA, "tuned: initialising, retry after delta");
    st.failed = 1'b0;
    #1 check(send_at == 5000, "tuned: initialising, send at once");
    // directed: tuned hit sets the window from the last interval
    st = '0; st.nfills = 3; st.last = 4000; hit = 1'b1;
    #1 check(st_upd.delay == 1000 - TAU && st_upd.ddl == 1000 + ZETA && st_upd.last == 5000
             && st_upd.nfills == 4, "tuned: hit sets delay, deadline, last, nfills");
    // directed: tuned miss before and after the deadline
    st.delay = 900; st.ddl = 1100; hit = 1'b0;
    #1 check(st_upd.delay == 900 + DELTA, "tuned: miss before deadline steps by delta");
    st.delay = 1200;
    #1 check(st_upd.delay == 2400, "tuned: miss past deadline doubles");
    // random comparison with the reference
    for (int n = 0; n < 20000; n++) begin
      alg = spec_alg_e'($urandom_range(0, 2));
      tsc = $urandom_range(0, 100000);
      st.last   = tsc - ts_t'($urandom_range(0, 3000));
      st.delay  = ($urandom_range(0, 9) == 0) ? $urandom() : ts_t'($urandom_range(0, 3000));
      st.ddl    = ts_t'($urandom_range(0, 3000));
      st.nfills = ($urandom_range(0, 9) == 0) ? 8'd255 : 8'($urandom_range(0, 4));
      st.failed = $urandom_range(0, 1);
      hit       = $urandom_range(0, 1);
      apply_and_check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

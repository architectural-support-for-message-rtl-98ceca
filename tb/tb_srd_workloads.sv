// tb_srd_workloads: runs the communication patterns of the evaluated
// message-queue benchmarks through the routing device at its default size
// (64 SQIs, 64 entries in prodBuf, consBuf and specBuf).
//
// Threads are modelled as endpoints. A producer endpoint pushes its lines
// one at a time and waits for the status; a push answered "full" is tried
// again after a short back-off, as software would. A consumer endpoint
// owns cache lines: in on-demand runs each line is fetched and fetched
// again after it has been consumed; in speculative runs the lines are
// registered once and the device pushes into them on its own. A consumed
// message may make its thread push new messages (relay, join).
// Patterns (queue counts as evaluated; thread counts are this testbench's
// choice within 16 cores):
//   ping-pong (1:1)x2, halo (1:1)x48 on a 4x4 grid, sweep (1:1)x48 (two
//   wavefronts across the 4x4 grid), incast (15:1)x1 into 32 consumer
//   lines, pipeline (1:4)+(4:4)+(4:1)+(1:1), firewall (1:1)x3+(2:1)x1,
//   FIR (1:1)x8, bitonic (1:8)x1+(8:1)x1.
// Every pattern runs once on demand and once speculatively (delay
// algorithm rotating between runs). Checks: every message reaches exactly
// one line of its own queue, out_dst_o names the thread's core that owns
// that line, the expected number of deliveries happens,
// 1:1 queues deliver in order (on-demand runs), and the device ends idle.
module tb_srd_workloads;
  import vl_pkg::*;

  localparam int ANS_LAT = 3;
  localparam int K       = 12;     // messages per source and output

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  spec_alg_e   alg;
  logic        in_valid, in_ready;
  net_op_e     in_op;
  pa_t         in_addr;
  line_t       in_data;
  src_t        in_src;
  logic        ack_valid;
  src_t        ack_dst;
  req_kind_e   ack_kind;
  ack_status_e ack_status;
  logic        out_valid, out_ready;
  pa_t         out_addr;
  line_t       out_data;
  idx_t        out_tag;
  src_t        out_dst;
  logic        out_spec;
  logic        pr_valid, pr_hit;
  idx_t        pr_tag;
  ts_t         tsc;
  logic        ev_stall, ev_valid, idle;
  map_dec_e    ev_dec;

  srd dut (
    .clk, .rst_n, .cfg_alg_i(alg),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_op_i(in_op), .in_addr_i(in_addr),
    .in_data_i(in_data), .in_src_i(in_src),
    .ack_valid_o(ack_valid), .ack_dst_o(ack_dst), .ack_kind_o(ack_kind), .ack_status_o(ack_status),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_addr_o(out_addr),
    .out_data_o(out_data), .out_dst_o(out_dst), .out_tag_o(out_tag), .out_spec_o(out_spec),
    .pr_valid_i(pr_valid), .pr_tag_i(pr_tag), .pr_hit_i(pr_hit),
    .tsc_o(tsc), .ev_stall_o(ev_stall), .ev_valid_o(ev_valid), .ev_dec_o(ev_dec), .idle_o(idle)
  );

  int checks = 0, failures = 0;
  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [%0t]: %s", $time, msg);
    end
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pa_t dev_addr(int sqi, bit reg_rng);
    return (pa_t'(1) << 51) | (pa_t'(sqi) << 18) | (reg_rng ? (pa_t'(1) << 17) : pa_t'(0));
  endfunction
  function automatic pa_t line_addr(int ep, int n);
    return pa_t'(64'h10_0000_0000) + pa_t'(ep) * pa_t'(32'h10000) + pa_t'(n) * 64;
  endfunction

  // ---------------- workload graph ----------------
  typedef enum int { R_SINK, R_FWD, R_JOIN } rule_e;
  int    thr_n;
  rule_e thr_rule [int];
  int    thr_out  [int][$];     // producer endpoints a thread pushes to
  int    thr_nin  [int];        // join: inputs needed per sequence number
  int    join_cnt [longint];
  int    pep_thr [$], pep_q [$];
  int    cep_thr [$], cep_q [$], cep_lines [$];
  int    q_prods [int], q_cons [int];
  int    exp_total;
  bit    spec_mode;

  // ---------------- run state ----------------
  int     pep_pend [int][$];
  bit     pep_busy [int];
  longint pep_back [int];
  int     msg_q [int], msg_seq [int], msg_ord [int], delivered [int];
  int     pep_cnt [int];           // messages emitted so far per producer endpoint
  int     last_seq [int];
  int     next_id, n_deliv, n_full, n_spec_hit, n_spec_miss, n_dem_hit;
  longint cyc = 0;

  typedef struct { bit full; bit pushable; int cep; longint consume_at; int msg; int hold; } line_m;
  line_m lines [pa_t];

  typedef struct { pa_t addr; line_t data; src_t src; } fpkt_t;   // src: the consumer's core
  fpkt_t fq [$];
  typedef struct { bit is_push; int pep; fpkt_t f; } sent_t;
  sent_t sent [$];
  typedef struct { longint due; idx_t tag; pa_t addr; line_t data; bit spec; } ans_t;
  ans_t aq [$];
  int rr_pep = 0;
  bit turn_fetch = 1'b0;

  function automatic void graph_clear();
    thr_n = 0; thr_rule.delete(); thr_out.delete(); thr_nin.delete(); join_cnt.delete();
    pep_thr.delete(); pep_q.delete(); cep_thr.delete(); cep_q.delete(); cep_lines.delete();
    q_prods.delete(); q_cons.delete(); exp_total = 0;
  endfunction

  function automatic int new_thr(rule_e r);
    thr_rule[thr_n] = r; thr_nin[thr_n] = 0;
    thr_out[thr_n] = {};
    return thr_n++;
  endfunction

  // producer endpoint of thread t on queue q
  function automatic int prod(int t, int q);
    pep_thr.push_back(t); pep_q.push_back(q);
    thr_out[t].push_back(pep_thr.size() - 1);
    q_prods[q] = q_prods.exists(q) ? q_prods[q] + 1 : 1;
    return pep_thr.size() - 1;
  endfunction

  // consumer endpoint of thread t on queue q with n lines
  function automatic void cons(int t, int q, int n);
    cep_thr.push_back(t); cep_q.push_back(q); cep_lines.push_back(n);
    q_cons[q] = q_cons.exists(q) ? q_cons[q] + 1 : 1;
    thr_nin[t]++;
  endfunction

  function automatic void emit(int pep, int seq);
    msg_q[next_id]   = pep_q[pep];
    msg_seq[next_id] = seq;
    msg_ord[next_id] = pep_cnt.exists(pep) ? pep_cnt[pep] : 0;
    pep_cnt[pep]     = msg_ord[next_id] + 1;
    pep_pend[pep].push_back(next_id);
    next_id++;
  endfunction

  function automatic void fetch_line(pa_t la);
    lines[la].pushable = 1'b1;
    fq.push_back('{addr: dev_addr(cep_q[lines[la].cep], 1'b0), data: line_t'(la),
                   src: src_t'(cep_thr[lines[la].cep])});
  endfunction

  // a consumer thread has taken message id out of one of its lines
  function automatic void consume(int c, int id);
    int t, seq;
    longint key;
    rule_e r;
    t   = cep_thr[c];
    seq = msg_seq[id];
    r   = thr_rule[t];
    case (r)
      R_FWD: foreach (thr_out[t][i]) emit(thr_out[t][i], seq);
      R_JOIN: begin
        key = longint'(t) * 100000 + seq;
        join_cnt[key] = join_cnt.exists(key) ? join_cnt[key] + 1 : 1;
        if (join_cnt[key] == thr_nin[t]) foreach (thr_out[t][i]) emit(thr_out[t][i], seq);
      end
      default: ;
    endcase
  endfunction

  // ---------------- system model ----------------
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      in_valid <= 1'b0; pr_valid <= 1'b0; out_ready <= 1'b1;
    end else begin
      if (ack_valid) begin
        sent_t s;
        check(sent.size() > 0, "status without a packet");
        if (sent.size() > 0) begin
          s = sent.pop_front();
          check(ack_status != ST_INVALID, "well-formed packet refused as invalid");
          if (s.is_push) begin
            pep_busy[s.pep] = 1'b0;
            if (ack_status == ST_OK) void'(pep_pend[s.pep].pop_front());
            else begin n_full++; pep_back[s.pep] = cyc + 8; end
          end else if (ack_status != ST_OK) begin
            n_full++;
            fq.push_back(s.f);
          end
        end
      end

      if (out_valid && out_ready) begin
        aq.push_back('{due: cyc + ANS_LAT, tag: out_tag, addr: out_addr, data: out_data, spec: out_spec});
        if (lines.exists(out_addr))
          check(out_dst == src_t'(cep_thr[lines[out_addr].cep]), "message sent to a core that did not ask for the line");
      end
      out_ready <= ($urandom_range(0, 7) != 0);

      pr_valid <= 1'b0;
      if (aq.size() > 0 && aq[0].due <= cyc) begin
        ans_t a;
        bit   hit;
        int   id, c;
        a   = aq.pop_front();
        id  = int'(a.data[31:0]);
        hit = lines.exists(a.addr) && lines[a.addr].pushable && !lines[a.addr].full;
        if (hit) begin
          c = lines[a.addr].cep;
          check(msg_q.exists(id) && msg_q[id] == cep_q[c],
                $sformatf("message %0d delivered to a line of queue %0d", id, cep_q[c]));
          check(!delivered.exists(id), $sformatf("message %0d delivered twice", id));
          check(int'(a.data[511:480]) == msg_q[id] && int'(a.data[63:32]) == msg_seq[id],
                "message contents changed");
          delivered[id] = 1;
          n_deliv++;
          if (!spec_mode && q_prods[cep_q[c]] == 1 && q_cons[cep_q[c]] == 1) begin
            if (last_seq.exists(cep_q[c]))
              check(msg_ord[id] == last_seq[cep_q[c]] + 1,
                    $sformatf("queue %0d out of order: message %0d after %0d", cep_q[c], msg_ord[id], last_seq[cep_q[c]]));
            else
              check(msg_ord[id] == 0, $sformatf("queue %0d: first delivery is message %0d", cep_q[c], msg_ord[id]));
            last_seq[cep_q[c]] = msg_ord[id];
          end
          lines[a.addr].full       = 1'b1;
          lines[a.addr].pushable   = spec_mode;
          lines[a.addr].msg        = id;
          lines[a.addr].consume_at = cyc + lines[a.addr].hold;
          if (a.spec) n_spec_hit++; else n_dem_hit++;
        end else if (a.spec) n_spec_miss++;
        else check(1'b0, "on-demand push rejected by a line that asked for it");
        pr_valid <= 1'b1;
        pr_tag   <= a.tag;
        pr_hit   <= hit;
      end

      foreach (lines[la]) begin
        if (lines[la].full && lines[la].consume_at <= cyc) begin
          lines[la].full = 1'b0;
          consume(lines[la].cep, lines[la].msg);
          if (!spec_mode) fetch_line(la);
        end
      end

      // one packet per cycle: fetches and producers take turns
      in_valid <= 1'b0;
      begin
        int pick;
        pick = -1;
        if (!(turn_fetch && fq.size() > 0)) begin
          for (int k = 0; k < pep_thr.size(); k++) begin
            int p;
            p = (rr_pep + k) % pep_thr.size();
            if (pick < 0 && !pep_busy[p] && pep_pend[p].size() > 0 && pep_back[p] <= cyc) pick = p;
          end
        end
        if (pick >= 0) begin
          int id;
          id = pep_pend[pick][0];
          pep_busy[pick] = 1'b1;
          rr_pep   = (pick + 1) % pep_thr.size();
          in_valid <= 1'b1;
          in_op    <= OP_PUSH;
          in_addr  <= dev_addr(pep_q[pick], 1'b0);
          in_data  <= {32'(msg_q[id]), 416'(0), 32'(msg_seq[id]), 32'(id)};
          in_src   <= src_t'(pep_thr[pick]);
          sent.push_back('{is_push: 1'b1, pep: pick, f: '{addr: '0, data: '0, src: '0}});
          turn_fetch = 1'b1;
        end else if (fq.size() > 0) begin
          fpkt_t f;
          f = fq.pop_front();
          in_valid <= 1'b1;
          in_op    <= OP_FETCH;
          in_addr  <= f.addr;
          in_data  <= f.data;
          in_src   <= f.src;
          sent.push_back('{is_push: 1'b0, pep: -1, f: f});
          turn_fetch = 1'b0;
        end
      end
    end
  end

  // ---------------- patterns ----------------
  function automatic int grid(int r, int c);
    return r * 4 + c;
  endfunction

  function automatic void build(int w);
    int t, s, q, p;
    int tt [int];
    graph_clear();
    q = 0;
    case (w)
      0: begin // ping-pong (1:1)x2
        tt[0] = new_thr(R_SINK); tt[1] = new_thr(R_FWD);
        p = prod(tt[0], 0); cons(tt[1], 0, 1);
        void'(prod(tt[1], 1)); cons(tt[0], 1, 1);
        for (int i = 0; i < K; i++) emit(p, i);
        exp_total = 2 * K;
      end
      1: begin // halo (1:1)x48: every thread of a 4x4 grid to each neighbour
        for (int i = 0; i < 16; i++) tt[i] = new_thr(R_SINK);
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
          int nr [4], nc [4];
          nr = '{r - 1, r + 1, r, r}; nc = '{c, c, c - 1, c + 1};
          for (int d = 0; d < 4; d++) if (nr[d] >= 0 && nr[d] < 4 && nc[d] >= 0 && nc[d] < 4) begin
            p = prod(tt[grid(r, c)], q); cons(tt[grid(nr[d], nc[d])], q, 1);
            for (int i = 0; i < K; i++) emit(p, i);
            q++;
          end
        end
        exp_total = 48 * K;
      end
      2: begin // sweep (1:1)x48: wavefronts from two opposite corners
        for (int i = 0; i < 32; i++) tt[i] = new_thr(R_JOIN);
        for (s = 0; s < 2; s++)
          for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
            int dr, dc;
            dr = s == 0 ? 1 : -1; dc = dr;
            if (r + dr >= 0 && r + dr < 4) begin
              void'(prod(tt[s * 16 + grid(r, c)], q)); cons(tt[s * 16 + grid(r + dr, c)], q, 1); q++;
            end
            if (c + dc >= 0 && c + dc < 4) begin
              void'(prod(tt[s * 16 + grid(r, c)], q)); cons(tt[s * 16 + grid(r, c + dc)], q, 1); q++;
            end
          end
        for (s = 0; s < 2; s++) begin
          t = s == 0 ? tt[grid(0, 0)] : tt[16 + grid(3, 3)];
          for (int i = 0; i < K; i++) foreach (thr_out[t][j]) emit(thr_out[t][j], i);
        end
        exp_total = 48 * K;
      end
      3: begin // incast (15:1)x1, 32 consumer lines
        tt[0] = new_thr(R_SINK);
        cons(tt[0], 0, 32);
        for (int i = 1; i < 16; i++) begin
          tt[i] = new_thr(R_SINK);
          p = prod(tt[i], 0);
          for (int j = 0; j < K; j++) emit(p, j);
        end
        exp_total = 15 * K;
      end
      4: begin // pipeline (1:4)x1 + (4:4)x1 + (4:1)x1 + (1:1)x1
        tt[0] = new_thr(R_SINK);
        p = prod(tt[0], 0);
        for (int i = 1; i <= 4; i++) begin tt[i] = new_thr(R_FWD); cons(tt[i], 0, 1); void'(prod(tt[i], 1)); end
        for (int i = 5; i <= 8; i++) begin tt[i] = new_thr(R_FWD); cons(tt[i], 1, 1); void'(prod(tt[i], 2)); end
        tt[9] = new_thr(R_FWD); cons(tt[9], 2, 1); void'(prod(tt[9], 3));
        tt[10] = new_thr(R_SINK); cons(tt[10], 3, 1);
        for (int i = 0; i < 4 * K; i++) emit(p, i);
        exp_total = 4 * 4 * K;
      end
      5: begin // firewall (1:1)x3 + (2:1)x1: dispatch, two filters pass, one drops
        int pd [3];
        tt[0] = new_thr(R_SINK);
        for (int i = 0; i < 3; i++) pd[i] = prod(tt[0], i);
        tt[1] = new_thr(R_FWD); cons(tt[1], 0, 1); void'(prod(tt[1], 3));
        tt[2] = new_thr(R_FWD); cons(tt[2], 1, 1); void'(prod(tt[2], 3));
        tt[3] = new_thr(R_SINK); cons(tt[3], 2, 1);
        tt[4] = new_thr(R_SINK); cons(tt[4], 3, 2);
        exp_total = 0;
        for (int i = 0; i < 3 * K; i++) begin
          emit(pd[i % 3], i);
          exp_total += (i % 3 == 2) ? 1 : 2;
        end
      end
      6: begin // FIR (1:1)x8
        tt[0] = new_thr(R_SINK);
        p = prod(tt[0], 0);
        for (int i = 1; i <= 8; i++) begin
          tt[i] = new_thr(i == 8 ? R_SINK : R_FWD);
          cons(tt[i], i - 1, 1);
          if (i < 8) void'(prod(tt[i], i));
        end
        for (int i = 0; i < 2 * K; i++) emit(p, i);
        exp_total = 8 * 2 * K;
      end
      default: begin // bitonic (1:8)x1 + (8:1)x1
        tt[0] = new_thr(R_SINK);
        p = prod(tt[0], 0);
        cons(tt[0], 1, 4);
        for (int i = 1; i <= 8; i++) begin tt[i] = new_thr(R_FWD); cons(tt[i], 0, 1); void'(prod(tt[i], 1)); end
        for (int i = 0; i < 4 * K; i++) emit(p, i);
        exp_total = 2 * 4 * K;
      end
    endcase
  endfunction

  string names [8] = '{"ping-pong", "halo", "sweep", "incast", "pipeline", "firewall", "FIR", "bitonic"};

  task automatic run(int w, bit spec, spec_alg_e a);
    longint t0;
    int n;
    // reset the device and the model
    rst_n = 1'b0;
    spec_mode = spec;
    alg = a;
    pep_pend.delete(); pep_busy.delete(); pep_back.delete();
    msg_q.delete(); msg_seq.delete(); msg_ord.delete(); pep_cnt.delete(); delivered.delete(); last_seq.delete();
    lines.delete(); fq.delete(); sent.delete(); aq.delete();
    next_id = 1; n_deliv = 0; n_full = 0; n_spec_hit = 0; n_spec_miss = 0; n_dem_hit = 0;
    rr_pep = 0;
    build(w);
    foreach (pep_thr[p]) begin pep_busy[p] = 1'b0; pep_back[p] = 0; end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    // consumer lines: fetched, or registered as speculation targets
    foreach (cep_thr[c]) begin
      for (int i = 0; i < cep_lines[c]; i++)
        lines[line_addr(c, i)] = '{full: 1'b0, pushable: spec, cep: c, consume_at: 0, msg: 0,
                                   hold: $urandom_range(3, 20)};
      if (spec)
        fq.push_back('{addr: dev_addr(cep_q[c], 1'b1),
                       data: line_t'(line_addr(c, 0)) | line_t'(cep_lines[c] % 64),
                       src: src_t'(cep_thr[c])});
      else
        for (int i = 0; i < cep_lines[c]; i++) fetch_line(line_addr(c, i));
    end
    t0 = cyc;
    n = 0;
    while (n_deliv < exp_total && n < 200000) begin
      @(negedge clk);
      n++;
    end
    n = 0;
    while ((!idle || out_valid || aq.size() > 0 || sent.size() > 0) && n < 1000) begin
      @(negedge clk);
      n++;
    end
    repeat (30) @(negedge clk);
    check(n_deliv == exp_total, $sformatf("%s: %0d deliveries, expected %0d", names[w], n_deliv, exp_total));
    check(next_id - 1 == exp_total, $sformatf("%s: %0d messages created, expected %0d", names[w], next_id - 1, exp_total));
    foreach (msg_q[id]) check(delivered.exists(id), $sformatf("%s: message %0d never delivered", names[w], id));
    check(idle && aq.size() == 0 && !out_valid, $sformatf("%s: device not idle at the end", names[w]));
    if (spec) check(n_spec_hit > 0 && n_dem_hit == 0, $sformatf("%s: speculative run used on-demand pushes", names[w]));
    else      check(n_spec_hit == 0 && n_dem_hit == exp_total, $sformatf("%s: on-demand run mismatch", names[w]));
    $display("%-9s %-11s %0d queues, %0d deliveries in %0d cycles; full statuses %0d; speculative hit/miss %0d/%0d",
             names[w], spec ? $sformatf("spec/%s", a.name()) : "on-demand", q_cons.size(), n_deliv,
             cyc - t0, n_full, n_spec_hit, n_spec_miss);
  endtask

  initial begin
    alg = ALG_TUNED;
    in_valid = 1'b0; pr_valid = 1'b0; out_ready = 1'b1;
    in_op = OP_PUSH; in_addr = '0; in_data = '0; in_src = '0; pr_tag = '0; pr_hit = 1'b0;
    spec_mode = 1'b0;
    for (int w = 0; w < 8; w++) begin
      run(w, 1'b0, ALG_ODELAY);
      run(w, 1'b1, spec_alg_e'(w % 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_srd: end-to-end test of the SPAMeR routing device at its default size
// (64 SQIs, 64 entries in prodBuf, consBuf and specBuf).
//
// The testbench plays the rest of the system. A packet queue stands for the
// cores: producers push lines, consumers fetch or register speculation
// targets, and a push answered ST_FULL is retried like software would. A
// behavioural model of the consumer caches answers every injection: a line
// accepts data only if it is pushable (fetched, or registered for
// speculation) and empty; consumers empty filled lines after a while.
// Phases: mapping latency, data-before-request, same-SQI interlock, prodBuf
// and consBuf full with FIFO order checks, a rejected on-demand push, a
// malformed request, and speculation with each of the three delay
// algorithms (with back-pressure on the injection port in the last one).
// Every message must arrive exactly once, at a line of its own SQI, and
// every injection must name the core that fetched or registered its line
// (out_dst_o; the core id is a fixed function of the packet data); every
// mechanism must have been seen at least once.
module tb_srd;
  import vl_pkg::*;

  localparam int ANS_LAT = 3;      // injection -> answer latency of the caches

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  spec_alg_e   alg;
  logic        in_valid;
  net_op_e     in_op;
  pa_t         in_addr;
  line_t       in_data;
  src_t        in_src;
  logic        in_ready;
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

  // ---------------- addresses and messages ----------------
  // device window: bit 51 set (space tag), router 0, SQI in [23:18],
  // bit 17 selects the speculation-registration range
  function automatic pa_t dev_addr(int sqi, bit spec_rng);
    pa_t a;
    a = pa_t'(1) << 51;
    a = a | (pa_t'(sqi) << 18);
    if (spec_rng) a = a | (pa_t'(1) << 17);
    return a;
  endfunction

  function automatic pa_t line_addr(int sqi, int n);
    return pa_t'(64'h10_0000_0000) + pa_t'(sqi) * pa_t'(32'h10000) + pa_t'(n) * 64;
  endfunction

  function automatic line_t msg(int sqi, int id);
    line_t d;
    d = '0;
    for (int w = 0; w < 16; w++) d[w*32 +: 32] = 32'(id) ^ (32'(w) << 24);
    d[511:480] = 32'(sqi);
    d[31:0]    = 32'(id);
    return d;
  endfunction

  // ---------------- packet queue (the cores) ----------------
  typedef struct {
    net_op_e op;
    pa_t     addr;
    line_t   data;
    int      expect_st;    // -1: OK or FULL allowed
    bit      retry_full;
    int      tag;          // message id for latency marking, else -1
  } pkt_t;

  pkt_t pq[$];
  pkt_t sent[$];

  function automatic void push_msg(int sqi, int id, bit retry = 1'b1, int expect_st = -1);
    pkt_t p;
    p = '{op: OP_PUSH, addr: dev_addr(sqi, 1'b0), data: msg(sqi, id), expect_st: expect_st,
          retry_full: retry, tag: id};
    pq.push_back(p);
  endfunction

  // ---------------- consumer cache model ----------------
  typedef struct {
    bit    full;
    bit    pushable;
    bit    spec;
    bit    refetch;      // consumer re-requests after consuming / after a reject
    int    sqi;
    int    hold;         // cycles the consumer keeps a filled line
    longint consume_at;
    int    fills;
    src_t  core;         // core that registered the line
  } line_t_m;

  line_t_m lines [pa_t];

  // requesting core of a fetch or registration: a fixed function of the packet data
  function automatic src_t core_of(line_t d);
    return d[9:6] ^ d[17:14];
  endfunction

  function automatic void fetch(int sqi, pa_t la, bit refetch, int hold, int expect_st = -1);
    pkt_t p;
    line_t_m l;
    l = '{full: 1'b0, pushable: 1'b1, spec: 1'b0, refetch: refetch, sqi: sqi, hold: hold,
          consume_at: 0, fills: 0, core: core_of(line_t'(la))};
    if (lines.exists(la)) l.fills = lines[la].fills;
    lines[la] = l;
    p = '{op: OP_FETCH, addr: dev_addr(sqi, 1'b0), data: line_t'(la), expect_st: expect_st,
          retry_full: 1'b0, tag: -1};
    pq.push_back(p);
  endfunction

  function automatic void register_spec(int sqi, pa_t base, int len, int hold);
    pkt_t p;
    line_t d;
    for (int i = 0; i < len; i++)
      lines[base + pa_t'(i * 64)] = '{full: 1'b0, pushable: 1'b1, spec: 1'b1, refetch: 1'b0,
                                      sqi: sqi, hold: hold, consume_at: 0, fills: 0,
                                      core: core_of(line_t'(base))};
    d = line_t'(base) | line_t'(len);
    p = '{op: OP_FETCH, addr: dev_addr(sqi, 1'b1), data: d, expect_st: ST_OK,
          retry_full: 1'b0, tag: -1};
    pq.push_back(p);
  endfunction

  // ---------------- bookkeeping ----------------
  longint cyc = 0;
  int     delivered [int];       // id -> number of successful injections
  int     expected_sqi [int];    // id -> SQI
  pa_t    order_addr [int][$];   // per SQI: addresses in delivery order
  int     order_id   [int][$];   // per SQI: ids in delivery order
  int     dec_cnt [16];
  int     n_stall = 0, n_push_full = 0, n_fetch_full = 0, n_invalid = 0;
  int     n_spec_sent = 0, n_spec_hit = 0, n_spec_miss = 0, n_dem_miss = 0;
  int     n_backpressure = 0, n_wrap = 0;
  int     force_miss = 0;
  bit     random_ready = 1'b0;
  int     lat_id = -1;
  longint lat_drive = -1;
  int     lat_seen = -1;

  typedef struct { longint due; idx_t tag; pa_t addr; line_t data; bit spec; } ans_t;
  ans_t aq[$];

  // ---------------- the synchronous system model ----------------
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      in_valid  <= 1'b0;
      pr_valid  <= 1'b0;
      out_ready <= 1'b1;
    end else begin
      // acknowledgements (in packet order)
      if (ack_valid) begin
        pkt_t s;
        check(sent.size() > 0, "ack without a packet");
        if (sent.size() > 0) begin
          s = sent.pop_front();
          if (s.expect_st >= 0)
            check(int'(ack_status) == s.expect_st,
                  $sformatf("ack status %0d, expected %0d", ack_status, s.expect_st));
          if (ack_status == ST_FULL && s.op == OP_PUSH) n_push_full++;
          if (ack_status == ST_FULL && s.op == OP_FETCH) n_fetch_full++;
          if (ack_status == ST_INVALID) n_invalid++;
          if (ack_status == ST_FULL && s.retry_full) pq.push_back(s);
        end
      end

      // pipeline events
      if (ev_stall) n_stall++;
      if (ev_valid) dec_cnt[int'(ev_dec)]++;

      // injections leaving the device
      if (out_valid && !out_ready) n_backpressure++;
      if (out_valid && out_ready) begin
        ans_t a;
        a = '{due: cyc + ANS_LAT, tag: out_tag, addr: out_addr, data: out_data, spec: out_spec};
        aq.push_back(a);
        if (lines.exists(out_addr))
          check(out_dst == lines[out_addr].core,
                $sformatf("line %h sent to core %0d, registered by core %0d",
                          out_addr, out_dst, lines[out_addr].core));
        if (out_spec) n_spec_sent++;
        if (int'(out_data[31:0]) == lat_id && lat_seen < 0) lat_seen = int'(cyc - lat_drive);
      end
      out_ready <= random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

      // answers of the consumer caches
      pr_valid <= 1'b0;
      if (aq.size() > 0 && aq[0].due <= cyc) begin
        ans_t a;
        bit   hit;
        int   id, sq;
        a   = aq.pop_front();
        id  = int'(a.data[31:0]);
        sq  = int'(a.data[511:480]);
        hit = lines.exists(a.addr) && lines[a.addr].pushable && !lines[a.addr].full;
        if (hit && !a.spec && force_miss > 0) begin
          hit = 1'b0;
          force_miss--;
          // the consumer lost its line and asks again
          lines[a.addr].pushable = 1'b0;
          fetch(lines[a.addr].sqi, a.addr, 1'b0, lines[a.addr].hold);
        end
        if (hit) begin
          check(lines[a.addr].sqi == sq, $sformatf("message %0d of SQI %0d sent to a line of SQI %0d",
                                                   id, sq, lines[a.addr].sqi));
          lines[a.addr].full       = 1'b1;
          lines[a.addr].pushable   = lines[a.addr].spec;
          lines[a.addr].consume_at = cyc + lines[a.addr].hold;
          lines[a.addr].fills++;
          if (delivered.exists(id)) delivered[id]++; else delivered[id] = 1;
          order_addr[sq].push_back(a.addr);
          order_id[sq].push_back(id);
          if (a.spec) n_spec_hit++;
        end else begin
          if (a.spec) n_spec_miss++; else n_dem_miss++;
        end
        pr_valid <= 1'b1;
        pr_tag   <= a.tag;
        pr_hit   <= hit;
      end

      // consumers drain their lines
      foreach (lines[la]) begin
        if (lines[la].full && lines[la].consume_at <= cyc) begin
          lines[la].full = 1'b0;
          if (lines[la].refetch) fetch(lines[la].sqi, la, 1'b1, lines[la].hold);
        end
      end

      // one packet per cycle into the device
      in_valid <= 1'b0;
      if (pq.size() > 0) begin
        pkt_t p;
        p = pq.pop_front();
        in_valid <= 1'b1;
        in_op    <= p.op;
        in_addr  <= p.addr;
        in_data  <= p.data;
        in_src   <= core_of(p.data);
        // packets for another routing device (router id field non-zero) get no status
        if (p.addr[27:24] == '0) sent.push_back(p);
        if (p.tag >= 0 && p.tag == lat_id && lat_drive < 0) lat_drive = cyc;
      end
    end
  end

  task automatic wait_cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_quiet(int max_cycles);
    int n;
    n = 0;
    while ((pq.size() > 0 || aq.size() > 0 || !idle || out_valid || sent.size() > 0)
           && n < max_cycles) begin
      @(negedge clk);
      n++;
    end
    wait_cycles(4);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  int next_id = 1;
  int wrap_before;

  initial begin
    in_valid = 1'b0; pr_valid = 1'b0; out_ready = 1'b1;
    in_op = OP_PUSH; in_addr = '0; in_data = '0; in_src = '0; pr_tag = '0; pr_hit = 1'b0;
    alg = ALG_TUNED;
    foreach (dec_cnt[i]) dec_cnt[i] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    wait_cycles(3);

    // P1: request waits, then data arrives -> on-demand push, check latency
    fetch(1, line_addr(1, 0), 1'b0, 10, ST_OK);
    wait_cycles(10);
    lat_id = next_id;
    expected_sqi[next_id] = 1; push_msg(1, next_id++, 1'b0, ST_OK);
    wait_quiet(200);
    check(lat_seen == 5, $sformatf("push-to-injection latency %0d cycles, expected 5", lat_seen));

    // P2: data first, request later
    expected_sqi[next_id] = 1; push_msg(1, next_id++, 1'b0, ST_OK);
    wait_cycles(10);
    fetch(1, line_addr(1, 1), 1'b0, 10, ST_OK);
    wait_quiet(200);

    // P3: back-to-back items on one SQI hit the interlock
    for (int i = 0; i < 4; i++) begin
      expected_sqi[next_id] = 4; push_msg(4, next_id++, 1'b0, ST_OK);
    end
    wait_cycles(20);
    for (int i = 0; i < 4; i++) fetch(4, line_addr(4, i), 1'b0, 5, ST_OK);
    wait_quiet(400);

    // P4: fill prodBuf on SQI 2, one more push is refused, FIFO drain
    for (int i = 0; i < 64; i++) begin
      expected_sqi[next_id] = 2; push_msg(2, next_id++, 1'b0, ST_OK);
    end
    push_msg(2, 100000, 1'b0, ST_FULL);
    wait_cycles(80);
    for (int i = 0; i < 64; i++) fetch(2, line_addr(2, i), 1'b0, 5, ST_OK);
    wait_quiet(2000);
    check(order_id[2].size() == 64, $sformatf("SQI 2 delivered %0d of 64", order_id[2].size()));
    for (int i = 0; i < 64 && i < order_id[2].size(); i++) begin
      check(order_id[2][i] == order_id[2][0] + i, $sformatf("SQI 2 order: position %0d has %0d", i, order_id[2][i]));
      check(order_addr[2][i] == line_addr(2, i), $sformatf("SQI 2 position %0d went to the wrong request", i));
    end

    // P5: fill consBuf on SQI 3, one more request is refused, FIFO drain
    for (int i = 0; i < 64; i++) fetch(3, line_addr(3, i), 1'b0, 5, ST_OK);
    fetch(3, line_addr(3, 64), 1'b0, 5, ST_FULL);
    wait_cycles(80);
    for (int i = 0; i < 64; i++) begin
      expected_sqi[next_id] = 3; push_msg(3, next_id++, 1'b0, ST_OK);
    end
    wait_quiet(2000);
    check(order_id[3].size() == 64, $sformatf("SQI 3 delivered %0d of 64", order_id[3].size()));
    for (int i = 0; i < 64 && i < order_id[3].size(); i++)
      check(order_addr[3][i] == line_addr(3, i), $sformatf("SQI 3 position %0d went to the wrong request", i));

    // P6: the target cache rejects an on-demand push; the data is mapped again
    force_miss = 1;
    fetch(5, line_addr(5, 0), 1'b0, 5, ST_OK);
    wait_cycles(10);
    expected_sqi[next_id] = 5; push_msg(5, next_id++, 1'b0, ST_OK);
    wait_quiet(400);
    check(force_miss == 0, "forced rejection did not happen");

    // P7: a push into the registration range is malformed
    begin
      pkt_t p;
      p = '{op: OP_PUSH, addr: dev_addr(6, 1'b1), data: '0, expect_st: ST_INVALID,
            retry_full: 1'b0, tag: -1};
      pq.push_back(p);
    end
    wait_quiet(50);
    // a push for another routing device (router id 3) must be ignored: no
    // status, no data delivered (the consumer below would receive it)
    begin
      pkt_t p;
      p = '{op: OP_PUSH, addr: dev_addr(6, 1'b0) | (pa_t'(3) << 24), data: msg(6, 999),
            expect_st: -1, retry_full: 1'b0, tag: -1};
      pq.push_back(p);
    end
    wait_quiet(50);
    check(sent.size() == 0, "a packet for another device was acknowledged");
    fetch(6, line_addr(6, 0), 1'b0, 5, ST_OK);
    wait_quiet(100);
    check(!lines[line_addr(6, 0)].full && lines[line_addr(6, 0)].fills == 0,
          "data addressed to another device was delivered");

    // P8: speculation, one SQI per algorithm: entry A = 2 lines, entry B = 1 line
    for (int a = 0; a < 3; a++) begin
      int sq;
      sq  = 8 + a;
      alg = spec_alg_e'(a);
      if (a == 2) random_ready = 1'b1;
      register_spec(sq, line_addr(sq, 0), 2, 40 + 10 * a);
      register_spec(sq, line_addr(sq, 8), 1, 40 + 10 * a);
      wait_cycles(10);
      for (int i = 0; i < 30; i++) begin
        expected_sqi[next_id] = sq; push_msg(sq, next_id++, 1'b1);
        wait_cycles($urandom_range(4, 24));
      end
      for (int w = 0; w < 40000 && order_id[sq].size() < 30; w++) @(negedge clk);
      wait_quiet(2000);
      random_ready = 1'b0;
      check(order_id[sq].size() == 30, $sformatf("SQI %0d (alg %0d) delivered %0d of 30",
                                                 sq, a, order_id[sq].size()));
      // the two-line entry must have wrapped its offset: line 0 filled again after line 1
      check(lines[line_addr(sq, 0)].fills >= 2 && lines[line_addr(sq, 1)].fills >= 1,
            $sformatf("SQI %0d: offset of the two-line entry never wrapped", sq));
      if (lines[line_addr(sq, 0)].fills >= 2 && lines[line_addr(sq, 1)].fills >= 1) n_wrap++;
    end

    // ---------------- final checks ----------------
    foreach (expected_sqi[id]) begin
      check(delivered.exists(id) && delivered[id] == 1,
            $sformatf("message %0d delivered %0d times", id, delivered.exists(id) ? delivered[id] : 0));
    end
    check(!delivered.exists(100000), "refused push was delivered");

    $display("mechanisms: stall=%0d cons_hit=%0d cons_miss=%0d prod_hit=%0d prod_miss=%0d",
             n_stall, dec_cnt[MD_CONS_HIT], dec_cnt[MD_CONS_MISS], dec_cnt[MD_PROD_HIT], dec_cnt[MD_PROD_MISS]);
    $display("mechanisms: prod_spec=%0d retry_spec=%0d retry_rot=%0d sreg=%0d",
             dec_cnt[MD_PROD_SPEC], dec_cnt[MD_RETRY_SPEC], dec_cnt[MD_RETRY_ROT], dec_cnt[MD_SREG]);
    $display("mechanisms: push_full=%0d fetch_full=%0d invalid=%0d spec_sent=%0d spec_hit=%0d spec_miss=%0d dem_miss=%0d backpressure=%0d wrap=%0d",
             n_push_full, n_fetch_full, n_invalid, n_spec_sent, n_spec_hit, n_spec_miss, n_dem_miss,
             n_backpressure, n_wrap);
    check(n_stall > 0, "same-SQI interlock never stalled");
    check(dec_cnt[MD_CONS_HIT] > 0, "request never met buffered data");
    check(dec_cnt[MD_CONS_MISS] > 0, "request never buffered");
    check(dec_cnt[MD_PROD_HIT] > 0, "data never met a buffered request");
    check(dec_cnt[MD_PROD_MISS] > 0, "data never buffered");
    check(dec_cnt[MD_PROD_SPEC] > 0, "data never took a speculation target");
    check(dec_cnt[MD_RETRY_SPEC] > 0, "buffered data never retried speculation");
    check(dec_cnt[MD_RETRY_ROT] > 0, "busy speculation target never skipped");
    check(dec_cnt[MD_SREG] == 6, $sformatf("%0d registrations linked, expected 6", dec_cnt[MD_SREG]));
    check(n_push_full > 0, "prodBuf never full");
    check(n_fetch_full > 0, "consBuf never full");
    check(n_invalid == 1, "malformed request not refused");
    check(n_spec_hit > 0, "no speculative push succeeded");
    check(n_spec_miss > 0, "no speculative push failed");
    check(n_dem_miss == 1, "rejected on-demand push not seen once");
    check(n_backpressure > 0, "injection port never back-pressured");
    check(n_wrap == 3, "specBuf offset wrap not seen for every algorithm");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

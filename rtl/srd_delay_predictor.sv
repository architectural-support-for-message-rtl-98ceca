// srd_delay_predictor: decides when a speculative push may be sent, and how
// the per-target history changes when the target cache answers a push.
//
// Three algorithms, selected at run time by alg_i:
//   ALG_ODELAY  send at once (send_at = tsc); history keeps only `failed`.
//   ALG_ADAPT   send_at = tsc + delay; a hit halves delay, a miss doubles it
//               (a zero delay grows to DELTA first, doubling saturates).
//   ALG_TUNED   the interval between the two most recent successful pushes
//               is the reference; around it a window [ref - TAU, ref + ZETA]
//               is scanned in steps of DELTA, and past the window (the
//               deadline `ddl`) the delay grows by a left shift of ALPHA.
//               While fewer than BETA pushes have succeeded (initialising
//               phase) it sends at once, or DELTA later after a failure.
//               A randomly chosen halved delay (shift by a one-bit hash of
//               delay and tsc) is tried first when there is still time.
// The tuned algorithm follows the documented update/lookup procedures. The
// hash is this design's choice (parity of the low four bits of delay XOR
// tsc), and an interval shorter than TAU gives a delay of zero rather than a
// wrapped negative number.
// Purely combinational: the lookup uses st_i and tsc_i; the update gives the
// history after a response with hit flag hit_i.
module srd_delay_predictor
  import vl_pkg::*;
#(
  parameter int unsigned ZETA  = 128,
  parameter int unsigned TAU   = 48,
  parameter int unsigned DELTA = 32,
  parameter int unsigned ALPHA = 1,
  parameter int unsigned BETA  = 2
) (
  input  spec_alg_e   alg_i,
  input  ts_t         tsc_i,
  input  pred_state_t st_i,
  output ts_t         send_at_o,   // earliest time the push may leave
  input  logic        hit_i,
  output pred_state_t st_upd_o     // history after a response
);
  localparam ts_t TS_MAX = '1;

  function automatic ts_t sat_shl(ts_t v, int unsigned sh);
    logic [TS_W+7:0] w;
    w = {8'b0, v} << sh;
    return (w > {8'b0, TS_MAX}) ? TS_MAX : w[TS_W-1:0];
  endfunction

  function automatic ts_t sat_add(ts_t a, ts_t b);
    logic [TS_W:0] w;
    w = {1'b0, a} + {1'b0, b};
    return w[TS_W] ? TS_MAX : w[TS_W-1:0];
  endfunction

  ts_t  elapse, halved;
  logic hash;

  always_comb begin
    elapse = tsc_i - st_i.last;
    hash   = ^(st_i.delay[3:0] ^ tsc_i[3:0]);
    halved = st_i.delay >> hash;

    // ---------------- lookup: when to send ----------------
    send_at_o = tsc_i;
    unique case (alg_i)
      ALG_ODELAY: send_at_o = tsc_i;
      ALG_ADAPT:  send_at_o = tsc_i + st_i.delay;
      ALG_TUNED: begin
        if (int'(st_i.nfills) < BETA)
          send_at_o = tsc_i + (st_i.failed ? ts_t'(DELTA) : '0);
        else if (elapse < halved)
          send_at_o = st_i.last + halved;
        else if (elapse < st_i.delay)
          send_at_o = st_i.last + st_i.delay;
        else if (!st_i.failed)
          send_at_o = tsc_i;
        else if (elapse < st_i.ddl)
          send_at_o = tsc_i + ts_t'(DELTA);
        else
          send_at_o = tsc_i + st_i.delay;
      end
      default: send_at_o = tsc_i;
    endcase

    // ---------------- update: after a push response ----------------
    st_upd_o        = st_i;
    st_upd_o.failed = !hit_i;
    unique case (alg_i)
      ALG_ODELAY: ;
      ALG_ADAPT: begin
        if (hit_i)                          st_upd_o.delay = st_i.delay >> 1;
        else if (st_i.delay < ts_t'(DELTA)) st_upd_o.delay = ts_t'(DELTA);
        else                                st_upd_o.delay = sat_shl(st_i.delay, 1);
      end
      ALG_TUNED: begin
        if (hit_i) begin
          st_upd_o.delay  = (elapse > ts_t'(TAU)) ? elapse - ts_t'(TAU) : '0;
          st_upd_o.ddl    = sat_add(elapse, ts_t'(ZETA));
          st_upd_o.nfills = (st_i.nfills == '1) ? st_i.nfills : st_i.nfills + 1'b1;
          st_upd_o.last   = tsc_i;
        end else if (st_i.delay < st_i.ddl) begin
          st_upd_o.delay = sat_add(st_i.delay, ts_t'(DELTA));
        end else begin
          st_upd_o.delay = sat_shl(st_i.delay, ALPHA);
        end
      end
      default: ;
    endcase
  end
endmodule

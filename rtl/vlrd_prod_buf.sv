// vlrd_prod_buf: the Producer Buffer (prodBuf) of the routing device, with
// the sending queue and the speculative push queue that live in it.
//
// Each slot (1..DEPTH, 0 = NULL) holds one 64-byte cache line pushed by a
// producer together with its SQI, and moves through three partitions that
// are threaded as linked lists over the shared slots:
//   IN    arrival order, PIHR/PITR = head/tail, link field nextIn; it feeds
//         the address mapping pipeline (head_* / pop_i). PIFR names the slot
//         the next push will take (round-robin over free slots).
//   LINK  data buffered on its SQI because no consumer asked yet; link field
//         nextL, list head/tail kept in the link table (rd_* / ln_* / lk_*).
//   OUT   data mapped to a consumer request: consTgt, the consumer's core
//         (out_dst_o) and the consBuf slot
//         (`mapped`) are recorded and the slot joins the sending queue,
//         POHR/POTR = head/tail, link field nextOut (mo_*).
// A slot chosen for a speculative push (ms_*) instead records the target,
// the specBuf entry and the earliest send time; such slots form the
// speculative push queue and leave it in any order once their time passed.
// The send port (out_*) offers the sending queue head first, otherwise the
// lowest-numbered speculative slot whose time has come. Once sent, a slot
// waits for the target cache's answer (rsp_*): a hit frees it, a miss puts
// it back at the tail of the IN list so it is mapped again. For the answer
// the slot's bookkeeping is read back combinationally (rsp_info).
// Timing: a push accepted in cycle t is at the IN head from t+1; a slot
// written into the sending queue in cycle t can be sent from t+1.
// Synchronous active-low reset empties the buffer.
module vlrd_prod_buf
  import vl_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ts_t   tsc_i,
  // arrival of producer data
  input  logic  in_valid_i,
  input  sqi_t  in_sqi_i,
  input  line_t in_data_i,
  output logic  in_ready_o,
  // head of the IN list (PIHR)
  output logic  head_valid_o,
  output idx_t  head_idx_o,
  output sqi_t  head_sqi_o,
  input  logic  pop_i,
  // read port (Stage 2)
  input  idx_t  rd_idx_i,
  output idx_t  rd_next_l_o,
  // Stage 3: link write nextL[ln_idx] = ln_next
  input  logic  ln_en_i,
  input  idx_t  ln_idx_i,
  input  idx_t  ln_next_i,
  // Stage 3: slot joins the LINK partition (its nextL becomes NULL)
  input  logic  lk_en_i,
  input  idx_t  lk_idx_i,
  // Stage 3: slot mapped to a consumer request -> sending queue
  input  logic  mo_en_i,
  input  idx_t  mo_idx_i,
  input  pa_t   mo_tgt_i,
  input  src_t  mo_dst_i,
  input  idx_t  mo_mapped_i,
  // Stage 3: slot chosen for a speculative push
  input  logic  ms_en_i,
  input  idx_t  ms_idx_i,
  input  pa_t   ms_tgt_i,
  input  src_t  ms_dst_i,
  input  idx_t  ms_spec_i,
  input  ts_t   ms_send_at_i,
  // send port toward the coherence network
  output logic  out_valid_o,
  input  logic  out_ready_i,
  output idx_t  out_idx_o,
  output pa_t   out_tgt_o,
  output src_t  out_dst_o,
  output line_t out_data_o,
  output logic  out_spec_o,
  // answer of the target cache for slot rsp_idx
  input  logic  rsp_en_i,
  input  idx_t  rsp_idx_i,
  input  logic  rsp_hit_i,
  output logic  rsp_is_spec_o,
  output idx_t  rsp_mapped_o,
  output idx_t  rsp_spec_o,
  output sqi_t  rsp_sqi_o,
  output logic  rsp_sent_o,        // slot really was waiting for an answer
  // occupancy
  output logic [IDX_W-1:0] used_o
);
  pb_state_e state_q    [DEPTH:1];
  sqi_t      sqi_q      [DEPTH:1];
  line_t     data_q     [DEPTH:1];
  idx_t      next_in_q  [DEPTH:1];
  idx_t      next_l_q   [DEPTH:1];
  idx_t      next_out_q [DEPTH:1];
  pa_t       tgt_q      [DEPTH:1];
  src_t      dst_q      [DEPTH:1];
  idx_t      mapped_q   [DEPTH:1];
  idx_t      spec_q     [DEPTH:1];
  ts_t       send_at_q  [DEPTH:1];
  logic      is_spec_q  [DEPTH:1];

  idx_t pihr_q, pitr_q, pifr_q, pohr_q, potr_q;
  idx_t pihr_d, pitr_d, pifr_d, pohr_d, potr_d;

  logic           alloc, requeue, send, send_from_out;
  logic [DEPTH:1] free_now, free_d;
  idx_t           spec_pick, send_idx, rsp_i;

  function automatic idx_t nz(idx_t i);
    return (i == '0) ? idx_t'(1) : i;
  endfunction

  assign rsp_i        = nz(rsp_idx_i);
  assign requeue      = rsp_en_i && !rsp_hit_i && state_q[rsp_i] == PB_SENT;
  assign in_ready_o   = (pifr_q != '0) && state_q[nz(pifr_q)] == PB_FREE;
  assign alloc        = in_valid_i && in_ready_o;
  assign head_valid_o = (pihr_q != '0);
  assign head_idx_o   = pihr_q;
  assign head_sqi_o   = sqi_q[nz(pihr_q)];
  assign rd_next_l_o  = next_l_q[nz(rd_idx_i)];

  assign rsp_is_spec_o = is_spec_q[rsp_i];
  assign rsp_mapped_o  = mapped_q[rsp_i];
  assign rsp_spec_o    = spec_q[rsp_i];
  assign rsp_sqi_o     = sqi_q[rsp_i];
  assign rsp_sent_o    = rsp_en_i && state_q[rsp_i] == PB_SENT;

  // speculative push queue: lowest-numbered slot whose send time has come
  always_comb begin
    spec_pick = '0;
    for (int i = DEPTH; i >= 1; i--)
      if (state_q[i] == PB_SPEC && $signed(tsc_i - send_at_q[i]) >= 0)
        spec_pick = idx_t'(i);
  end

  assign send_from_out = (pohr_q != '0);
  assign send_idx      = send_from_out ? pohr_q : spec_pick;
  assign out_valid_o   = (send_idx != '0);
  assign out_idx_o     = send_idx;
  assign out_tgt_o     = tgt_q[nz(send_idx)];
  assign out_dst_o     = dst_q[nz(send_idx)];
  assign out_data_o    = data_q[nz(send_idx)];
  assign out_spec_o    = is_spec_q[nz(send_idx)];
  assign send          = out_valid_o && out_ready_i;

  // free-slot register (PIFR)
  always_comb begin
    for (int i = 1; i <= DEPTH; i++) free_now[i] = (state_q[i] == PB_FREE);
    free_d = free_now;
    if (rsp_en_i && rsp_hit_i && state_q[rsp_i] == PB_SENT) free_d[rsp_i] = 1'b1;
    if (alloc) free_d[pifr_q] = 1'b0;
  end

  rr_free_finder #(.DEPTH(DEPTH), .IDX_W(IDX_W)) u_pifr (
    .free_i(free_d), .start_i(pifr_q), .slot_o(pifr_d)
  );

  // IN list: pop, then append a re-queued slot, then the new arrival
  always_comb begin
    pihr_d = pihr_q;
    pitr_d = pitr_q;
    if (pop_i && pihr_q != '0) begin
      pihr_d = next_in_q[pihr_q];
      if (pihr_q == pitr_q) pitr_d = '0;
    end
    if (requeue) begin
      if (pitr_d == '0) pihr_d = rsp_idx_i;
      pitr_d = rsp_idx_i;
    end
    if (alloc) begin
      if (pitr_d == '0) pihr_d = pifr_q;
      pitr_d = pifr_q;
    end
  end

  // OUT list (sending queue): pop on send, append on mapping
  always_comb begin
    pohr_d = pohr_q;
    potr_d = potr_q;
    if (send && send_from_out) begin
      pohr_d = next_out_q[pohr_q];
      if (pohr_q == potr_q) potr_d = '0;
    end
    if (mo_en_i) begin
      if (potr_d == '0) pohr_d = mo_idx_i;
      potr_d = mo_idx_i;
    end
  end

  always_ff @(posedge clk) begin
    idx_t t;
    if (!rst_n) begin
      pihr_q <= '0; pitr_q <= '0; pohr_q <= '0; potr_q <= '0;
      pifr_q <= idx_t'(1);
      for (int i = 1; i <= DEPTH; i++) begin
        state_q[i]    <= PB_FREE;
        sqi_q[i]      <= '0;
        data_q[i]     <= '0;
        next_in_q[i]  <= '0;
        next_l_q[i]   <= '0;
        next_out_q[i] <= '0;
        tgt_q[i]      <= '0;
        dst_q[i]      <= '0;
        mapped_q[i]   <= '0;
        spec_q[i]     <= '0;
        send_at_q[i]  <= '0;
        is_spec_q[i]  <= 1'b0;
      end
    end else begin
      pihr_q <= pihr_d; pitr_q <= pitr_d;
      pohr_q <= pohr_d; potr_q <= potr_d;
      pifr_q <= pifr_d;

      // IN list links (same order as the pointer update above)
      t = (pop_i && pihr_q != '0 && pihr_q == pitr_q) ? '0 : pitr_q;
      if (requeue) begin
        if (t != '0) next_in_q[t] <= rsp_idx_i;
        next_in_q[rsp_i] <= '0;
        state_q[rsp_i]   <= PB_IN;
        t = rsp_idx_i;
      end
      if (alloc) begin
        if (t != '0) next_in_q[t] <= pifr_q;
        next_in_q[pifr_q] <= '0;
        state_q[pifr_q]   <= PB_IN;
        sqi_q[pifr_q]     <= in_sqi_i;
        data_q[pifr_q]    <= in_data_i;
        is_spec_q[pifr_q] <= 1'b0;
      end

      // LINK partition
      if (ln_en_i && ln_idx_i != '0) next_l_q[ln_idx_i] <= ln_next_i;
      if (lk_en_i) begin
        next_l_q[nz(lk_idx_i)] <= '0;
        state_q[nz(lk_idx_i)]  <= PB_LINK;
      end

      // OUT partition / sending queue
      if (mo_en_i) begin
        state_q[nz(mo_idx_i)]    <= PB_OUT;
        tgt_q[nz(mo_idx_i)]      <= mo_tgt_i;
        dst_q[nz(mo_idx_i)]      <= mo_dst_i;
        mapped_q[nz(mo_idx_i)]   <= mo_mapped_i;
        is_spec_q[nz(mo_idx_i)]  <= 1'b0;
        next_out_q[nz(mo_idx_i)] <= '0;
        if (!(send && send_from_out && pohr_q == potr_q) && potr_q != '0)
          next_out_q[potr_q] <= mo_idx_i;
      end

      // speculative push queue
      if (ms_en_i) begin
        state_q[nz(ms_idx_i)]   <= PB_SPEC;
        tgt_q[nz(ms_idx_i)]     <= ms_tgt_i;
        dst_q[nz(ms_idx_i)]     <= ms_dst_i;
        spec_q[nz(ms_idx_i)]    <= ms_spec_i;
        send_at_q[nz(ms_idx_i)] <= ms_send_at_i;
        mapped_q[nz(ms_idx_i)]  <= '0;
        is_spec_q[nz(ms_idx_i)] <= 1'b1;
      end

      if (send) state_q[send_idx] <= PB_SENT;

      if (rsp_en_i && rsp_hit_i && state_q[rsp_i] == PB_SENT)
        state_q[rsp_i] <= PB_FREE;
    end
  end

  always_comb begin
    used_o = '0;
    for (int i = 1; i <= DEPTH; i++) used_o += idx_t'(state_q[i] != PB_FREE);
  end

  initial assert (DEPTH < (1 << IDX_W)) else $error("DEPTH does not fit IDX_W");

  always_ff @(posedge clk) if (rst_n) begin
    assert (!pop_i || pihr_q != '0) else $error("prodBuf: pop of an empty IN list");
    assert (!mo_en_i || state_q[nz(mo_idx_i)] inside {PB_IN, PB_LINK})
      else $error("prodBuf: mapping a slot that holds no pending data");
    assert (!ms_en_i || state_q[nz(ms_idx_i)] inside {PB_IN, PB_LINK})
      else $error("prodBuf: speculating on a slot that holds no pending data");
  end
endmodule

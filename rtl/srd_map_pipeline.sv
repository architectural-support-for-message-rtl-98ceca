// srd_map_pipeline: the three-stage address mapping pipeline of the routing
// device, which pairs producer data with consumer requests and, with the
// SPAMeR extension, with speculation targets.
//
// Items entering the pipeline, one per cycle at most:
//   MK_CONS   head of the consBuf input list (a consumer request)
//   MK_PROD   head of the prodBuf IN list (producer data)
//   MK_SREG   a newly registered specBuf entry to link into its SQI loop
//   MK_RETRY  a new chance to speculate on data buffered on an SQI; raised
//             when a speculative push to that SQI was answered and when a
//             speculation target was registered
// SREG and RETRY items go first; requests and data alternate when both wait.
// Stage 1 reads the link table row of the item's SQI. Stage 2 takes the
// decision and reads the buffers it needs:
//   request, producer data buffered   -> hit: read nextL of the data's slot
//   request, no data                  -> miss: append to the SQI's request list
//   data, request buffered            -> hit: read consTgt/nextL of the request
//   data, no request, specHead entry free -> speculative target from specBuf
//   data otherwise                    -> miss: append to the SQI's data list
// Stage 3 writes the link table row, the list links and the prodBuf slot
// (to the sending queue, the speculative push queue or the LINK list), and
// after every use of specHead advances it to the next entry of the loop.
// Hazards: the link table forwards a Stage 3 write to a Stage 1 read of the
// same row; an item whose SQI equals the one in Stage 2 waits one cycle
// (ev_stall_o) unless the other list's head can go in its place, so
// same-SQI items are at least two cycles apart and every buffer read in
// Stage 2 sees the writes of earlier items.
// The stage split and decisions follow the documented pipeline. The
// interlock in place of full forwarding, the issue order, and the SREG and
// RETRY items are this design's own choices.
module srd_map_pipeline
  import vl_pkg::*;
#(
  parameter int unsigned NUM_SQI    = 64,
  parameter int unsigned SPEC_DEPTH = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  // consBuf input list head
  input  logic      c_valid_i,
  input  idx_t      c_idx_i,
  input  sqi_t      c_sqi_i,
  output logic      c_pop_o,
  // prodBuf IN list head
  input  logic      p_valid_i,
  input  idx_t      p_idx_i,
  input  sqi_t      p_sqi_i,
  output logic      p_pop_o,
  // new specBuf entry to link, and speculation retry requests
  input  logic      sreg_en_i,
  input  idx_t      sreg_idx_i,
  input  sqi_t      sreg_sqi_i,
  input  logic      retry_en_i,
  input  sqi_t      retry_sqi_i,
  // link table
  output sqi_t      lt_rd_sqi_o,
  input  link_row_t lt_rd_row_i,
  output logic      lt_wr_en_o,
  output sqi_t      lt_wr_sqi_o,
  output link_row_t lt_wr_row_o,
  // consBuf
  output idx_t      cb_rd_idx_o,
  input  pa_t       cb_rd_tgt_i,
  input  src_t      cb_rd_src_i,
  input  idx_t      cb_rd_next_l_i,
  output logic      cb_ln_en_o,
  output idx_t      cb_ln_idx_o,
  output idx_t      cb_ln_next_o,
  // prodBuf
  output idx_t      pb_rd_idx_o,
  input  idx_t      pb_rd_next_l_i,
  output logic      pb_ln_en_o,
  output idx_t      pb_ln_idx_o,
  output idx_t      pb_ln_next_o,
  output logic      pb_lk_en_o,
  output idx_t      pb_lk_idx_o,
  output logic      pb_mo_en_o,
  output idx_t      pb_mo_idx_o,
  output pa_t       pb_mo_tgt_o,
  output src_t      pb_mo_dst_o,
  output idx_t      pb_mo_mapped_o,
  output logic      pb_ms_en_o,
  output idx_t      pb_ms_idx_o,
  output pa_t       pb_ms_tgt_o,
  output src_t      pb_ms_dst_o,
  output idx_t      pb_ms_spec_o,
  output ts_t       pb_ms_send_at_o,
  // specBuf
  output idx_t      sb_rd_idx_o,
  input  logic      sb_rd_valid_i,
  input  logic      sb_rd_on_fly_i,
  input  idx_t      sb_rd_next_i,
  input  pa_t       sb_rd_tgt_i,
  input  src_t      sb_rd_src_i,
  input  ts_t       sb_rd_send_at_i,
  output logic      sb_ln0_en_o,
  output idx_t      sb_ln0_idx_o,
  output idx_t      sb_ln0_next_o,
  output logic      sb_ln1_en_o,
  output idx_t      sb_ln1_idx_o,
  output idx_t      sb_ln1_next_o,
  output logic      sb_tk_en_o,
  output idx_t      sb_tk_idx_o,
  // events
  output logic      ev_stall_o,     // an item waited for the same-SQI interlock
  output logic      ev_valid_o,     // Stage 3 carries out ev_dec_o this cycle
  output map_dec_e  ev_dec_o,
  output logic      idle_o          // nothing in flight or pending
);
  // ---------------- pending SREG / RETRY items ----------------
  logic [SPEC_DEPTH:1] sreg_pend_q;
  sqi_t                sreg_sqi_q [SPEC_DEPTH:1];
  logic [NUM_SQI-1:0]  retry_pend_q;

  idx_t sreg_pick;
  sqi_t retry_pick;
  logic sreg_any, retry_any;

  always_comb begin
    sreg_pick = '0;
    for (int i = SPEC_DEPTH; i >= 1; i--) if (sreg_pend_q[i]) sreg_pick = idx_t'(i);
    sreg_any   = |sreg_pend_q;
    retry_pick = '0;
    for (int i = NUM_SQI - 1; i >= 0; i--) if (retry_pend_q[i]) retry_pick = sqi_t'(i);
    retry_any  = |retry_pend_q;
  end

  // ---------------- Stage 1: choose an item, read the link table ----------
  logic      cand_valid, issue, rr_cons_q;
  map_kind_e cand_kind;
  sqi_t      cand_sqi;
  idx_t      cand_idx;

  logic      s2_valid_q;
  map_kind_e s2_kind_q;
  sqi_t      s2_sqi_q;
  idx_t      s2_idx_q;
  link_row_t s2_row_q;

  // A consumer or producer head whose SQI sits in Stage 2 is blocked; the
  // other list's head then takes the slot instead of losing the cycle.
  logic c_blk, p_blk, take_cons;
  assign c_blk     = s2_valid_q && (s2_sqi_q == c_sqi_i);
  assign p_blk     = s2_valid_q && (s2_sqi_q == p_sqi_i);
  assign take_cons = c_valid_i && (!p_valid_i || (rr_cons_q ? !(c_blk && !p_blk)
                                                            : (p_blk && !c_blk)));

  always_comb begin
    cand_valid = 1'b1;
    cand_kind  = MK_PROD;
    cand_sqi   = p_sqi_i;
    cand_idx   = p_idx_i;
    if (sreg_any) begin
      cand_kind = MK_SREG;  cand_idx = sreg_pick; cand_sqi = sreg_sqi_q[sreg_pick == '0 ? idx_t'(1) : sreg_pick];
    end else if (retry_any) begin
      cand_kind = MK_RETRY; cand_idx = '0;        cand_sqi = retry_pick;
    end else if (take_cons) begin
      cand_kind = MK_CONS;  cand_idx = c_idx_i;   cand_sqi = c_sqi_i;
    end else if (p_valid_i) begin
      cand_kind = MK_PROD;  cand_idx = p_idx_i;   cand_sqi = p_sqi_i;
    end else begin
      cand_valid = 1'b0;
    end
  end

  assign ev_stall_o  = cand_valid && s2_valid_q && (s2_sqi_q == cand_sqi);
  assign issue       = cand_valid && !ev_stall_o;
  assign c_pop_o     = issue && cand_kind == MK_CONS;
  assign p_pop_o     = issue && cand_kind == MK_PROD;
  assign lt_rd_sqi_o = cand_sqi;

  // ---------------- Stage 2: decide, read buffers ----------------
  map_dec_e  dec2;
  logic      spec_free;

  always_comb begin
    cb_rd_idx_o = '0;
    pb_rd_idx_o = '0;
    sb_rd_idx_o = s2_row_q.spec_head;
    spec_free   = (s2_row_q.spec_head != '0) && sb_rd_valid_i && !sb_rd_on_fly_i;
    dec2        = MD_NONE;
    if (s2_valid_q) begin
      unique case (s2_kind_q)
        MK_CONS: begin
          cb_rd_idx_o = s2_idx_q;
          pb_rd_idx_o = s2_row_q.prod_head;
          dec2 = (s2_row_q.prod_head != '0) ? MD_CONS_HIT : MD_CONS_MISS;
        end
        MK_PROD: begin
          cb_rd_idx_o = s2_row_q.cons_head;
          if (s2_row_q.cons_head != '0) dec2 = MD_PROD_HIT;
          else if (spec_free)           dec2 = MD_PROD_SPEC;
          else                          dec2 = MD_PROD_MISS;
        end
        MK_RETRY: begin
          pb_rd_idx_o = s2_row_q.prod_head;
          if (s2_row_q.prod_head != '0 && s2_row_q.cons_head == '0 && spec_free)
            dec2 = MD_RETRY_SPEC;
          else if (s2_row_q.spec_head != '0)
            dec2 = MD_RETRY_ROT;
          else
            dec2 = MD_NONE;
        end
        MK_SREG: dec2 = MD_SREG;
        default: dec2 = MD_NONE;
      endcase
    end
  end

  // ---------------- Stage 3 registers ----------------
  logic      s3_valid_q;
  map_dec_e  s3_dec_q;
  sqi_t      s3_sqi_q;
  idx_t      s3_idx_q;
  link_row_t s3_row_q;
  pa_t       s3_cb_tgt_q;
  src_t      s3_cb_src_q, s3_sb_src_q;
  idx_t      s3_cb_next_q, s3_pb_next_q, s3_sb_next_q;
  pa_t       s3_sb_tgt_q;
  ts_t       s3_sb_send_at_q;

  // ---------------- Stage 3: write back ----------------
  link_row_t row3;
  logic      retry_from_sreg;

  always_comb begin
    row3            = s3_row_q;
    lt_wr_en_o      = 1'b0;
    cb_ln_en_o      = 1'b0; cb_ln_idx_o = '0; cb_ln_next_o = '0;
    pb_ln_en_o      = 1'b0; pb_ln_idx_o = '0; pb_ln_next_o = '0;
    pb_lk_en_o      = 1'b0; pb_lk_idx_o = '0;
    pb_mo_en_o      = 1'b0; pb_mo_idx_o = '0; pb_mo_tgt_o = '0; pb_mo_mapped_o = '0;
    pb_mo_dst_o     = s3_cb_src_q; pb_ms_dst_o = s3_sb_src_q;
    pb_ms_en_o      = 1'b0; pb_ms_idx_o = '0; pb_ms_tgt_o = '0; pb_ms_spec_o = '0;
    pb_ms_send_at_o = '0;
    sb_ln0_en_o     = 1'b0; sb_ln0_idx_o = '0; sb_ln0_next_o = '0;
    sb_ln1_en_o     = 1'b0; sb_ln1_idx_o = '0; sb_ln1_next_o = '0;
    sb_tk_en_o      = 1'b0; sb_tk_idx_o = '0;
    retry_from_sreg = 1'b0;
    if (s3_valid_q) begin
      unique case (s3_dec_q)
        MD_CONS_HIT: begin
          pb_mo_en_o     = 1'b1;
          pb_mo_idx_o    = s3_row_q.prod_head;
          pb_mo_tgt_o    = s3_cb_tgt_q;
          pb_mo_mapped_o = s3_idx_q;
          row3.prod_head = s3_pb_next_q;
          if (s3_row_q.prod_head == s3_row_q.prod_tail) row3.prod_tail = '0;
          lt_wr_en_o     = 1'b1;
        end
        MD_CONS_MISS: begin
          if (s3_row_q.cons_tail == '0) row3.cons_head = s3_idx_q;
          else begin
            cb_ln_en_o   = 1'b1;
            cb_ln_idx_o  = s3_row_q.cons_tail;
            cb_ln_next_o = s3_idx_q;
          end
          row3.cons_tail = s3_idx_q;
          lt_wr_en_o     = 1'b1;
        end
        MD_PROD_HIT: begin
          pb_mo_en_o     = 1'b1;
          pb_mo_idx_o    = s3_idx_q;
          pb_mo_tgt_o    = s3_cb_tgt_q;
          pb_mo_mapped_o = s3_row_q.cons_head;
          row3.cons_head = s3_cb_next_q;
          if (s3_row_q.cons_head == s3_row_q.cons_tail) row3.cons_tail = '0;
          lt_wr_en_o     = 1'b1;
        end
        MD_PROD_SPEC, MD_RETRY_SPEC: begin
          pb_ms_en_o      = 1'b1;
          pb_ms_idx_o     = (s3_dec_q == MD_PROD_SPEC) ? s3_idx_q : s3_row_q.prod_head;
          pb_ms_tgt_o     = s3_sb_tgt_q;
          pb_ms_spec_o    = s3_row_q.spec_head;
          pb_ms_send_at_o = s3_sb_send_at_q;
          sb_tk_en_o      = 1'b1;
          sb_tk_idx_o     = s3_row_q.spec_head;
          row3.spec_head  = s3_sb_next_q;
          if (s3_dec_q == MD_RETRY_SPEC) begin
            row3.prod_head = s3_pb_next_q;
            if (s3_row_q.prod_head == s3_row_q.prod_tail) row3.prod_tail = '0;
          end
          lt_wr_en_o      = 1'b1;
        end
        MD_PROD_MISS: begin
          pb_lk_en_o  = 1'b1;
          pb_lk_idx_o = s3_idx_q;
          if (s3_row_q.prod_tail == '0) row3.prod_head = s3_idx_q;
          else begin
            pb_ln_en_o   = 1'b1;
            pb_ln_idx_o  = s3_row_q.prod_tail;
            pb_ln_next_o = s3_idx_q;
          end
          row3.prod_tail = s3_idx_q;
          if (s3_row_q.spec_head != '0) row3.spec_head = s3_sb_next_q;
          lt_wr_en_o     = 1'b1;
        end
        MD_RETRY_ROT: begin
          row3.spec_head = s3_sb_next_q;
          lt_wr_en_o     = 1'b1;
        end
        MD_SREG: begin
          if (s3_row_q.spec_head == '0) begin
            row3.spec_head = s3_idx_q;
          end else begin
            sb_ln0_en_o   = 1'b1;
            sb_ln0_idx_o  = s3_idx_q;
            sb_ln0_next_o = s3_sb_next_q;
            sb_ln1_en_o   = 1'b1;
            sb_ln1_idx_o  = s3_row_q.spec_head;
            sb_ln1_next_o = s3_idx_q;
          end
          retry_from_sreg = 1'b1;
          lt_wr_en_o      = 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign lt_wr_sqi_o = s3_sqi_q;
  assign lt_wr_row_o = row3;
  assign ev_valid_o  = s3_valid_q && s3_dec_q != MD_NONE;
  assign ev_dec_o    = s3_dec_q;
  assign idle_o      = !s2_valid_q && !s3_valid_q && !sreg_any && !retry_any;

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_valid_q   <= 1'b0;
      s3_valid_q   <= 1'b0;
      rr_cons_q    <= 1'b1;
      sreg_pend_q  <= '0;
      retry_pend_q <= '0;
      s2_kind_q <= MK_PROD; s2_sqi_q <= '0; s2_idx_q <= '0; s2_row_q <= '0;
      s3_dec_q <= MD_NONE; s3_sqi_q <= '0; s3_idx_q <= '0; s3_row_q <= '0;
      s3_cb_tgt_q <= '0; s3_cb_next_q <= '0; s3_pb_next_q <= '0;
      s3_cb_src_q <= '0; s3_sb_src_q <= '0;
      s3_sb_next_q <= '0; s3_sb_tgt_q <= '0; s3_sb_send_at_q <= '0;
      for (int i = 1; i <= SPEC_DEPTH; i++) sreg_sqi_q[i] <= '0;
    end else begin
      // Stage 1 -> 2
      s2_valid_q <= issue;
      s2_kind_q  <= cand_kind;
      s2_sqi_q   <= cand_sqi;
      s2_idx_q   <= cand_idx;
      s2_row_q   <= lt_rd_row_i;
      if (c_pop_o) rr_cons_q <= 1'b0;
      if (p_pop_o) rr_cons_q <= 1'b1;
      // Stage 2 -> 3
      s3_valid_q      <= s2_valid_q;
      s3_dec_q        <= dec2;
      s3_sqi_q        <= s2_sqi_q;
      s3_idx_q        <= s2_idx_q;
      s3_row_q        <= s2_row_q;
      s3_cb_tgt_q     <= cb_rd_tgt_i;
      s3_cb_src_q     <= cb_rd_src_i;
      s3_cb_next_q    <= cb_rd_next_l_i;
      s3_pb_next_q    <= pb_rd_next_l_i;
      s3_sb_next_q    <= sb_rd_next_i;
      s3_sb_tgt_q     <= sb_rd_tgt_i;
      s3_sb_src_q     <= sb_rd_src_i;
      s3_sb_send_at_q <= sb_rd_send_at_i;
      // pending items: clear on issue, set on request (set wins)
      if (issue && cand_kind == MK_SREG)  sreg_pend_q[sreg_pick == '0 ? idx_t'(1) : sreg_pick] <= 1'b0;
      if (issue && cand_kind == MK_RETRY) retry_pend_q[retry_pick] <= 1'b0;
      if (sreg_en_i && sreg_idx_i != '0) begin
        sreg_pend_q[sreg_idx_i] <= 1'b1;
        sreg_sqi_q[sreg_idx_i]  <= sreg_sqi_i;
      end
      if (retry_en_i)      retry_pend_q[retry_sqi_i] <= 1'b1;
      if (retry_from_sreg) retry_pend_q[s3_sqi_q]    <= 1'b1;
    end
  end

  // the write-back never sees both a producer and a consumer list non-empty
  always_ff @(posedge clk) if (rst_n && lt_wr_en_o) begin
    assert (row3.prod_head == '0 || row3.cons_head == '0)
      else $error("linkTab: data and requests buffered on the same SQI");
    assert ((row3.prod_head == '0) == (row3.prod_tail == '0))
      else $error("linkTab: producer list head/tail mismatch");
    assert ((row3.cons_head == '0) == (row3.cons_tail == '0))
      else $error("linkTab: consumer list head/tail mismatch");
  end
endmodule

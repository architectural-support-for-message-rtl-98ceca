// srd: SPAMeR routing device (SRD), the top of this design.
//
// A routing device sits on the coherence network of a multi-core processor
// and implements hardware message queues. Cores address it through device
// memory: a producer's vl_push writes a 64-byte cache line to the address of
// a shared queue identifier (SQI); a consumer's vl_fetch writes the address
// of one of its own cache lines to ask for the next message on an SQI. The
// device buffers lines in prodBuf and requests in consBuf, pairs them per SQI
// in a three-stage address mapping pipeline using the link table, and
// injects each line into the requesting consumer's cache line. The SPAMeR
// extension adds specBuf: consumers register runs of cache lines
// (spamer_register) that may receive data without asking, and a delay
// predictor chooses when such a speculative push is sent.
//
// Interfaces (all synchronous to clk, active-low synchronous reset):
//   in_*   one packet per cycle from the network (always accepted): op,
//          device address, 64-byte payload and the source core. For a push
//          the payload is the line; for a fetch, payload[51:0] is the
//          consumer line address; for a registration, payload[51:6] is the
//          first line and payload[5:0] the number of lines (0 = 64).
//   ack_*  one cycle after each packet addressed to this device, the status
//          for the source core's Rs register: ST_OK, ST_FULL (no buffer
//          slot) or ST_INVALID. Packets for other devices are ignored.
//   out_*  cache-line injection toward a consumer line (valid/ready): line
//          address, the consumer's core (the source of its fetch or
//          registration) for the directed network transfer, the prodBuf
//          slot as tag and a flag for speculative pushes.
//   pr_*   the target cache's answer for a tag: hit = line written; miss =
//          line not pushable or still full, the data is mapped again.
//   cfg_alg_i selects the delay prediction algorithm (ALG_TUNED default use).
//   ev_*   observation of pipeline decisions and interlock stalls.
// Latency: a push that meets a waiting request is offered on out_* four
// cycles after it is accepted (list entry, Stages 1-3, sending queue).
// The structures, the pipeline and the speculation path follow the
// documented design, and so does recording the consumer's core with each
// request; packet formats, status codes and the handling of push
// answers for on-demand pushes (the request is dropped and must be issued
// again) are this design's choices.
module srd
  import vl_pkg::*;
#(
  parameter int unsigned NUM_SQI    = 64,
  parameter int unsigned PROD_DEPTH = 64,
  parameter int unsigned CONS_DEPTH = 64,
  parameter int unsigned SPEC_DEPTH = 64,
  parameter int unsigned RD_BITS    = 4,
  parameter logic [RD_BITS-1:0] RD_ID = '0,
  parameter int unsigned ZETA  = 128,
  parameter int unsigned TAU   = 48,
  parameter int unsigned DELTA = 32,
  parameter int unsigned ALPHA = 1,
  parameter int unsigned BETA  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  spec_alg_e   cfg_alg_i,
  // packets from the coherence network
  input  logic        in_valid_i,
  output logic        in_ready_o,
  input  net_op_e     in_op_i,
  input  pa_t         in_addr_i,
  input  line_t       in_data_i,
  input  src_t        in_src_i,
  // status back to the issuing core
  output logic        ack_valid_o,
  output src_t        ack_dst_o,
  output req_kind_e   ack_kind_o,
  output ack_status_e ack_status_o,
  // data injection toward consumer cache lines
  output logic        out_valid_o,
  input  logic        out_ready_i,
  output pa_t         out_addr_o,
  output line_t       out_data_o,
  output src_t        out_dst_o,
  output idx_t        out_tag_o,
  output logic        out_spec_o,
  // answers of the consumer caches
  input  logic        pr_valid_i,
  input  idx_t        pr_tag_i,
  input  logic        pr_hit_i,
  // observation
  output ts_t         tsc_o,
  output logic        ev_stall_o,
  output logic        ev_valid_o,
  output map_dec_e    ev_dec_o,
  output logic        idle_o
);
  // ---------------- time stamp counter ----------------
  ts_t tsc_q;
  always_ff @(posedge clk) tsc_q <= rst_n ? tsc_q + 1'b1 : '0;
  assign tsc_o = tsc_q;

  // ---------------- address decode ----------------
  logic      dec_hit;
  req_kind_e dec_kind;
  sqi_t      dec_sqi;

  vlrd_addr_decode #(
    .NUM_SQI(NUM_SQI), .SQI_BITS(SQI_W), .RD_BITS(RD_BITS), .RD_ID(RD_ID)
  ) u_dec (
    .valid_i(in_valid_i), .op_i(in_op_i), .addr_i(in_addr_i),
    .hit_o(dec_hit), .kind_o(dec_kind), .sqi_o(dec_sqi),
    .page_o(), .offset_o()
  );

  assign in_ready_o = 1'b1;

  // ---------------- wires between the structures ----------------
  link_row_t lt_rd_row, lt_wr_row;
  sqi_t      lt_rd_sqi, lt_wr_sqi;
  logic      lt_wr_en;

  logic cb_in_ready, cb_head_valid, cb_pop, cb_ln_en;
  idx_t cb_head_idx, cb_rd_idx, cb_rd_next_l, cb_ln_idx, cb_ln_next;
  sqi_t cb_head_sqi;
  pa_t  cb_rd_tgt;
  src_t cb_rd_src, sb_rd_src, pb_mo_dst, pb_ms_dst;

  logic pb_in_ready, pb_head_valid, pb_pop, pb_ln_en, pb_lk_en, pb_mo_en, pb_ms_en;
  idx_t pb_head_idx, pb_rd_idx, pb_rd_next_l, pb_ln_idx, pb_ln_next, pb_lk_idx;
  idx_t pb_mo_idx, pb_mo_mapped, pb_ms_idx, pb_ms_spec;
  sqi_t pb_head_sqi;
  pa_t  pb_mo_tgt, pb_ms_tgt;
  ts_t  pb_ms_send_at;
  logic rsp_is_spec, rsp_sent;
  idx_t rsp_mapped, rsp_spec;
  sqi_t rsp_sqi;

  logic sb_rg_ready, sb_rd_valid, sb_rd_on_fly, sb_ln0_en, sb_ln1_en, sb_tk_en;
  idx_t sb_rg_idx, sb_rd_idx, sb_rd_next, sb_ln0_idx, sb_ln0_next, sb_ln1_idx, sb_ln1_next;
  idx_t sb_tk_idx;
  pa_t  sb_rd_tgt;
  ts_t  sb_rd_send_at;

  logic is_push, is_fetch, is_sreg;
  assign is_push  = in_valid_i && dec_kind == RQ_PUSH;
  assign is_fetch = in_valid_i && dec_kind == RQ_FETCH;
  assign is_sreg  = in_valid_i && dec_kind == RQ_SREG;

  // answers: spec answers update specBuf and retry the SQI; on-demand
  // answers release the consBuf slot of the request they served
  logic rs_spec, rs_dem;
  assign rs_spec = pr_valid_i && rsp_sent && rsp_is_spec;
  assign rs_dem  = pr_valid_i && rsp_sent && !rsp_is_spec;

  // ---------------- structures ----------------
  vlrd_link_tab #(.NUM_SQI(NUM_SQI)) u_link_tab (
    .clk, .rst_n,
    .rd_sqi_i(lt_rd_sqi), .rd_row_o(lt_rd_row),
    .wr_en_i(lt_wr_en), .wr_sqi_i(lt_wr_sqi), .wr_row_i(lt_wr_row)
  );

  vlrd_cons_buf #(.DEPTH(CONS_DEPTH)) u_cons_buf (
    .clk, .rst_n,
    .in_valid_i(is_fetch), .in_sqi_i(dec_sqi), .in_tgt_i(in_data_i[ADDR_W-1:0]),
    .in_src_i(in_src_i),
    .in_ready_o(cb_in_ready),
    .head_valid_o(cb_head_valid), .head_idx_o(cb_head_idx), .head_sqi_o(cb_head_sqi),
    .pop_i(cb_pop),
    .rd_idx_i(cb_rd_idx), .rd_tgt_o(cb_rd_tgt), .rd_src_o(cb_rd_src), .rd_next_l_o(cb_rd_next_l),
    .ln_en_i(cb_ln_en), .ln_idx_i(cb_ln_idx), .ln_next_i(cb_ln_next),
    .fr_en_i(rs_dem), .fr_idx_i(rsp_mapped),
    .used_o()
  );

  vlrd_prod_buf #(.DEPTH(PROD_DEPTH)) u_prod_buf (
    .clk, .rst_n, .tsc_i(tsc_q),
    .in_valid_i(is_push), .in_sqi_i(dec_sqi), .in_data_i(in_data_i),
    .in_ready_o(pb_in_ready),
    .head_valid_o(pb_head_valid), .head_idx_o(pb_head_idx), .head_sqi_o(pb_head_sqi),
    .pop_i(pb_pop),
    .rd_idx_i(pb_rd_idx), .rd_next_l_o(pb_rd_next_l),
    .ln_en_i(pb_ln_en), .ln_idx_i(pb_ln_idx), .ln_next_i(pb_ln_next),
    .lk_en_i(pb_lk_en), .lk_idx_i(pb_lk_idx),
    .mo_en_i(pb_mo_en), .mo_idx_i(pb_mo_idx), .mo_tgt_i(pb_mo_tgt), .mo_dst_i(pb_mo_dst), .mo_mapped_i(pb_mo_mapped),
    .ms_en_i(pb_ms_en), .ms_idx_i(pb_ms_idx), .ms_tgt_i(pb_ms_tgt), .ms_dst_i(pb_ms_dst), .ms_spec_i(pb_ms_spec),
    .ms_send_at_i(pb_ms_send_at),
    .out_valid_o(out_valid_o), .out_ready_i(out_ready_i), .out_idx_o(out_tag_o),
    .out_tgt_o(out_addr_o), .out_dst_o(out_dst_o), .out_data_o(out_data_o), .out_spec_o(out_spec_o),
    .rsp_en_i(pr_valid_i), .rsp_idx_i(pr_tag_i), .rsp_hit_i(pr_hit_i),
    .rsp_is_spec_o(rsp_is_spec), .rsp_mapped_o(rsp_mapped), .rsp_spec_o(rsp_spec),
    .rsp_sqi_o(rsp_sqi), .rsp_sent_o(rsp_sent),
    .used_o()
  );

  srd_spec_buf #(
    .DEPTH(SPEC_DEPTH), .ZETA(ZETA), .TAU(TAU), .DELTA(DELTA), .ALPHA(ALPHA), .BETA(BETA)
  ) u_spec_buf (
    .clk, .rst_n, .tsc_i(tsc_q), .alg_i(cfg_alg_i),
    .rg_valid_i(is_sreg), .rg_base_i(in_data_i[ADDR_W-1:0]),
    .rg_len_i(in_data_i[LEN_W-1:0]), .rg_src_i(in_src_i), .rg_ready_o(sb_rg_ready), .rg_idx_o(sb_rg_idx),
    .rd_idx_i(sb_rd_idx), .rd_valid_o(sb_rd_valid), .rd_on_fly_o(sb_rd_on_fly),
    .rd_next_o(sb_rd_next), .rd_tgt_o(sb_rd_tgt), .rd_src_o(sb_rd_src), .rd_send_at_o(sb_rd_send_at),
    .ln0_en_i(sb_ln0_en), .ln0_idx_i(sb_ln0_idx), .ln0_next_i(sb_ln0_next),
    .ln1_en_i(sb_ln1_en), .ln1_idx_i(sb_ln1_idx), .ln1_next_i(sb_ln1_next),
    .tk_en_i(sb_tk_en), .tk_idx_i(sb_tk_idx),
    .rs_en_i(rs_spec), .rs_idx_i(rsp_spec), .rs_hit_i(pr_hit_i),
    .used_o()
  );

  srd_map_pipeline #(.NUM_SQI(NUM_SQI), .SPEC_DEPTH(SPEC_DEPTH)) u_pipe (
    .clk, .rst_n,
    .c_valid_i(cb_head_valid), .c_idx_i(cb_head_idx), .c_sqi_i(cb_head_sqi), .c_pop_o(cb_pop),
    .p_valid_i(pb_head_valid), .p_idx_i(pb_head_idx), .p_sqi_i(pb_head_sqi), .p_pop_o(pb_pop),
    .sreg_en_i(is_sreg && sb_rg_ready), .sreg_idx_i(sb_rg_idx), .sreg_sqi_i(dec_sqi),
    .retry_en_i(rs_spec), .retry_sqi_i(rsp_sqi),
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
    .ev_stall_o(ev_stall_o), .ev_valid_o(ev_valid_o), .ev_dec_o(ev_dec_o), .idle_o(idle_o)
  );

  // ---------------- status back to the core ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_valid_o  <= 1'b0;
      ack_dst_o    <= '0;
      ack_kind_o   <= RQ_NONE;
      ack_status_o <= ST_OK;
    end else begin
      ack_valid_o <= in_valid_i && dec_hit;
      ack_dst_o   <= in_src_i;
      ack_kind_o  <= dec_kind;
      unique case (dec_kind)
        RQ_PUSH:  ack_status_o <= pb_in_ready ? ST_OK : ST_FULL;
        RQ_FETCH: ack_status_o <= cb_in_ready ? ST_OK : ST_FULL;
        RQ_SREG:  ack_status_o <= sb_rg_ready ? ST_OK : ST_FULL;
        default:  ack_status_o <= ST_INVALID;
      endcase
    end
  end

  always_ff @(posedge clk) if (rst_n) begin
    assert (!pr_valid_i || rsp_sent) else $error("srd: answer for a tag that was not sent");
  end
endmodule

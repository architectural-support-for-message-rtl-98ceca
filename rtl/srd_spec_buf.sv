// srd_spec_buf: the speculation buffer (specBuf) added by SPAMeR.
//
// Each entry (1..DEPTH, 0 = NULL) registers a run of `len` consecutive
// consumer cache lines starting at `base` that may receive speculative
// pushes for one SQI, and the core that registered them (the destination
// of those pushes). `offset` selects the line that receives the next push:
// the target is base + offset * 64 B, and offset advances by one after every
// successful push to the entry, wrapping to zero at len (len = 0 means 64
// lines). The entries of one SQI form a circular list through `next`; the
// link table's specHead points into it and is advanced after each use so the
// entries take turns. `on_fly` is set while a push to the entry is under way;
// such an entry offers no target (throttling). Each entry also keeps the
// history of the delay prediction algorithm (see srd_delay_predictor).
// Ports:
//   rg_*  registration (spamer_register): takes a free slot, returned as
//         rg_idx_o in the same cycle; the new entry points to itself.
//   rd_*  combinational read for Stage 2 of the mapping pipeline, including
//         the predicted send time for the read entry at time tsc.
//   ln_*  two link writes for Stage 3 (insert into a SQI loop).
//   tk_*  Stage 3 marks an entry on_fly when it supplies a target.
//   rs_*  answer to a speculative push: clears on_fly, advances offset on a
//         hit and updates the prediction history.
// Synchronous active-low reset empties the buffer.
module srd_spec_buf
  import vl_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned ZETA  = 128,
  parameter int unsigned TAU   = 48,
  parameter int unsigned DELTA = 32,
  parameter int unsigned ALPHA = 1,
  parameter int unsigned BETA  = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ts_t       tsc_i,
  input  spec_alg_e alg_i,
  // registration
  input  logic      rg_valid_i,
  input  pa_t       rg_base_i,     // line address; bits [5:0] ignored
  input  len_t      rg_len_i,
  input  src_t      rg_src_i,      // registering core (injection destination)
  output logic      rg_ready_o,
  output idx_t      rg_idx_o,
  // Stage 2 read
  input  idx_t      rd_idx_i,
  output logic      rd_valid_o,
  output logic      rd_on_fly_o,
  output idx_t      rd_next_o,
  output pa_t       rd_tgt_o,
  output src_t      rd_src_o,
  output ts_t       rd_send_at_o,
  // Stage 3 link writes
  input  logic      ln0_en_i,
  input  idx_t      ln0_idx_i,
  input  idx_t      ln0_next_i,
  input  logic      ln1_en_i,
  input  idx_t      ln1_idx_i,
  input  idx_t      ln1_next_i,
  // Stage 3 take
  input  logic      tk_en_i,
  input  idx_t      tk_idx_i,
  // push answer
  input  logic      rs_en_i,
  input  idx_t      rs_idx_i,
  input  logic      rs_hit_i,
  output logic [IDX_W-1:0] used_o
);
  localparam int unsigned LBASE_W = ADDR_W - LINE_OFF_W;

  logic [DEPTH:1]     valid_q;
  logic [DEPTH:1]     on_fly_q;
  logic [LBASE_W-1:0] base_q   [DEPTH:1];
  len_t               len_q    [DEPTH:1];
  len_t               offset_q [DEPTH:1];
  idx_t               next_q   [DEPTH:1];
  src_t               src_q    [DEPTH:1];
  pred_state_t        pred_q   [DEPTH:1];

  idx_t           free_slot;
  logic           alloc;
  idx_t           rd_i, rs_i;
  pred_state_t    rs_upd;
  ts_t            unused_send_at;
  len_t           off_inc;

  function automatic idx_t nz(idx_t i);
    return (i == '0) ? idx_t'(1) : i;
  endfunction

  rr_free_finder #(.DEPTH(DEPTH), .IDX_W(IDX_W)) u_free (
    .free_i(~valid_q), .start_i(idx_t'(1)), .slot_o(free_slot)
  );

  assign rg_ready_o = (free_slot != '0);
  assign rg_idx_o   = free_slot;
  assign alloc      = rg_valid_i && rg_ready_o;

  assign rd_i        = nz(rd_idx_i);
  assign rd_valid_o  = (rd_idx_i != '0) && valid_q[rd_i];
  assign rd_on_fly_o = on_fly_q[rd_i];
  assign rd_next_o   = next_q[rd_i];
  assign rd_tgt_o    = {base_q[rd_i] + LBASE_W'(offset_q[rd_i]), LINE_OFF_W'(0)};
  assign rd_src_o    = src_q[rd_i];

  srd_delay_predictor #(
    .ZETA(ZETA), .TAU(TAU), .DELTA(DELTA), .ALPHA(ALPHA), .BETA(BETA)
  ) u_lookup (
    .alg_i(alg_i), .tsc_i(tsc_i), .st_i(pred_q[rd_i]), .send_at_o(rd_send_at_o),
    .hit_i(1'b0), .st_upd_o()
  );

  assign rs_i = nz(rs_idx_i);

  srd_delay_predictor #(
    .ZETA(ZETA), .TAU(TAU), .DELTA(DELTA), .ALPHA(ALPHA), .BETA(BETA)
  ) u_update (
    .alg_i(alg_i), .tsc_i(tsc_i), .st_i(pred_q[rs_i]), .send_at_o(unused_send_at),
    .hit_i(rs_hit_i), .st_upd_o(rs_upd)
  );

  always_comb begin
    off_inc = offset_q[rs_i] + 1'b1;
    if (off_inc == len_q[rs_i]) off_inc = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q  <= '0;
      on_fly_q <= '0;
      for (int i = 1; i <= DEPTH; i++) begin
        base_q[i]   <= '0;
        len_q[i]    <= '0;
        offset_q[i] <= '0;
        next_q[i]   <= '0;
        src_q[i]    <= '0;
        pred_q[i]   <= '0;
      end
    end else begin
      if (alloc) begin
        valid_q[free_slot]  <= 1'b1;
        on_fly_q[free_slot] <= 1'b0;
        base_q[free_slot]   <= rg_base_i[ADDR_W-1:LINE_OFF_W];
        len_q[free_slot]    <= rg_len_i;
        offset_q[free_slot] <= '0;
        next_q[free_slot]   <= free_slot;
        src_q[free_slot]    <= rg_src_i;
        pred_q[free_slot]   <= '0;
      end
      if (ln0_en_i && ln0_idx_i != '0) next_q[ln0_idx_i] <= ln0_next_i;
      if (ln1_en_i && ln1_idx_i != '0) next_q[ln1_idx_i] <= ln1_next_i;
      if (tk_en_i && tk_idx_i != '0) on_fly_q[tk_idx_i] <= 1'b1;
      if (rs_en_i && rs_idx_i != '0) begin
        on_fly_q[rs_i] <= 1'b0;
        pred_q[rs_i]   <= rs_upd;
        if (rs_hit_i) offset_q[rs_i] <= off_inc;
      end
    end
  end

  always_comb begin
    used_o = '0;
    for (int i = 1; i <= DEPTH; i++) used_o += idx_t'(valid_q[i]);
  end

  initial assert (DEPTH < (1 << IDX_W)) else $error("DEPTH does not fit IDX_W");

  always_ff @(posedge clk) if (rst_n) begin
    assert (!tk_en_i || !on_fly_q[nz(tk_idx_i)]) else $error("specBuf: entry already on_fly");
    assert (!rs_en_i || on_fly_q[rs_i]) else $error("specBuf: answer for an idle entry");
  end
endmodule

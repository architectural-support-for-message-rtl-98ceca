// vlrd_cons_buf: the Consumer Buffer (consBuf) of the routing device.
//
// Each slot (1..DEPTH, 0 = NULL) buffers one consumer request: the SQI it
// asks data from, consTgt, the physical address of the consumer's cache
// line that will receive the data, and the core that asked (its core id is
// registered with the request so the injection can be directed to it). Slots are shared by all SQIs and are used
// out of order, so two singly linked lists thread through them:
//   nextIn  orders requests by arrival; CIHR/CITR are its head and tail and
//           it feeds the address mapping pipeline (head_* / pop_i).
//   nextL   links requests of one SQI that found no producer data; the head
//           and tail of each such list live in the link table. The pipeline
//           reads a slot through rd_* and writes a link through ln_*.
// CIFR, the Consumer Input Free Register, names the slot the next request
// will take; it stays put while its slot is free and otherwise moves to the
// next free slot below it, wrapping to the top. A slot stays valid after it
// is mapped to producer data and is released through fr_* once the push to
// its consumer has been answered.
// Timing: a request accepted in cycle t (in_valid_i && in_ready_o) is
// visible at the list head from cycle t+1. All outputs except the head are
// combinational reads. Synchronous active-low reset empties the buffer.
module vlrd_cons_buf
  import vl_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic clk,
  input  logic rst_n,
  // arrival of a consumer request
  input  logic in_valid_i,
  input  sqi_t in_sqi_i,
  input  pa_t  in_tgt_i,
  input  src_t in_src_i,           // requesting core (injection destination)
  output logic in_ready_o,        // a free slot exists
  // head of the input list (CIHR)
  output logic head_valid_o,
  output idx_t head_idx_o,
  output sqi_t head_sqi_o,
  input  logic pop_i,
  // read port (Stage 2)
  input  idx_t rd_idx_i,
  output pa_t  rd_tgt_o,
  output src_t rd_src_o,
  output idx_t rd_next_l_o,
  // link write port (Stage 3): nextL[ln_idx] = ln_next
  input  logic ln_en_i,
  input  idx_t ln_idx_i,
  input  idx_t ln_next_i,
  // release of a slot after its push completed
  input  logic fr_en_i,
  input  idx_t fr_idx_i,
  // occupancy
  output logic [IDX_W-1:0] used_o
);
  logic [DEPTH:1] valid_q;
  sqi_t           sqi_q     [DEPTH:1];
  pa_t            tgt_q     [DEPTH:1];
  src_t           src_q     [DEPTH:1];
  idx_t           next_in_q [DEPTH:1];
  idx_t           next_l_q  [DEPTH:1];
  idx_t           cihr_q, citr_q, cifr_q;

  logic           alloc;
  logic [DEPTH:1] valid_d;
  idx_t           cifr_d, cihr_d, citr_d;

  assign in_ready_o   = (cifr_q != '0) && !valid_q[cifr_q];
  assign alloc        = in_valid_i && in_ready_o;
  assign head_valid_o = (cihr_q != '0);
  assign head_idx_o   = cihr_q;
  assign head_sqi_o   = sqi_q[cihr_q == '0 ? idx_t'(1) : cihr_q];
  assign rd_tgt_o     = tgt_q[rd_idx_i == '0 ? idx_t'(1) : rd_idx_i];
  assign rd_src_o     = src_q[rd_idx_i == '0 ? idx_t'(1) : rd_idx_i];
  assign rd_next_l_o  = next_l_q[rd_idx_i == '0 ? idx_t'(1) : rd_idx_i];

  always_comb begin
    valid_d = valid_q;
    if (fr_en_i && fr_idx_i != '0) valid_d[fr_idx_i] = 1'b0;
    if (alloc)                     valid_d[cifr_q]   = 1'b1;
  end

  rr_free_finder #(.DEPTH(DEPTH), .IDX_W(IDX_W)) u_cifr (
    .free_i(~valid_d), .start_i(cifr_q), .slot_o(cifr_d)
  );

  // input list: pop first, then append the new request
  always_comb begin
    cihr_d = cihr_q;
    citr_d = citr_q;
    if (pop_i && cihr_q != '0) begin
      cihr_d = next_in_q[cihr_q];
      if (cihr_q == citr_q) citr_d = '0;
    end
    if (alloc) begin
      if (citr_d == '0) cihr_d = cifr_q;
      citr_d = cifr_q;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      cihr_q  <= '0;
      citr_q  <= '0;
      cifr_q  <= idx_t'(1);
      for (int i = 1; i <= DEPTH; i++) begin
        next_in_q[i] <= '0;
        next_l_q[i]  <= '0;
        sqi_q[i]     <= '0;
        tgt_q[i]     <= '0;
        src_q[i]     <= '0;
      end
    end else begin
      valid_q <= valid_d;
      cifr_q  <= cifr_d;
      cihr_q  <= cihr_d;
      citr_q  <= citr_d;
      if (ln_en_i && ln_idx_i != '0) next_l_q[ln_idx_i] <= ln_next_i;
      if (alloc) begin
        sqi_q[cifr_q]     <= in_sqi_i;
        tgt_q[cifr_q]     <= in_tgt_i;
        src_q[cifr_q]     <= in_src_i;
        next_in_q[cifr_q] <= '0;
        next_l_q[cifr_q]  <= '0;
        // link behind the old tail unless the list was emptied by the pop
        if (!(pop_i && cihr_q == citr_q) && citr_q != '0)
          next_in_q[citr_q] <= cifr_q;
      end
    end
  end

  always_comb begin
    used_o = '0;
    for (int i = 1; i <= DEPTH; i++) used_o += idx_t'(valid_q[i]);
  end

  initial assert (DEPTH < (1 << IDX_W)) else $error("DEPTH does not fit IDX_W");

  // a popped head must exist; a link write never targets NULL
  always_ff @(posedge clk) if (rst_n) begin
    assert (!pop_i || cihr_q != '0) else $error("consBuf: pop of an empty input list");
    assert (!fr_en_i || valid_q[fr_idx_i == '0 ? idx_t'(1) : fr_idx_i])
      else $error("consBuf: release of a free slot");
  end
endmodule

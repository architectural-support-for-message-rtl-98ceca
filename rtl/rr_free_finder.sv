// rr_free_finder: round-robin search for a free buffer slot.
//
// Used for the Consumer/Producer Input Free Registers (CIFR, PIFR) and the
// specBuf allocator. Slots are numbered 1..DEPTH (0 = none). Given the
// current free-register value `start` and a vector of free slots, it returns
// the first free slot at or after `start`, wrapping from the bottom slot back
// to slot 1, so the free register keeps its value while its slot stays free
// and otherwise moves forward to the next free slot. Purely combinational.
module rr_free_finder #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned IDX_W = 7
) (
  input  logic [DEPTH:1]   free_i,   // 1 = slot is free
  input  logic [IDX_W-1:0] start_i,  // search origin (0 is treated as 1)
  output logic [IDX_W-1:0] slot_o    // first free slot, 0 if none
);
  always_comb begin
    int unsigned s;
    int unsigned cand;
    logic found;
    s = (start_i == '0 || int'(start_i) > DEPTH) ? 1 : int'(start_i);
    slot_o = '0;
    found  = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      cand = ((s - 1 + i) % DEPTH) + 1;
      if (!found && free_i[cand]) begin
        slot_o = IDX_W'(cand);
        found  = 1'b1;
      end
    end
  end
endmodule

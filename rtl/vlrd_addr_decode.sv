// vlrd_addr_decode: classifies a packet arriving at the routing device from
// the coherence network by its device-memory physical address.
//
// Address layout (bit 0 = LSB):
//   [11:0]        byte offset inside a 4 KiB endpoint page (64 B granules)
//   [17:12]       page number per SQI; bit 17 selects the specBuf range
//   [N:18]        shared queue identifier (SQI), N = 17 + SQI_BITS
//   [J:N+1]       router id, J = N + RD_BITS, for systems with several routers
//   [ADDR_W-1:J+1] device space tag that marks the window as router memory
// A vl_push (write with data) becomes a producer push; a vl_fetch (write of
// a target line address) becomes a consumer request, or a speculation
// target registration (spamer_register) when the page's top bit is set.
// The field positions follow the documented layout; using page bit 17 for
// the specBuf range is this design's choice (only 32 of the 64 page numbers
// are used for endpoints). Purely combinational.
module vlrd_addr_decode
  import vl_pkg::*;
#(
  parameter int unsigned NUM_SQI  = 64,
  parameter int unsigned SQI_BITS = 6,                      // ceil(log2(NUM_SQI))
  parameter int unsigned RD_BITS  = 4,
  parameter logic [RD_BITS-1:0] RD_ID = '0,
  parameter int unsigned SPACE_W  = ADDR_W - 18 - SQI_BITS - RD_BITS,
  parameter logic [SPACE_W-1:0] SPACE_TAG = SPACE_W'(1) << (SPACE_W - 1)
) (
  input  logic      valid_i,
  input  net_op_e   op_i,
  input  pa_t       addr_i,
  output logic      hit_o,       // packet addresses this router
  output req_kind_e kind_o,
  output sqi_t      sqi_o,
  output logic [5:0]  page_o,
  output logic [11:0] offset_o
);
  localparam int unsigned N = 17 + SQI_BITS;
  localparam int unsigned J = N + RD_BITS;

  logic [SQI_BITS-1:0] sqi_f;
  logic                space_ok, rd_ok, sqi_ok, spec_rng;

  always_comb begin
    sqi_f    = addr_i[N:18];
    space_ok = (addr_i[ADDR_W-1:J+1] == SPACE_TAG);
    rd_ok    = (addr_i[J:N+1] == RD_ID);
    sqi_ok   = (int'(sqi_f) < NUM_SQI);
    spec_rng = addr_i[17];
    page_o   = addr_i[17:12];
    offset_o = addr_i[11:0];
    sqi_o    = sqi_t'(sqi_f);
    hit_o    = valid_i && space_ok && rd_ok;
    kind_o   = RQ_NONE;
    if (hit_o && sqi_ok) begin
      unique case (op_i)
        OP_PUSH:  kind_o = spec_rng ? RQ_NONE : RQ_PUSH;
        OP_FETCH: kind_o = spec_rng ? RQ_SREG : RQ_FETCH;
        default:  kind_o = RQ_NONE;
      endcase
    end
  end

  initial begin
    assert (SQI_BITS <= SQI_W) else $error("SQI_BITS exceeds the SQI type width");
    assert (NUM_SQI <= (1 << SQI_BITS)) else $error("NUM_SQI does not fit SQI_BITS");
  end
endmodule

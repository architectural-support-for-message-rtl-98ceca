// vl_pkg: types and constants shared by the SPAMeR routing device (SRD) and
// the Virtual-Link routing device structures it contains.
//
// Buffer entries are numbered 1..DEPTH and index 0 means NULL, as in the
// linked-list pointers of the link table (consHead == 0 means "no consumer
// request"). IDX_W = 7 bits therefore allows up to 127 entries per buffer;
// the default configuration uses 64 entries per prodBuf, consBuf, linkTab
// and specBuf. A cache line is 64 bytes (512 bits). Physical addresses are
// 52 bits wide (bits 51..0 of the device-memory address layout).
// Timestamps are 32-bit values of a free-running cycle counter (tsc).
package vl_pkg;

  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned LINE_OFF_W = 6;           // log2(LINE_BYTES)
  localparam int unsigned DATA_W     = 8 * LINE_BYTES;
  localparam int unsigned ADDR_W     = 52;
  localparam int unsigned IDX_W      = 7;           // entry index, 0 = NULL
  localparam int unsigned SQI_W      = 6;           // up to 64 shared queues
  localparam int unsigned TS_W       = 32;
  localparam int unsigned NF_W       = 8;           // saturating fill counter
  localparam int unsigned SRC_W      = 4;           // requesting core id (16 cores)
  localparam int unsigned LEN_W      = 6;           // cache lines per specBuf entry

  typedef logic [IDX_W-1:0]  idx_t;
  typedef logic [SQI_W-1:0]  sqi_t;
  typedef logic [ADDR_W-1:0] pa_t;
  typedef logic [DATA_W-1:0] line_t;
  typedef logic [TS_W-1:0]   ts_t;
  typedef logic [SRC_W-1:0]  src_t;
  typedef logic [LEN_W-1:0]  len_t;

  // Operation carried by a packet from the coherence network.
  typedef enum logic [0:0] {
    OP_PUSH  = 1'b0,   // vl_push: cache-line write with data
    OP_FETCH = 1'b1    // vl_fetch / spamer_register: write of a target line address
  } net_op_e;

  // Classified request after address decoding.
  typedef enum logic [1:0] {
    RQ_NONE  = 2'd0,   // not for this router, or malformed
    RQ_PUSH  = 2'd1,   // producer data for prodBuf
    RQ_FETCH = 2'd2,   // consumer request for consBuf
    RQ_SREG  = 2'd3    // speculation target registration for specBuf
  } req_kind_e;

  // Status returned to the issuing core (written to Rs; zero = success).
  typedef enum logic [1:0] {
    ST_OK      = 2'd0,
    ST_FULL    = 2'd1,  // no buffering capacity
    ST_INVALID = 2'd2   // malformed request
  } ack_status_e;

  // Delay prediction algorithm for speculative pushes.
  typedef enum logic [1:0] {
    ALG_ODELAY = 2'd0,
    ALG_ADAPT  = 2'd1,
    ALG_TUNED  = 2'd2
  } spec_alg_e;

  // Kind of item flowing through the address mapping pipeline.
  typedef enum logic [1:0] {
    MK_PROD  = 2'd0,   // producer data from the prodBuf IN list
    MK_CONS  = 2'd1,   // consumer request from the consBuf input list
    MK_SREG  = 2'd2,   // link a newly registered specBuf entry into its SQI loop
    MK_RETRY = 2'd3    // re-try speculation for data buffered on an SQI
  } map_kind_e;

  // Mapping decision taken in Stage 2 and carried out in Stage 3.
  typedef enum logic [3:0] {
    MD_NONE       = 4'd0,
    MD_CONS_HIT   = 4'd1,  // request meets buffered producer data
    MD_CONS_MISS  = 4'd2,  // request appended to its SQI's consumer list
    MD_PROD_HIT   = 4'd3,  // data meets a buffered consumer request
    MD_PROD_SPEC  = 4'd4,  // data takes a speculation target
    MD_PROD_MISS  = 4'd5,  // data appended to its SQI's producer list
    MD_RETRY_SPEC = 4'd6,  // buffered data leaves its list for a speculation target
    MD_RETRY_ROT  = 4'd7,  // target busy: only advance specHead
    MD_SREG       = 4'd8   // new specBuf entry linked into its SQI loop
  } map_dec_e;

  // Life cycle of a prodBuf entry.
  typedef enum logic [2:0] {
    PB_FREE = 3'd0,
    PB_IN   = 3'd1,    // IN partition: waiting for address mapping
    PB_LINK = 3'd2,    // LINK partition: buffered on its SQI list
    PB_OUT  = 3'd3,    // OUT partition: mapped to a consumer request
    PB_SPEC = 3'd4,    // speculative push queue: waiting for its send time
    PB_SENT = 3'd5     // injected, waiting for the target cache's response
  } pb_state_e;

  // One row of the link table (linkTab extended with specHead).
  typedef struct packed {
    idx_t prod_head;
    idx_t prod_tail;
    idx_t cons_head;
    idx_t cons_tail;
    idx_t spec_head;
  } link_row_t;

  // Per-specBuf-entry history used by the delay prediction algorithms.
  typedef struct packed {
    ts_t             delay;
    ts_t             ddl;
    ts_t             last;
    logic [NF_W-1:0] nfills;
    logic            failed;
  } pred_state_t;

endpackage

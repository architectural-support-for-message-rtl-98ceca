// vlrd_link_tab: the link table (linkTab) of the routing device, one row per
// shared queue identifier (SQI).
//
// Each row holds the head and tail of the SQI's producer-data list in
// prodBuf, the head and tail of its consumer-request list in consBuf, and
// specHead, the specBuf entry that supplies the next speculation target.
// Index 0 means an empty list. The table has one combinational read port,
// used by Stage 1 of the address mapping pipeline, and one write port, used
// by Stage 3. A write to the row being read in the same cycle is forwarded
// to the read data (write-first), which resolves the read-after-write case
// where consecutive pipeline items share an SQI. All rows are empty after
// reset (reset is synchronous and active low).
module vlrd_link_tab
  import vl_pkg::*;
#(
  parameter int unsigned NUM_SQI = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  input  sqi_t      rd_sqi_i,
  output link_row_t rd_row_o,
  input  logic      wr_en_i,
  input  sqi_t      wr_sqi_i,
  input  link_row_t wr_row_i
);
  link_row_t rows [NUM_SQI];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_SQI; i++) rows[i] <= '0;
    end else if (wr_en_i) begin
      rows[wr_sqi_i] <= wr_row_i;
    end
  end

  always_comb begin
    if (wr_en_i && wr_sqi_i == rd_sqi_i) rd_row_o = wr_row_i;
    else                                 rd_row_o = rows[rd_sqi_i];
  end

  initial assert (NUM_SQI <= (1 << SQI_W)) else $error("NUM_SQI exceeds SQI_W");
endmodule

// tb_vlrd_link_tab: random reads and writes of the link table compared with
// a reference array, including same-cycle write-then-read forwarding and
// the empty rows after reset.
module tb_vlrd_link_tab;
  import vl_pkg::*;

  localparam int NUM_SQI = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  sqi_t      rd_sqi, wr_sqi;
  link_row_t rd_row, wr_row;
  logic      wr_en;

  vlrd_link_tab #(.NUM_SQI(NUM_SQI)) dut (
    .clk, .rst_n, .rd_sqi_i(rd_sqi), .rd_row_o(rd_row),
    .wr_en_i(wr_en), .wr_sqi_i(wr_sqi), .wr_row_i(wr_row)
  );

  int checks = 0, failures = 0;
  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  link_row_t model [NUM_SQI];
  link_row_t exp_row;

  initial begin
    wr_en = 1'b0; rd_sqi = '0; wr_sqi = '0; wr_row = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < NUM_SQI; i++) begin
      rd_sqi = sqi_t'(i);
      #1 check(rd_row == '0, $sformatf("row %0d not empty after reset", i));
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      wr_en  = ($urandom_range(0, 1) == 1);
      wr_sqi = sqi_t'($urandom_range(0, NUM_SQI - 1));
      wr_row = link_row_t'({$urandom(), $urandom()});
      rd_sqi = ($urandom_range(0, 3) == 0) ? wr_sqi : sqi_t'($urandom_range(0, NUM_SQI - 1));
      #1;
      exp_row = (wr_en && wr_sqi == rd_sqi) ? wr_row : model[rd_sqi];
      check(rd_row == exp_row, $sformatf("row %0d read %h, expected %h", rd_sqi, rd_row, exp_row));
      @(posedge clk);
      if (wr_en) model[wr_sqi] = wr_row;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vlrd_addr_decode: checks the device-memory address decoder against an
// independent field extraction done with integer arithmetic: random
// addresses inside and outside the router's window, both operations, SQIs
// in and out of range, and the registration range (page bit 17).
module tb_vlrd_addr_decode;
  import vl_pkg::*;

  localparam int NUM_SQI = 48;   // not a power of two: exercises the range check

  logic      valid;
  net_op_e   op;
  pa_t       addr;
  logic      hit;
  req_kind_e kind;
  sqi_t      sqi;
  logic [5:0]  page;
  logic [11:0] offset;

  vlrd_addr_decode #(.NUM_SQI(NUM_SQI), .SQI_BITS(6), .RD_BITS(4), .RD_ID(4'd5)) dut (
    .valid_i(valid), .op_i(op), .addr_i(addr), .hit_o(hit), .kind_o(kind),
    .sqi_o(sqi), .page_o(page), .offset_o(offset)
  );

  int checks = 0, failures = 0;
  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned a, tag, rd, q, pg, off;
    bit exp_hit;
    int exp_kind;
    for (int n = 0; n < 4000; n++) begin
      // build an address from fields; the window tag is 2^23 in bits [51:28]
      tag = ($urandom_range(0, 7) == 0) ? longint'($urandom_range(0, 2**24 - 1)) : 64'h80_0000;
      rd  = ($urandom_range(0, 7) == 0) ? longint'($urandom_range(0, 15)) : 5;
      q   = $urandom_range(0, 63);
      pg  = $urandom_range(0, 63);
      off = $urandom_range(0, 4095);
      a   = tag * 64'h1000_0000 + rd * 64'h100_0000 + q * 64'h4_0000 + pg * 64'h1000 + off;
      valid = ($urandom_range(0, 15) != 0);
      op    = net_op_e'($urandom_range(0, 1));
      addr  = pa_t'(a);
      #1;
      exp_hit  = valid && tag == 64'h80_0000 && rd == 5;
      exp_kind = RQ_NONE;
      if (exp_hit && q < NUM_SQI) begin
        if (op == OP_PUSH) exp_kind = (pg >= 32) ? RQ_NONE : RQ_PUSH;
        else               exp_kind = (pg >= 32) ? RQ_SREG : RQ_FETCH;
      end
      check(hit == exp_hit, $sformatf("hit %0b for %h, expected %0b", hit, a, exp_hit));
      check(int'(kind) == exp_kind, $sformatf("kind %0d for %h, expected %0d", kind, a, exp_kind));
      check(int'(sqi) == int'(q), $sformatf("sqi %0d for %h, expected %0d", sqi, a, q));
      check(int'(page) == int'(pg) && int'(offset) == int'(off), "page/offset fields");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

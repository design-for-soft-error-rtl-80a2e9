// tb_ncl_source: checks the handshake-driven wavefront generator. The
// request ki is driven like a register's acknowledge, with random delays.
// After reset the output is NULL; each rise of ki must be answered one clk
// later with a DATA wavefront, each fall with NULL; DATA must never appear
// while ki is low nor vanish while ki is high; the DATA values must run
// 0, 1, ..., 7, 0, ... with out[2] = ci (MSB) and out[0] = y.
module tb_ncl_source;
  import ncl_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic ki;
  dr_t [2:0] out;
  logic [2:0] v;
  logic is_data;
  int checks = 0, failures = 0;

  ncl_source dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic all_null(dr_t [2:0] o);
    return o == '0;
  endfunction

  function automatic int decode(dr_t [2:0] o);
    int r = 0;
    for (int i = 0; i < 3; i++) begin
      if (o[i] == DR_DATA1) r |= 1 << i;
      else if (o[i] != DR_DATA0) return -1;
    end
    return r;
  endfunction

  initial begin
    int expect_v = 0;
    ki = 1'b0;
    rst = 1'b1;
    repeat (2) @(posedge clk); #1;
    check(all_null(out) && !is_data, "NULL after reset");
    rst = 1'b0;
    for (int r = 0; r < 40; r++) begin
      @(negedge clk); ki = 1'b1;
      @(posedge clk); #1;
      check(decode(out) == expect_v, $sformatf("DATA %0d answers ki rise (got %0d)", expect_v, decode(out)));
      check(is_data && v == 3'(expect_v), "is_data and v");
      repeat ($urandom_range(4, 0)) begin
        @(posedge clk); #1;
        check(decode(out) == expect_v, "DATA held while ki is high");
      end
      @(negedge clk); ki = 1'b0;
      @(posedge clk); #1;
      check(all_null(out) && !is_data, "NULL answers ki fall");
      expect_v = (expect_v + 1) % 8;
      repeat ($urandom_range(4, 0)) begin
        @(posedge clk); #1;
        check(all_null(out), "NULL held while ki is low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ncl_register: checks a 3-bit NCL register stage reset to NULL and a
// 2-bit one reset to DATA0.
// - after reset: q = NULL, ko = 1 (requests DATA); or q = DATA0, ko = 0;
// - with ki = 1 a DATA wavefront passes to q one clk later and ko falls
//   two clk after that (TH12b, then one completion level);
// - while ki = 1 a following NULL on d is blocked, q keeps the DATA;
// - when ki falls NULL passes and ko rises again;
// - with ki = 0 a new DATA wavefront is blocked.
module tb_ncl_register;
  import ncl_pkg::*;

  logic clk = 1'b0;
  logic rst;
  dr_t [2:0] d;
  dr_t [2:0] q;
  logic ki, ko;
  dr_t [1:0] d2, q2;
  logic ki2, ko2;
  int checks = 0, failures = 0;

  ncl_register #(.WIDTH(3), .INIT(DR_NULL))  r3 (.clk, .rst, .d(d),  .ki(ki),  .q(q),  .ko(ko));
  ncl_register #(.WIDTH(2), .INIT(DR_DATA0)) r2 (.clk, .rst, .d(d2), .ki(ki2), .q(q2), .ko(ko2));

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

  function automatic dr_t [2:0] enc(logic [2:0] v);
    dr_t [2:0] r;
    for (int i = 0; i < 3; i++) r[i] = v[i] ? DR_DATA1 : DR_DATA0;
    return r;
  endfunction

  initial begin
    logic [2:0] v;
    rst = 1'b1; d = '0; ki = 1'b0; d2 = '0; ki2 = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(q == '0 && ko == 1'b1, "NULL reset: q NULL, ko 1");
    check(q2[0] == DR_DATA0 && q2[1] == DR_DATA0 && ko2 == 1'b0, "DATA0 reset: q DATA0, ko 0");
    rst = 1'b0;
    for (int r = 0; r < 50; r++) begin
      v = 3'($urandom);
      // DATA with ki = 0 is blocked.
      @(negedge clk); ki = 1'b0; d = enc(v);
      repeat (3) @(posedge clk); #1;
      check(q == '0 && ko == 1'b1, "DATA blocked while ki requests NULL");
      // ki = 1: DATA passes after one clk, ko falls two clk later.
      @(negedge clk); ki = 1'b1;
      @(posedge clk); #1;
      check(q == enc(v), $sformatf("DATA %b passes", v));
      check(ko == 1'b1, "ko still high one clk after DATA");
      @(posedge clk); #1;
      check(ko == 1'b1, "ko still high two clk after DATA");
      @(posedge clk); #1;
      check(ko == 1'b0, "ko falls three clk after DATA");
      // NULL on d while ki = 1 is blocked.
      @(negedge clk); d = '0;
      repeat (3) @(posedge clk); #1;
      check(q == enc(v) && ko == 1'b0, "NULL blocked while ki requests DATA");
      // ki = 0: NULL passes, ko rises.
      @(negedge clk); ki = 1'b0;
      @(posedge clk); #1;
      check(q == '0, "NULL passes");
      repeat (2) @(posedge clk); #1;
      check(ko == 1'b1, "ko rises after NULL");
    end
    // DATA0-reset stage leaves its reset DATA on a NULL request.
    @(negedge clk); ki2 = 1'b0; d2 = '0;
    @(posedge clk); #1;
    check(q2 == '0, "DATA0 stage returns to NULL");
    repeat (2) @(posedge clk); #1;
    check(ko2 == 1'b1, "DATA0 stage then requests DATA");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

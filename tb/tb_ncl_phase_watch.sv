// tb_ncl_phase_watch: checks one up/x2/down counter pair (K = 2, 4-bit
// up-counter) with hand-timed phase sequences:
// - no flag in the first watched phase after reset, however long;
// - after a measured phase of T cycles, a watched phase of 2T - 1 cycles
//   raises nothing, one of 2T cycles or more raises the flag on its cycle
//   2T + 1, and the flag stays up until the phase ends;
// - a measured phase longer than 15 cycles gives an allowance of 30.
// Also K = 3 with a 6-bit counter.
module tb_ncl_phase_watch;

  logic clk = 1'b0;
  logic rst;
  logic phase;
  logic dl2, dl3;
  int checks = 0, failures = 0;

  ncl_phase_watch #(.CNT_W(4), .K(2)) u2 (.clk, .rst, .phase, .deadlock(dl2));
  ncl_phase_watch #(.CNT_W(6), .K(3)) u3 (.clk, .rst, .phase, .deadlock(dl3));

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

  // Measured phase of t cycles, then watched phase of w cycles; returns the
  // first watched cycle (1-based) with each flag, 0 if none.
  task automatic run(input int t, input int w, output int first2, output int first3);
    first2 = 0; first3 = 0;
    @(negedge clk); phase = 1'b1;
    repeat (t - 1) @(negedge clk);
    for (int c = 1; c <= w; c++) begin
      @(negedge clk); phase = 1'b0;
      #1;
      if (dl2 && first2 == 0) first2 = c;
      if (dl3 && first3 == 0) first3 = c;
      if (first2 != 0) check(dl2, "flag stays up while stuck");
    end
  endtask

  initial begin
    int f2, f3;
    phase = 1'b0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // Long watched phase before anything was measured.
    repeat (80) begin @(posedge clk); #1; check(!dl2 && !dl3, "not armed after reset"); end
    for (int r = 0; r < 40; r++) begin
      int t = $urandom_range(15, 1);
      int w = $urandom_range(3 * t + 2, 1);
      run(t, w, f2, f3);
      check(f2 == ((w >= 2 * t + 1) ? 2 * t + 1 : 0),
            $sformatf("K=2 T=%0d W=%0d first flag %0d", t, w, f2));
      check(f3 == ((w >= 3 * t + 1) ? 3 * t + 1 : 0),
            $sformatf("K=3 T=%0d W=%0d first flag %0d", t, w, f3));
    end
    // Measured phase beyond the 4-bit range saturates at 15.
    run(20, 40, f2, f3);
    check(f2 == 31, $sformatf("saturated allowance, first flag %0d", f2));
    check(f3 == 0, "K=3 no flag within 3*20");
    @(negedge clk); phase = 1'b1;
    @(posedge clk); #1;
    check(!dl2, "flag drops when the phase ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ncl_deadlock_detect: drives kf like a working pipeline (phases of 4 to
// 7 cycles, neighbours within a factor of 2 of each other) and checks that
// neither flag rises; then leaves kf stuck high (no fire) or stuck low (no
// return to 0) and checks that exactly the matching flag rises, 2 * T + 1
// cycles into the stuck phase, T being the length of the phase before it.
module tb_ncl_deadlock_detect;

  logic clk = 1'b0;
  logic rst;
  logic kf;
  logic deadlock_no_fire, deadlock_no_return0;
  int checks = 0, failures = 0;

  ncl_deadlock_detect dut (.*);

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

  task automatic hold(input logic level, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); kf = level;
      #1;
      check(!deadlock_no_fire && !deadlock_no_return0, "no flag in normal operation");
    end
  endtask

  // Stuck at `level` after a phase of t cycles at ~level.
  task automatic stuck(input logic level, input int t);
    int first = 0;
    hold(level, 5);
    hold(~level, t);
    for (int c = 1; c <= 3 * t; c++) begin
      @(negedge clk); kf = level;
      #1;
      if (first == 0 && (deadlock_no_fire || deadlock_no_return0)) begin
        first = c;
        check(level ? (deadlock_no_fire && !deadlock_no_return0)
                    : (deadlock_no_return0 && !deadlock_no_fire),
              $sformatf("right flag for kf stuck at %0b", level));
      end
    end
    check(first == 2 * t + 1, $sformatf("stuck at %0b after T=%0d: flag at %0d", level, t, first));
  endtask

  initial begin
    kf = 1'b1;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int r = 0; r < 100; r++) begin
      hold(1'b1, $urandom_range(7, 4));
      hold(1'b0, $urandom_range(7, 4));
    end
    stuck(1'b1, 5);
    rst = 1'b1; @(posedge clk); rst = 1'b0;
    stuck(1'b0, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ncl_completion: checks completion trees of 1, 2, 4, 7 and 16 inputs.
// Inputs rise one at a time in random order, then fall one at a time; ko
// must stay low until the last input has risen and then rise exactly
// ceil(log4 N) clk later (one TH gate level per clk), and likewise stay high
// until the last input has fallen. Also checks the reset value.
module tb_ncl_completion;

  logic clk = 1'b0;
  logic rst;
  logic [15:0] a;
  logic [4:0]  ko;
  int checks = 0, failures = 0;

  localparam int W [5] = '{1, 2, 4, 7, 16};
  localparam int LAT [5] = '{0, 1, 1, 2, 2};   // ceil(log4 W)

  ncl_completion #(.WIDTH(1))  c1  (.clk, .rst, .a(a[0:0]),  .ko(ko[0]));
  ncl_completion #(.WIDTH(2))  c2  (.clk, .rst, .a(a[1:0]),  .ko(ko[1]));
  ncl_completion #(.WIDTH(4), .RST_VAL(1'b0)) c4 (.clk, .rst, .a(a[3:0]), .ko(ko[2]));
  ncl_completion #(.WIDTH(7))  c7  (.clk, .rst, .a(a[6:0]),  .ko(ko[3]));
  ncl_completion #(.WIDTH(16)) c16 (.clk, .rst, .a(a[15:0]), .ko(ko[4]));

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

  // Drive inputs of tree k towards `level` one at a time, checking ko.
  task automatic sweep(input int k, input logic level);
    int order [16];
    int n = W[k];
    for (int i = 0; i < n; i++) order[i] = i;
    for (int i = n - 1; i > 0; i--) begin
      int j = $urandom_range(i, 0);
      int t = order[i]; order[i] = order[j]; order[j] = t;
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      a[order[i]] = level;
      if (i < n - 1) begin
        repeat (3) @(posedge clk);
        #1;
        check(ko[k] == ~level, $sformatf("W=%0d ko changed before all inputs were %0b", n, level));
      end
    end
    // Last input changed at this negedge: ko follows after LAT clk edges.
    if (LAT[k] > 1) begin
      repeat (LAT[k] - 1) @(posedge clk);
      #1;
      check(ko[k] == ~level, $sformatf("W=%0d ko early", n));
    end
    if (LAT[k] > 0) @(posedge clk);
    #1;
    check(ko[k] == level, $sformatf("W=%0d ko did not follow after %0d levels", n, LAT[k]));
  endtask

  initial begin
    a = '0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check(ko[1] == 1'b1 && ko[3] == 1'b1 && ko[4] == 1'b1, "reset value 1");
    check(ko[2] == 1'b0, "reset value 0");
    rst = 1'b0;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 10; r++) begin
      for (int k = 0; k < 5; k++) begin
        sweep(k, 1'b1);
        sweep(k, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

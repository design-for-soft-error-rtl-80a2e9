// tb_ncl_invalid_detect: checks the invalid-code detector exhaustively for
// two dual-rail bits and with random words for five: the output must be 1
// exactly when some bit has both rails high.
module tb_ncl_invalid_detect;
  import ncl_pkg::*;

  dr_t [1:0] d2;
  dr_t [4:0] d5;
  logic inv2, inv5;
  int checks = 0, failures = 0;

  ncl_invalid_detect #(.WIDTH(2)) u2 (.d(d2), .invalid(inv2));
  ncl_invalid_detect #(.WIDTH(5)) u5 (.d(d5), .invalid(inv5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic e;
    for (int i = 0; i < 16; i++) begin
      d2 = 4'(i);
      #1;
      e = (i[1:0] == 2'b11) || (i[3:2] == 2'b11);
      check(inv2 == e, $sformatf("2 bits %b", d2));
    end
    for (int r = 0; r < 500; r++) begin
      d5 = 10'($urandom);
      #1;
      e = 0;
      for (int i = 0; i < 5; i++) e |= (d5[i] == 2'b11);
      check(inv5 == e, $sformatf("5 bits %b", d5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

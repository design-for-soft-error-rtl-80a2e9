// tb_ncl_lut: checks the SRAM-based LUT against direct indexing of its
// configuration cells, for a 4-input and a 3-input LUT, with random cell
// contents and all input combinations; also the printed TH34w2 Set LUT
// contents EAA8 against the gate's set function A(B+C+D)+BCD.
module tb_ncl_lut;

  logic [3:0]  in4;
  logic [15:0] cells4;
  logic        out4;
  logic [2:0]  in3;
  logic [7:0]  cells3;
  logic        out3;
  int checks = 0, failures = 0;

  ncl_lut #(.K(4)) dut4 (.in(in4), .cells(cells4), .out(out4));
  ncl_lut #(.K(3)) dut3 (.in(in3), .cells(cells3), .out(out3));

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
    logic a, b, c, d, f;
    for (int r = 0; r < 20; r++) begin
      cells4 = 16'($urandom);
      cells3 = 8'($urandom);
      for (int i = 0; i < 16; i++) begin
        in4 = 4'(i);
        in3 = 3'(i);
        #1;
        check(out4 == ((cells4 >> i) & 1), $sformatf("K=4 cells %h in %0d", cells4, i));
        if (i < 8) check(out3 == ((cells3 >> i) & 1), $sformatf("K=3 cells %h in %0d", cells3, i));
      end
    end
    // Set LUT of TH34w2: A = in[0] (weight 2), B, C, D.
    cells4 = 16'hEAA8;
    for (int i = 0; i < 16; i++) begin
      in4 = 4'(i);
      {d, c, b, a} = 4'(i);
      f = (a & (b | c | d)) | (b & c & d);
      #1;
      check(out4 == f, $sformatf("TH34w2 set LUT at DCBA=%b", in4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

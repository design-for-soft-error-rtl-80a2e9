// tb_ncl_full_adder: checks the dual-rail full adder built from G1..G4 with
// fault-free LUT contents, for all eight input values, in random order:
// - inputs arrive one at a time; the sum must stay NULL until all three are
//   DATA (input completeness), then within two clk sum and carry must be the
//   DATA of x + y + ci;
// - inputs return to NULL one at a time; the sum must hold its DATA until
//   all inputs are NULL, then both outputs must be NULL within two clk.
// Outputs are never allowed to show the invalid code 11.
module tb_ncl_full_adder;
  import ncl_pkg::*;

  logic clk = 1'b0;
  logic rst;
  dr_t ci, x, y, co, s;
  th_cfg_t [3:0] cfg;
  int checks = 0, failures = 0;

  ncl_full_adder dut (.clk, .rst, .ci, .x, .y, .cfg, .co, .s);

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

  always @(posedge clk) if (!rst) begin
    checks++;
    if ((co.rail0 & co.rail1) | (s.rail0 & s.rail1)) begin
      failures++;
      $display("FAIL: invalid code on the outputs");
    end
  end

  function automatic dr_t enc(logic b);
    return b ? DR_DATA1 : DR_DATA0;
  endfunction

  initial begin
    logic [2:0] v;
    int order [3];
    // TH23 = majority; TH34w2 Set LUT = EAA8 (weighted input first).
    cfg[0] = '{set_lut: 16'hE8E8, reset_lut: 16'hFEFE, hold_lut: 8'hC8};
    cfg[1] = cfg[0];
    cfg[2] = '{set_lut: 16'hEAA8, reset_lut: 16'hFFFE, hold_lut: 8'hC8};
    cfg[3] = cfg[2];
    ci = DR_NULL; x = DR_NULL; y = DR_NULL;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int r = 0; r < 80; r++) begin
      v = (r < 8) ? 3'(r) : 3'($urandom);
      order = '{0, 1, 2};
      order.shuffle();
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        case (order[i])
          0: ci = enc(v[2]);
          1: x  = enc(v[1]);
          2: y  = enc(v[0]);
        endcase
        if (i < 2) begin
          repeat (3) @(posedge clk); #1;
          check(s == DR_NULL, "sum stays NULL until all inputs are DATA");
        end
      end
      repeat (2) @(posedge clk); #1;
      check(s == enc(^v), $sformatf("sum of %b", v));
      check(co == enc((v[0] & v[1]) | (v[1] & v[2]) | (v[0] & v[2])), $sformatf("carry of %b", v));
      order.shuffle();
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        case (order[i])
          0: ci = DR_NULL;
          1: x  = DR_NULL;
          2: y  = DR_NULL;
        endcase
        if (i < 2) begin
          repeat (3) @(posedge clk); #1;
          check(s == enc(^v), "sum holds DATA until all inputs are NULL");
        end
      end
      repeat (2) @(posedge clk); #1;
      check(s == DR_NULL && co == DR_NULL, "outputs return to NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

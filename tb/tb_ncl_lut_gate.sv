// tb_ncl_lut_gate: checks LUT-mapped threshold gates against a behavioural
// model of threshold-with-hysteresis (fire when the weighted count of high
// inputs reaches the threshold, return to 0 only when all inputs are low,
// otherwise hold), one clk of gate delay.
// Gates: TH34w2 built from the printed LUT contents (Set EAA8, Reset FFFE,
// Hold z' = t2(t1+z)), which must also equal the package function; TH23; a
// TH22 reset high ("d"); and a TH12b (output bubble).
// Then upsets of single LUT cells of the TH34w2, with the effects the upset
// table gives: premature fire, no fire, no return to 0 and oscillation.
module tb_ncl_lut_gate;
  import ncl_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [3:0] in4;
  logic [2:0] in3;
  logic [1:0] in2;
  th_cfg_t cfg34;
  logic z34, z23, z22d, z12b;
  int checks = 0, failures = 0;

  localparam th_cfg_t PRINTED_TH34W2 = '{set_lut: 16'hEAA8, reset_lut: 16'hFFFE, hold_lut: 8'hC8};

  ncl_lut_gate #(.N(4)) g34 (.clk, .rst, .in(in4), .cfg(cfg34), .z(z34));
  ncl_lut_gate #(.N(3)) g23 (.clk, .rst, .in(in3), .cfg(th_cfg(3, 2)), .z(z23));
  ncl_lut_gate #(.N(2), .RST_VAL(1'b1)) g22d (.clk, .rst, .in(in2), .cfg(th_cfg(2, 2)), .z(z22d));
  ncl_lut_gate #(.N(2), .INVERT(1'b1)) g12b (.clk, .rst, .in(in2), .cfg(th_cfg(2, 1)), .z(z12b));

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

  // Reference threshold gate with hysteresis.
  function automatic logic ref_th(logic z, int sum, int m, logic any);
    if (sum >= m) return 1'b1;
    if (!any)     return 1'b0;
    return z;
  endfunction

  logic r34, r23, r22d, r12;

  initial begin
    int s34, s23;
    rst = 1'b1;
    cfg34 = PRINTED_TH34W2;
    in4 = '0; in3 = '0; in2 = '0;
    check(th_cfg(4, 3, 2) == PRINTED_TH34W2, "package TH34w2 LUTs equal EAA8 / FFFE / C8");
    repeat (2) @(posedge clk);
    #1;
    check(z34 == 0 && z23 == 0 && z22d == 1 && z12b == 1, "reset values");
    r34 = 0; r23 = 0; r22d = 1; r12 = 0;
    rst = 1'b0;
    // Random stimulus, compared each cycle with the reference.
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in4 = 4'($urandom);
      in3 = 3'($urandom);
      in2 = 2'($urandom);
      s34 = 2 * in4[0] + in4[1] + in4[2] + in4[3];
      s23 = in3[0] + in3[1] + in3[2];
      r34  = ref_th(r34,  s34, 3, |in4);
      r23  = ref_th(r23,  s23, 2, |in3);
      r22d = ref_th(r22d, in2[0] + in2[1], 2, |in2);
      r12  = ref_th(r12,  in2[0] + in2[1], 1, |in2);
      @(posedge clk);
      #1;
      check(z34 == r34,   $sformatf("TH34w2 in %b", in4));
      check(z23 == r23,   $sformatf("TH23 in %b", in3));
      check(z22d == r22d, $sformatf("TH22d in %b", in2));
      check(z12b == ~r12, $sformatf("TH12b in %b", in2));
    end

    // Upsets. Address {D,C,B,A}, A = weighted input.
    // Premature fire: Set cell A=0,B=1,C=1,D=0 flipped 0->1.
    cfg34 = PRINTED_TH34W2; cfg34.set_lut[4'b0110] = 1'b1;
    @(negedge clk); in4 = 4'b0000; repeat (2) @(negedge clk);
    in4 = 4'b0110; @(posedge clk); #1;
    check(z34 == 1'b1, "set upset 0->1: premature fire below threshold");
    // No fire: Set cell A=1,D=1 flipped 1->0.
    @(negedge clk); cfg34 = PRINTED_TH34W2; cfg34.set_lut[4'b1001] = 1'b0;
    in4 = 4'b0000; repeat (2) @(negedge clk);
    in4 = 4'b1001; repeat (3) @(posedge clk); #1;
    check(z34 == 1'b0, "set upset 1->0: no fire at threshold");
    // No return to 0: Reset cell 0000 flipped 0->1.
    @(negedge clk); cfg34 = PRINTED_TH34W2; cfg34.reset_lut[0] = 1'b1;
    in4 = 4'b1111; repeat (2) @(negedge clk);
    in4 = 4'b0000; repeat (3) @(posedge clk); #1;
    check(z34 == 1'b1, "reset upset 0->1: no return to 0");
    // Oscillation: Hold cell 000 flipped 0->1, inputs all low.
    @(negedge clk); cfg34 = PRINTED_TH34W2; cfg34.hold_lut[3'b000] = 1'b1;
    in4 = 4'b0000;
    begin
      int toggles = 0;
      logic last;
      @(posedge clk); #1; last = z34;
      repeat (10) begin
        @(posedge clk); #1;
        if (z34 != last) toggles++;
        last = z34;
      end
      check(toggles == 10, "hold upset 000: output oscillates every gate delay");
    end
    // Harmless: Set cell 0000 flipped 0->1 changes nothing.
    @(negedge clk); cfg34 = PRINTED_TH34W2; cfg34.set_lut[0] = 1'b1;
    in4 = 4'b1111; repeat (2) @(negedge clk);
    in4 = 4'b0000; repeat (2) @(posedge clk); #1;
    check(z34 == 1'b0, "set upset at 0000 is harmless");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

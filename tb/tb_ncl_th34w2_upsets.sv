// tb_ncl_th34w2_upsets: flips each of the 40 configuration cells of one
// LUT-mapped TH34w2 gate in turn (16 Set, 16 Reset, 8 Hold) and classifies
// what the gate then does, against a fault-free reference gate.
//
// Stimulus, per upset: for every input pattern p and every order of its
// bits, the inputs start all low, rise one bit at a time to p and fall one
// bit at a time back to all low, as NCL wavefronts do (and also jumps
// straight from all low to p and back); every step is held
// for 4 gate delays. Effects recorded at the end of each step:
//   PREMATURE  z = 1 where the reference is 0, inputs not all low
//   NO_FIRE    z = 0 where the reference is 1, threshold reached
//   EARLY_RET  z = 0 where the reference is 1, below threshold
//   NO_RET0    z = 1 with all inputs low
//   OSC        z changes during the last three cycles of a step
// Checks: the effect the gate-level upset table predicts for the cell is
// among those seen; cells predicted harmless show no effect at all.
// Cell addresses: Set/Reset {D,C,B,A} with A the weighted input; Hold
// {t1,t2,z}.
module tb_ncl_th34w2_upsets;
  import ncl_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [3:0] in;
  th_cfg_t cfg;
  logic z;
  int checks = 0, failures = 0;

  ncl_lut_gate #(.N(4)) dut (.clk, .rst, .in, .cfg, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef enum int { E_PREMATURE, E_NO_FIRE, E_EARLY_RET, E_NO_RET0, E_OSC, E_NONE } eff_e;
  localparam string ENAME [6] = '{"premature fire", "no fire", "early return to 0",
                                  "no return to 0", "oscillation", "none"};

  function automatic int wsum(logic [3:0] v);
    return 2 * v[0] + v[1] + v[2] + v[3];
  endfunction

  bit [4:0] seen;
  logic     zref;

  // Hold one input pattern for 4 cycles and record effects.
  task automatic step(input logic [3:0] v);
    logic prev;
    @(negedge clk);
    in = v;
    if (wsum(v) >= 3) zref = 1'b1;
    else if (v == 0)  zref = 1'b0;
    @(posedge clk); #1;
    prev = z;
    repeat (3) begin
      @(posedge clk); #1;
      if (z != prev) seen[E_OSC] = 1'b1;
      prev = z;
    end
    if (v == 0 && z) seen[E_NO_RET0] = 1'b1;
    else if (v != 0 && z && !zref) seen[E_PREMATURE] = 1'b1;
    else if (!z && zref) seen[wsum(v) >= 3 ? E_NO_FIRE : E_EARLY_RET] = 1'b1;
  endtask

  task automatic exercise();
    int perms [24][4];
    int np = 0;
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
      for (int c = 0; c < 4; c++) for (int d = 0; d < 4; d++)
        if (a != b && a != c && a != d && b != c && b != d && c != d) begin
          perms[np] = '{a, b, c, d};
          np++;
        end
    for (int p = 1; p < 16; p++) begin
      // All bits of p arriving together, then leaving together.
      step(4'b0000);
      step(4'(p));
      step(4'b0000);
      for (int k = 0; k < 24; k++) begin
        logic [3:0] v = '0;
        step(4'b0000);
        for (int i = 0; i < 4; i++)
          if (p[perms[k][i]]) begin v[perms[k][i]] = 1'b1; step(v); end
        for (int i = 0; i < 4; i++)
          if (p[perms[k][i]]) begin v[perms[k][i]] = 1'b0; step(v); end
      end
    end
    step(4'b0000);
  endtask

  initial begin
    th_cfg_t golden = th_cfg(4, 3, 2);
    eff_e expected;
    int n_cells = 0;
    int per_class [6] = '{0, 0, 0, 0, 0, 0};
    in = '0;
    cfg = golden;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // Fault-free gate: no effect at all.
    seen = '0; zref = 1'b0;
    exercise();
    check(seen == '0, "fault-free gate shows no effect");
    for (int lut = 0; lut < 3; lut++) begin
      for (int a = 0; a < ((lut == 2) ? 8 : 16); a++) begin
        if (lut == 0)      expected = (a == 0) ? E_NONE : (golden.set_lut[a] ? E_NO_FIRE : E_PREMATURE);
        else if (lut == 1) expected = (a == 0) ? E_NO_RET0 : (golden.set_lut[a] ? E_NO_FIRE : E_EARLY_RET);
        else case (a)
          0, 7:    expected = E_OSC;
          1:       expected = E_NO_RET0;
          2:       expected = E_PREMATURE;
          3:       expected = E_EARLY_RET;
          6:       expected = E_NO_FIRE;
          default: expected = E_NONE;
        endcase
        // Reconfigure, then upset one cell.
        @(negedge clk);
        in = '0; cfg = golden; rst = 1'b1;
        @(negedge clk);
        rst = 1'b0;
        case (lut)
          0: cfg.set_lut[a]        = ~cfg.set_lut[a];
          1: cfg.reset_lut[a]      = ~cfg.reset_lut[a];
          default: cfg.hold_lut[a] = ~cfg.hold_lut[a];
        endcase
        seen = '0; zref = 1'b0;
        exercise();
        $display("  %-5s cell %2d: expected %-18s seen %b",
                 lut == 0 ? "Set" : lut == 1 ? "Reset" : "Hold", a, ENAME[expected], seen);
        if (expected == E_NONE) check(seen == '0, $sformatf("lut %0d cell %0d should be harmless", lut, a));
        else check(seen[expected], $sformatf("lut %0d cell %0d: %s not seen", lut, a, ENAME[expected]));
        per_class[expected]++;
        n_cells++;
      end
    end
    $display("cells=%0d premature=%0d no_fire=%0d early_return=%0d no_return0=%0d osc=%0d none=%0d",
             n_cells, per_class[0], per_class[1], per_class[2], per_class[3], per_class[4], per_class[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

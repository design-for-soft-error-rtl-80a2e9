// tb_ncl_seu_sweep: upsets every configuration cell of every full-adder
// gate (G1..G4: 16 Set, 16 Reset and 8 Hold cells each, 160 runs), one per
// run after a reconfiguration, and checks the detection scheme against what
// the pipeline actually does.
//
// For each run the testbench itself decides whether the upset did harm: a
// result at reg2 that differs from x + y + ci of the value sent, both rails
// of a full-adder output high, or a pipeline that stops producing results.
// Checks:
//   - every harmful upset raises seu_alarm (full detection coverage);
//   - no harmless upset raises it (no false alarm);
//   - a raised flag is the one the gate-level class predicts: premature
//     fire and oscillation -> invalid_data, no fire -> deadlock_no_fire,
//     no return to 0 -> deadlock_no_return0;
//   - reconfiguration restores correct operation after every upset.
// Gate-level classes (cell address {D,C,B,A}, A = weighted input; Hold
// address {t1,t2,z}): Set cell 0 none; other Set cell holding 0 premature
// fire; Set cell holding 1 no fire; Reset cell 0 no return to 0; Reset cell
// below threshold early return to 0 (harmless); other Reset cell no fire;
// Hold 000 oscillation, 001 no return to 0, 010 premature fire, 011 early
// return, 100/101 none, 110 no fire, 111 oscillation while set. These are
// worst cases: a pattern the full adder never presents to a gate (e.g. G3's
// cell 1111) cannot do harm there, and those runs must stay silent.
module tb_ncl_seu_sweep;
  import ncl_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic seu_flip;
  logic [1:0] seu_gate, seu_lut;
  logic [3:0] seu_bit;
  dr_t [2:0] din;
  logic [2:0] din_value;
  logic din_valid, ki, kf;
  dr_t q_carry, q_sum;
  logic invalid_data, deadlock_no_fire, deadlock_no_return0, seu_alarm;

  int checks = 0, failures = 0;
  int cycle = 0;

  ncl_seu_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Scoreboard and harm monitor.
  logic [2:0] sent_q [$];
  logic prev_valid = 1'b0, out_data = 1'b0;
  int   out_count = 0, wrong = 0, last_out_cycle = 0;
  bit   saw_11 = 1'b0;

  always @(posedge clk) begin
    if (rst) begin
      sent_q.delete();
      prev_valid <= 1'b0;
      out_data   <= 1'b0;
      saw_11     <= 1'b0;
      wrong      <= 0;
      last_out_cycle <= cycle;
    end else begin
      prev_valid <= din_valid;
      if (din_valid && !prev_valid) sent_q.push_back(din_value);
      // Full-adder outputs, read directly from the gates.
      if ((dut.u_fa.s.rail0 & dut.u_fa.s.rail1) | (dut.u_fa.co.rail0 & dut.u_fa.co.rail1))
        saw_11 <= 1'b1;
      if (!out_data && dr_is_data(q_carry) && dr_is_data(q_sum)) begin
        logic [2:0] v;
        out_data <= 1'b1;
        out_count++;
        last_out_cycle <= cycle;
        if (sent_q.size() == 0) wrong <= wrong + 1;
        else begin
          v = sent_q.pop_front();
          if ({q_carry.rail1, q_sum.rail1} != 2'(v[0] + v[1] + v[2])) wrong <= wrong + 1;
        end
      end else if (out_data && dr_is_null(q_carry) && dr_is_null(q_sum)) begin
        out_data <= 1'b0;
      end
    end
  end

  task automatic reconfigure();
    seu_flip = 1'b0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
  endtask

  task automatic run_ops(input int n, input int limit, output int used);
    int start = out_count;
    used = 0;
    while (out_count < start + n && used < limit) begin
      @(posedge clk);
      used++;
    end
  endtask

  typedef enum int { C_ANY, C_NONE, C_INVALID, C_NO_FIRE, C_NO_RETURN0 } cls_e;

  int n_runs = 0, n_harmful = 0, n_detected = 0, n_silent = 0;
  int n_inv = 0, n_nf = 0, n_nr = 0, n_masked = 0;

  task automatic one_upset(input int g, input int lut, input int a, input cls_e cls);
    int used;
    bit inv = 0, nf = 0, nr = 0, harmful;
    string name = $sformatf("G%0d %s cell %0d", g + 1,
                            lut == 0 ? "Set" : lut == 1 ? "Reset" : "Hold", a);
    reconfigure();
    run_ops(4, 1000, used);
    check(wrong == 0 && !seu_alarm && !saw_11, {name, ": fault-free start"});
    @(negedge clk);
    seu_gate = 2'(g); seu_lut = 2'(lut); seu_bit = 4'(a); seu_flip = 1'b1;
    @(negedge clk);
    seu_flip = 1'b0;
    repeat (600) begin
      @(posedge clk);
      inv |= invalid_data;
      nf  |= deadlock_no_fire;
      nr  |= deadlock_no_return0;
    end
    harmful = (wrong != 0) || saw_11 || (cycle - last_out_cycle > 100);
    n_runs++;
    if (harmful) begin
      n_harmful++;
      if (seu_alarm) n_detected++;
      check(seu_alarm, {name, ": harmful upset not detected"});
    end else begin
      n_silent++;
      check(!seu_alarm, {name, ": false alarm on a harmless upset"});
      if (cls != C_NONE && cls != C_ANY) n_masked++;
    end
    if (inv) n_inv++;
    if (nf)  n_nf++;
    if (nr)  n_nr++;
    if (seu_alarm) case (cls)
      C_INVALID:    check(inv && !nf && !nr, {name, ": expected invalid_data"});
      C_NO_FIRE:    check(nf && !nr,         {name, ": expected deadlock_no_fire"});
      C_NO_RETURN0: check(nr && !nf,         {name, ": expected deadlock_no_return0"});
      C_NONE:       check(1'b0,              {name, ": class without effect raised an alarm"});
      default: ;
    endcase
    reconfigure();
    run_ops(8, 2000, used);
    check(used < 2000 && wrong == 0 && !seu_alarm, {name, ": recovery after reconfiguration"});
  endtask

  initial begin
    th_cfg_t golden;
    cls_e c;
    seu_flip = 1'b0; seu_gate = '0; seu_lut = '0; seu_bit = '0;
    rst = 1'b1;
    for (int g = 0; g < 4; g++) begin
      golden = (g < 2) ? th_cfg(3, 2) : th_cfg(4, 3, 2);
      for (int lut = 0; lut < 3; lut++) begin
        for (int a = 0; a < ((lut == 2) ? 8 : 16); a++) begin
          if (g < 2 && lut != 2 && a >= 8) c = C_NONE;   // unused fourth input
          else if (lut == 0) c = (a == 0) ? C_NONE : (golden.set_lut[a] ? C_NO_FIRE : C_INVALID);
          else if (lut == 1) c = (a == 0) ? C_NO_RETURN0 : (golden.set_lut[a] ? C_NO_FIRE : C_NONE);
          else case (a)
            0, 2:    c = C_INVALID;
            1:       c = C_NO_RETURN0;
            6:       c = C_NO_FIRE;
            7:       c = C_ANY;
            default: c = C_NONE;
          endcase
          one_upset(g, lut, a, c);
        end
      end
    end
    $display("runs=%0d harmful=%0d detected=%0d silent=%0d (worst-case class masked by the adder: %0d)",
             n_runs, n_harmful, n_detected, n_silent, n_masked);
    $display("flags: invalid_data=%0d deadlock_no_fire=%0d deadlock_no_return0=%0d", n_inv, n_nf, n_nr);
    check(n_harmful > 0 && n_detected == n_harmful, "all harmful upsets detected");
    check(n_inv > 0 && n_nf > 0 && n_nr > 0 && n_silent > 0, "every outcome occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

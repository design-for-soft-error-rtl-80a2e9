// tb_ncl_seu_top: end-to-end test of the NCL full-adder pipeline with upset
// injection and soft-error detection, at the top's default parameters.
//
// 1. Fault-free run: every DATA wavefront leaving reg2 must equal the sum and
//    carry of the value the source presented (in order), both handshake
//    phases must complete, and no detector may fire.
// 2. Configuration upsets in gate G3 (the sum rail0 gate), one per run after
//    a reconfiguration, chosen to produce each soft-error class of the gate:
//    premature fire and oscillation must raise invalid_data, no fire
//    deadlock_no_fire, no return to 0 deadlock_no_return0; harmless cells
//    must raise nothing and leave the results correct.
// 3. After each upset, reconfiguration (rst) must restore correct operation.
// Counts how often each mechanism happened and fails if one never did.
// LUT addresses follow ncl_pkg: the cell an upset table names by inputs
// abcd (a = weighted input, most significant) is cell {d,c,b,a} here.
module tb_ncl_seu_top;
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
  int n_ops = 0, n_invalid = 0, n_no_fire = 0, n_no_return0 = 0, n_recover = 0, n_benign = 0;
  int cycle = 0;

  ncl_seu_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
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

  // Scoreboard: values the source presented, in order.
  logic [2:0] sent_q [$];
  logic prev_valid = 1'b0, out_data = 1'b0;
  bit   score_en = 1'b0;
  int   out_count = 0, out_errors = 0;

  always @(posedge clk) begin
    if (rst) begin
      sent_q.delete();
      prev_valid <= 1'b0;
      out_data   <= 1'b0;
    end else begin
      prev_valid <= din_valid;
      if (din_valid && !prev_valid) sent_q.push_back(din_value);
      if (!out_data && dr_is_data(q_carry) && dr_is_data(q_sum)) begin
        logic [2:0] v;
        logic [1:0] exp_cs;
        out_data <= 1'b1;
        out_count++;
        if (sent_q.size() == 0) begin
          out_errors++;
        end else begin
          v = sent_q.pop_front();
          exp_cs = 2'(v[0] + v[1] + v[2]);
          if (score_en) begin
            checks++;
            if ({q_carry.rail1, q_sum.rail1} != exp_cs) begin
              failures++;
              $display("FAIL @%0d: value %b gave carry,sum %b%b, expected %b",
                       cycle, v, q_carry.rail1, q_sum.rail1, exp_cs);
            end
          end
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

  // Run until `n` more outputs have been produced; returns cycles used.
  task automatic run_ops(input int n, input int limit, output int used);
    int start = out_count;
    used = 0;
    while (out_count < start + n && used < limit) begin
      @(posedge clk);
      used++;
    end
  endtask

  task automatic inject(input int gate, input int lut, input int addr);
    @(negedge clk);
    seu_gate = 2'(gate);
    seu_lut  = 2'(lut);
    seu_bit  = 4'(addr);
    seu_flip = 1'b1;
    @(negedge clk);
    seu_flip = 1'b0;
  endtask

  // Watch the detectors for `limit` cycles; record which fired.
  task automatic observe(input int limit, output bit inv, output bit nf, output bit nr);
    inv = 0; nf = 0; nr = 0;
    repeat (limit) begin
      @(posedge clk);
      inv |= invalid_data;
      nf  |= deadlock_no_fire;
      nr  |= deadlock_no_return0;
    end
  endtask

  typedef enum int { EXP_ANY, EXP_NONE, EXP_INVALID, EXP_NO_FIRE, EXP_NO_RETURN0 } exp_e;

  task automatic fault_case(input string name, input int lut, input int addr, input exp_e exp);
    bit inv, nf, nr;
    int used;
    reconfigure();
    score_en = 1'b1;
    run_ops(4, 2000, used);
    check(!seu_alarm, {name, ": no alarm before the upset"});
    score_en = 1'b0;
    inject(2, lut, addr);
    observe(1500, inv, nf, nr);
    $display("  %-34s invalid=%0b no_fire=%0b no_return0=%0b", name, inv, nf, nr);
    case (exp)
      EXP_ANY: ;
      EXP_NONE: begin
        check(!inv && !nf && !nr && !seu_alarm, {name, ": harmless upset raised an alarm"});
        if (!inv && !nf && !nr) n_benign++;
      end
      EXP_INVALID: begin
        check(inv && seu_alarm, {name, ": invalid code not detected"});
        if (inv) n_invalid++;
      end
      EXP_NO_FIRE: begin
        check(nf && !nr && seu_alarm, {name, ": no-fire deadlock not detected"});
        check(kf == 1'b1, {name, ": pipeline should be stuck requesting DATA"});
        if (nf) n_no_fire++;
      end
      EXP_NO_RETURN0: begin
        check(nr && !nf && seu_alarm, {name, ": no-return-to-0 deadlock not detected"});
        check(kf == 1'b0, {name, ": pipeline should be stuck requesting NULL"});
        if (nr) n_no_return0++;
      end
    endcase
    // Reconfiguration restores the device.
    reconfigure();
    score_en = 1'b1;
    run_ops(8, 4000, used);
    check(used < 4000 && !seu_alarm, {name, ": no recovery after reconfiguration"});
    if (used < 4000 && !seu_alarm) n_recover++;
  endtask

  initial begin
    int used;
    bit inv, nf, nr;
    seu_flip = 1'b0; seu_gate = '0; seu_lut = '0; seu_bit = '0;
    rst = 1'b1;
    reconfigure();

    // 1. Fault-free operation over all input values, several times round.
    score_en = 1'b1;
    run_ops(64, 20000, used);
    check(out_count >= 64, "fault-free pipeline completes 64 operations");
    check(out_errors == 0, "every output matched a presented input");
    check(!seu_alarm, "no alarm without upsets");
    n_ops = out_count;
    $display("fault-free: %0d operations in %0d cycles (%0d cycles each)",
             n_ops, used, used / 64);
    check(used / 64 <= 20, "one DATA/NULL cycle takes at most 20 clk");

    // 2. Upsets in G3 (full adder gate index 2).
    fault_case("Set 0000 0->1 (no error)",          0, int'(4'b0000), EXP_NONE);
    fault_case("Set 0110 0->1 (premature fire)",    0, int'(4'b0110), EXP_INVALID);
    fault_case("Set 0011 0->1 (premature fire)",    0, int'(4'b1100), EXP_INVALID);
    fault_case("Set 1001 1->0 (no fire)",           0, int'(4'b1001), EXP_NO_FIRE);
    fault_case("Set 0111 1->0 (no fire)",           0, int'(4'b1110), EXP_NO_FIRE);
    fault_case("Reset 0000 0->1 (no return to 0)",  1, int'(4'b0000), EXP_NO_RETURN0);
    fault_case("Reset 0111 1->0 (no fire)",         1, int'(4'b1110), EXP_NO_FIRE);
    fault_case("Hold 000 0->1 (oscillating)",       2, int'(3'b000),  EXP_INVALID);
    fault_case("Hold 001 0->1 (no return to 0)",    2, int'(3'b001),  EXP_NO_RETURN0);
    fault_case("Hold 010 0->1 (premature fire)",    2, int'(3'b010),  EXP_INVALID);
    fault_case("Hold 110 1->0 (no fire)",           2, int'(3'b110),  EXP_NO_FIRE);
    // Oscillation while the set condition holds: the output register may
    // still capture the right value, so any outcome is accepted here.
    fault_case("Hold 111 1->0 (oscillating)",       2, int'(3'b111), EXP_ANY);
    fault_case("Hold 100 0->1 (no error)",          2, int'(3'b100),  EXP_NONE);
    fault_case("Hold 101 0->1 (no error)",          2, int'(3'b101),  EXP_NONE);

    $display("mechanisms: ops=%0d invalid=%0d no_fire=%0d no_return0=%0d benign=%0d recover=%0d",
             n_ops, n_invalid, n_no_fire, n_no_return0, n_benign, n_recover);
    check(n_ops > 0,        "mechanism: fault-free operation");
    check(n_invalid > 0,    "mechanism: invalid-data detection");
    check(n_no_fire > 0,    "mechanism: no-fire deadlock detection");
    check(n_no_return0 > 0, "mechanism: no-return-to-0 deadlock detection");
    check(n_benign > 0,     "mechanism: harmless upset");
    check(n_recover > 0,    "mechanism: recovery by reconfiguration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// ncl_lut_gate: NCL threshold gate with hysteresis, mapped onto FPGA LUTs.
//
// A gate THmn (threshold m, n inputs, optional weights) is built from three
// LUTs, as an FPGA synthesis tool maps it:
//   Set LUT   t1 = 1 when the weighted count of high inputs reaches m,
//   Reset LUT t2 = 0 only when all inputs are low (an OR),
//   Hold LUT  z' = t2 & (t1 | z), fed back from the gate output.
// So the output rises once the threshold is reached, falls only when all
// inputs are low, and holds otherwise. All three LUT contents come in through
// `cfg` (see ncl_pkg::th_cfg), so a flipped configuration cell turns the gate
// into the faulty circuit it becomes on a real FPGA: premature fire, no fire,
// no return to 0 or oscillation.
//
// Timing: the feedback loop through the Hold LUT is modelled with a delay of
// one `clk` cycle, the gate delay. NCL circuits are delay-insensitive, so any
// positive gate delay is a valid timing for them; registering the loop makes
// the model deterministic and lets an upset Hold LUT oscillate visibly (the
// output toggles every cycle) instead of as a zero-delay loop. `rst` puts the
// output in RST_VAL: 0 for ordinary and "n" gates, 1 for "d" gates. INVERT
// adds the output bubble of gates such as TH12b. Unused inputs (index >= N)
// do not exist; the LUT address bits above N are tied low.
module ncl_lut_gate
  import ncl_pkg::*;
#(
  parameter int unsigned N       = 4,     // number of gate inputs, 1..4
  parameter bit          RST_VAL = 1'b0,  // hold value after reset
  parameter bit          INVERT  = 1'b0   // output bubble
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  in,
  input  th_cfg_t       cfg,
  output logic          z
);

  logic [3:0] addr;
  logic       t1, t2, hold_next, z_int;

  always_comb begin
    addr         = '0;
    addr[N-1:0]  = in;
  end

  ncl_lut #(.K(4)) u_set   (.in(addr), .cells(cfg.set_lut),   .out(t1));
  ncl_lut #(.K(4)) u_reset (.in(addr), .cells(cfg.reset_lut), .out(t2));
  ncl_lut #(.K(3)) u_hold  (.in({t1, t2, z_int}), .cells(cfg.hold_lut), .out(hold_next));

  always_ff @(posedge clk) begin
    if (rst) z_int <= RST_VAL;
    else     z_int <= hold_next;
  end

  assign z = INVERT ? ~z_int : z_int;

endmodule

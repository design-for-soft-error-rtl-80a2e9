// ncl_full_adder: dual-rail NCL full adder, the computational block of the
// pipeline, built from four LUT-mapped threshold gates:
//   G1 = TH23  (ci.rail0, x.rail0, y.rail0)          -> co.rail0
//   G2 = TH23  (ci.rail1, x.rail1, y.rail1)          -> co.rail1
//   G3 = TH34w2(co.rail1 (weight 2), ci.rail0, x.rail0, y.rail0) -> s.rail0
//   G4 = TH34w2(co.rail0 (weight 2), ci.rail1, x.rail1, y.rail1) -> s.rail1
// The gate network and the gate types are the thesis's. The carry rails are
// the majority of the input rails; a sum rail fires either on the opposite
// carry rail together with one matching input rail, or on all three matching
// input rails. The four gates' LUT contents come in through cfg[0..3]
// (G1..G4) from the configuration memory, where an upset can be injected.
// Input-complete: the outputs become DATA only once all inputs are DATA and
// return to NULL only once all inputs are NULL. Delay: carry one clk after
// the inputs, sum two.
module ncl_full_adder
  import ncl_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  dr_t             ci,
  input  dr_t             x,
  input  dr_t             y,
  input  th_cfg_t [3:0]   cfg,   // LUT contents of G1..G4 (index 0..3)
  output dr_t             co,
  output dr_t             s
);

  ncl_lut_gate #(.N(3)) u_g1 (.clk(clk), .rst(rst),
    .in({y.rail0, x.rail0, ci.rail0}), .cfg(cfg[0]), .z(co.rail0));
  ncl_lut_gate #(.N(3)) u_g2 (.clk(clk), .rst(rst),
    .in({y.rail1, x.rail1, ci.rail1}), .cfg(cfg[1]), .z(co.rail1));
  ncl_lut_gate #(.N(4)) u_g3 (.clk(clk), .rst(rst),
    .in({y.rail0, x.rail0, ci.rail0, co.rail1}), .cfg(cfg[2]), .z(s.rail0));
  ncl_lut_gate #(.N(4)) u_g4 (.clk(clk), .rst(rst),
    .in({y.rail1, x.rail1, ci.rail1, co.rail0}), .cfg(cfg[3]), .z(s.rail1));

endmodule

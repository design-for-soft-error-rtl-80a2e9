// ncl_register: N-bit dual-rail NCL register stage with completion.
//
// Each rail of each bit passes through a resettable TH22 gate whose second
// input is the request `ki` from the next stage: with ki high (request DATA)
// a DATA wavefront is captured and held, with ki low (request NULL) a NULL
// wavefront is let through; a wavefront of the other kind is blocked, which
// keeps successive DATA wavefronts separated by NULL. Per bit a TH12b gate (a
// NOR) reports that the bit is NULL, and ncl_completion combines the N bits
// into `ko`: high = stage holds NULL and requests DATA from the previous
// stage, low = stage holds DATA and requests NULL.
//
// INIT selects the reset wavefront, as in the thesis: NULL (both rails reset
// by "n" gates), DATA0 or DATA1 (one rail reset high by a "d" gate). Every
// gate adds one clk of delay: q follows d one cycle after ki allows it, and ko
// follows q after 1 + ceil(log4 N) cycles.
module ncl_register
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH = 3,
  parameter dr_t         INIT  = DR_NULL
) (
  input  logic             clk,
  input  logic             rst,
  input  dr_t [WIDTH-1:0]  d,
  input  logic             ki,
  output dr_t [WIDTH-1:0]  q,
  output logic             ko
);

  localparam th_cfg_t TH22 = th_cfg(2, 2);
  localparam th_cfg_t TH12 = th_cfg(2, 1);

  logic [WIDTH-1:0] bit_null;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ncl_lut_gate #(.N(2), .RST_VAL(INIT.rail0)) u_r0 (
      .clk(clk), .rst(rst), .in({ki, d[i].rail0}), .cfg(TH22), .z(q[i].rail0));
    ncl_lut_gate #(.N(2), .RST_VAL(INIT.rail1)) u_r1 (
      .clk(clk), .rst(rst), .in({ki, d[i].rail1}), .cfg(TH22), .z(q[i].rail1));
    // TH12b: output low as soon as either rail is high.
    ncl_lut_gate #(.N(2), .RST_VAL(INIT != DR_NULL), .INVERT(1'b1)) u_done (
      .clk(clk), .rst(rst), .in({q[i].rail1, q[i].rail0}), .cfg(TH12), .z(bit_null[i]));
  end

  ncl_completion #(.WIDTH(WIDTH), .RST_VAL(INIT == DR_NULL)) u_comp (
    .clk(clk), .rst(rst), .a(bit_null), .ko(ko));

endmodule

// ncl_completion: completion component of an NCL register stage.
//
// Combines the per-bit completion signals ko[i] of an N-bit register stage
// into one acknowledge `ko`: it rises when every input is high and falls only
// when every input is low (C-element behaviour). As in the thesis it is a tree
// of TH44 gates, so it has ceil(log4 N) gate levels; the last group of a
// level that has 2 or 3 members uses TH22 or TH33, a single leftover is
// wired through to the next level. Each gate is an ncl_lut_gate, so each level
// adds one clk of delay. RST_VAL is the tree's value after reset: 1 for a
// stage that is reset to NULL (all bits complete and requesting DATA).
module ncl_completion
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH   = 4,
  parameter bit          RST_VAL = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] a,
  output logic             ko
);

  // Width of tree level l (level 0 = the inputs).
  function automatic int unsigned level_width(int unsigned l);
    int unsigned w = WIDTH;
    for (int unsigned i = 0; i < l; i++) w = (w + 3) / 4;
    return w;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned w = WIDTH;
    int unsigned n = 0;
    while (w > 1) begin
      w = (w + 3) / 4;
      n++;
    end
    return n;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  logic [WIDTH-1:0] node [LEVELS+1];

  assign node[0] = a;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned WIN  = level_width(l);
    localparam int unsigned WOUT = level_width(l + 1);
    for (genvar j = 0; j < WOUT; j++) begin : g_group
      localparam int unsigned G = (WIN - 4*j >= 4) ? 4 : WIN - 4*j;
      if (G == 1) begin : g_wire
        assign node[l+1][j] = node[l][4*j];
      end else begin : g_gate
        ncl_lut_gate #(.N(G), .RST_VAL(RST_VAL)) u_th (
          .clk(clk), .rst(rst),
          .in (node[l][4*j +: G]),
          .cfg(th_cfg(G, G)),
          .z  (node[l+1][j])
        );
      end
    end
    if (WOUT < WIDTH) begin : g_pad
      assign node[l+1][WIDTH-1:WOUT] = '0;
    end
  end

  assign ko = node[LEVELS][0];

endmodule

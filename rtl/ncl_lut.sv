// ncl_lut: SRAM-based K-input look-up table of an FPGA logic element.
//
// The 2**K configuration cells hold the truth table of any K-input function;
// the inputs steer a tree of pass-transistor multiplexers that selects one
// cell, so the output is simply cell[address]. Input in[0] (A) drives the
// first level of the tree and is therefore the least significant address
// bit, in[K-1] (D for K = 4) the most significant. Purely combinational.
// The cell contents come in through `cells`, so a configuration upset (a
// flipped cell) changes the implemented function until the cells are
// rewritten, which is the error model of this design.
module ncl_lut #(
  parameter int unsigned K = 4   // number of LUT inputs
) (
  input  logic [K-1:0]      in,
  input  logic [2**K-1:0]   cells,
  output logic              out
);

  // Multiplexer tree, one level per input, A first.
  logic [2**K-1:0] level [K+1];

  assign level[0] = cells;

  for (genvar l = 0; l < K; l++) begin : g_level
    for (genvar j = 0; j < 2**(K-l-1); j++) begin : g_mux
      assign level[l+1][j] = in[l] ? level[l][2*j+1] : level[l][2*j];
    end
    for (genvar j = 2**(K-l-1); j < 2**K; j++) begin : g_unused
      assign level[l+1][j] = 1'b0;
    end
  end

  assign out = level[K][0];

endmodule

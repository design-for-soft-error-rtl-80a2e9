// ncl_lut_config: configuration cells of the full adder's LUTs, with upset
// injection.
//
// Holds the Set, Reset and Hold LUT contents of gates G1..G4 of the full
// adder (G1, G2 = TH23; G3, G4 = TH34w2 with weight 2 on the first input).
// `rst` models (re)configuring the FPGA: it loads the fault-free contents.
// A pulse on `seu_flip` inverts one cell, chosen by gate, LUT and cell
// index, and the flipped cell stays wrong until the next reconfiguration:
// the permanent configuration upset studied by the thesis. Cell index = LUT
// address (Set/Reset: {in[3],in[2],in[1],in[0]}, first gate input least
// significant; Hold: {t1,t2,z}, only bits 2..0 used). Updates take one clk.
module ncl_lut_config
  import ncl_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           seu_flip,
  input  logic [1:0]     seu_gate,   // 0..3 = G1..G4
  input  lut_sel_e       seu_lut,
  input  logic [3:0]     seu_bit,
  output th_cfg_t [3:0]  cfg
);

  localparam th_cfg_t CFG_TH23   = th_cfg(3, 2);
  localparam th_cfg_t CFG_TH34W2 = th_cfg(4, 3, 2);

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg[0] <= CFG_TH23;
      cfg[1] <= CFG_TH23;
      cfg[2] <= CFG_TH34W2;
      cfg[3] <= CFG_TH34W2;
    end else if (seu_flip) begin
      unique case (seu_lut)
        LUT_SET:   cfg[seu_gate].set_lut[seu_bit]        <= ~cfg[seu_gate].set_lut[seu_bit];
        LUT_RESET: cfg[seu_gate].reset_lut[seu_bit]      <= ~cfg[seu_gate].reset_lut[seu_bit];
        LUT_HOLD:  cfg[seu_gate].hold_lut[seu_bit[2:0]]  <= ~cfg[seu_gate].hold_lut[seu_bit[2:0]];
        default: ;
      endcase
    end
  end

endmodule

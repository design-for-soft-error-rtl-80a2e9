// ncl_pkg: types and constants shared by the FPGA model of Null Convention
// Logic (NCL) circuits.
//
// A dual-rail NCL signal carries one bit on two wires (rail1, rail0):
// 00 = NULL (no data), 01 = DATA0, 10 = DATA1, 11 = invalid. Threshold
// gates with hysteresis are mapped onto three FPGA look-up tables: a Set LUT
// (fires when the weighted count of high inputs reaches the threshold), a
// Reset LUT (an OR of all inputs) and a 3-input Hold LUT z' = t2 & (t1 | z).
// The functions below compute those LUT contents, so any gate THmnWw.. of up
// to four inputs can be built. The encodings and the three-LUT structure
// follow the thesis; the LUT bit ordering is stated at each function.
package ncl_pkg;

  // Dual-rail bit, rail1 in the upper position as in (D1, D0).
  typedef struct packed {
    logic rail1;
    logic rail0;
  } dr_t;

  localparam dr_t DR_NULL  = '{rail1: 1'b0, rail0: 1'b0};
  localparam dr_t DR_DATA0 = '{rail1: 1'b0, rail0: 1'b1};
  localparam dr_t DR_DATA1 = '{rail1: 1'b1, rail0: 1'b0};

  // Contents of the three LUTs of one threshold gate (its configuration cells).
  // set_lut/reset_lut are addressed by {in[3], in[2], in[1], in[0]}, the
  // first (possibly weighted) input in[0] being the least significant bit.
  // hold_lut is addressed by {t1, t2, z}: t1 = Set LUT output, t2 = Reset LUT
  // output, z = current gate output.
  typedef struct packed {
    logic [15:0] set_lut;
    logic [15:0] reset_lut;
    logic [7:0]  hold_lut;
  } th_cfg_t;

  // Hold LUT z' = t2 & (t1 | z): ones at {t1,t2,z} = 011, 110, 111.
  localparam logic [7:0] HOLD_LUT = 8'b1100_1000;

  // Which of the three LUTs a configuration-bit address refers to.
  typedef enum logic [1:0] {
    LUT_SET   = 2'd0,
    LUT_RESET = 2'd1,
    LUT_HOLD  = 2'd2
  } lut_sel_e;

  // Set LUT of a gate with N inputs (N <= 4), threshold M and input weights
  // W0..W3 (1 for an unweighted input). Address bits at or above N are
  // unused inputs tied low; entries that set them are filled as if they
  // were low.
  function automatic logic [15:0] th_set_lut(int unsigned n, int unsigned m,
                                             int unsigned w0 = 1, int unsigned w1 = 1,
                                             int unsigned w2 = 1, int unsigned w3 = 1);
    logic [15:0] lut;
    int unsigned w [4];
    int unsigned sum;
    w[0] = w0; w[1] = w1; w[2] = w2; w[3] = w3;
    for (int unsigned a = 0; a < 16; a++) begin
      sum = 0;
      for (int unsigned i = 0; i < n; i++)
        if (a[i]) sum += w[i];
      lut[a] = (sum >= m);
    end
    return lut;
  endfunction

  // Reset LUT of an N-input gate: OR of the used inputs.
  function automatic logic [15:0] th_reset_lut(int unsigned n);
    logic [15:0] lut;
    for (int unsigned a = 0; a < 16; a++)
      lut[a] = ((a & ((1 << n) - 1)) != 0);
    return lut;
  endfunction

  function automatic th_cfg_t th_cfg(int unsigned n, int unsigned m,
                                     int unsigned w0 = 1, int unsigned w1 = 1,
                                     int unsigned w2 = 1, int unsigned w3 = 1);
    th_cfg_t c;
    c.set_lut   = th_set_lut(n, m, w0, w1, w2, w3);
    c.reset_lut = th_reset_lut(n);
    c.hold_lut  = HOLD_LUT;
    return c;
  endfunction

  function automatic logic dr_is_data(dr_t d);
    return d.rail1 ^ d.rail0;
  endfunction

  function automatic logic dr_is_null(dr_t d);
    return ~d.rail1 & ~d.rail0;
  endfunction

endpackage

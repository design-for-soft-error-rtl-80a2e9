// ncl_seu_top: NCL full-adder pipeline as mapped on an FPGA, with
// configuration-upset injection and the soft-error detection scheme.
//
// Datapath (all dual-rail NCL, every threshold gate built from Set/Reset/Hold
// LUTs):
//   ncl_source -> reg1 (3-bit NCL register) -> ncl_full_adder (G1..G4)
//              -> reg2 (2-bit NCL register) -> q_carry, q_sum
// reg1 acknowledges the source with ki; reg2's completion kf is both reg1's
// request and reg2's own request, so the output side accepts every
// wavefront at once. DATA and NULL wavefronts alternate through the stages
// under this four-phase handshake.
//
// Upsets: ncl_lut_config holds the LUT contents of G1..G4. A pulse on
// seu_flip inverts one configuration cell (seu_gate 0..3 = G1..G4, seu_lut
// 0 = Set, 1 = Reset, 2 = Hold, seu_bit = LUT address); rst reconfigures the
// device, restoring every cell and resetting the pipeline.
//
// Detection, as proposed in the thesis:
//   invalid_data        both rails high on a bit of the full adder's output
//                       (premature fire or oscillation of a gate),
//   deadlock_no_fire    kf stuck requesting DATA for K times the previous
//                       NULL-request phase,
//   deadlock_no_return0 kf stuck requesting NULL for K times the previous
//                       DATA-request phase.
// seu_alarm latches any of the three until rst; it is the request to
// reprogram the FPGA. Latching it is this design's choice.
//
// Timing: one clk per gate delay (see ncl_lut_gate); the detector counts the
// same clk. A fault-free DATA/NULL cycle of the pipeline takes 10 to 12
// clk cycles.
module ncl_seu_top
  import ncl_pkg::*;
#(
  parameter int unsigned CNT_W = 4,   // width of the detector's up-counters
  parameter int unsigned K     = 2    // allowed ratio of consecutive kf phases
) (
  input  logic        clk,
  input  logic        rst,
  // configuration upset injection
  input  logic        seu_flip,
  input  logic [1:0]  seu_gate,
  input  logic [1:0]  seu_lut,
  input  logic [3:0]  seu_bit,
  // pipeline
  output dr_t [2:0]   din,       // source wavefront {ci, x, y}
  output logic [2:0]  din_value, // value the source presents or last presented
  output logic        din_valid, // source presents DATA (0 = NULL)
  output logic        ki,        // reg1 completion: 1 = requests DATA
  output logic        kf,        // reg2 completion: 1 = requests DATA
  output dr_t         q_carry,
  output dr_t         q_sum,
  // detection
  output logic        invalid_data,
  output logic        deadlock_no_fire,
  output logic        deadlock_no_return0,
  output logic        seu_alarm
);

  th_cfg_t [3:0] cfg;
  dr_t [2:0]     q1;
  dr_t [1:0]     sc;          // full adder output {carry, sum}
  dr_t [1:0]     q2;

  ncl_lut_config u_cfg (
    .clk(clk), .rst(rst),
    .seu_flip(seu_flip), .seu_gate(seu_gate), .seu_lut(lut_sel_e'(seu_lut)),
    .seu_bit(seu_bit), .cfg(cfg));

  ncl_source u_src (
    .clk(clk), .rst(rst), .ki(ki), .out(din), .v(din_value), .is_data(din_valid));

  ncl_register #(.WIDTH(3), .INIT(DR_NULL)) u_reg1 (
    .clk(clk), .rst(rst), .d(din), .ki(kf), .q(q1), .ko(ki));

  ncl_full_adder u_fa (
    .clk(clk), .rst(rst),
    .ci(q1[2]), .x(q1[1]), .y(q1[0]), .cfg(cfg),
    .co(sc[1]), .s(sc[0]));

  ncl_register #(.WIDTH(2), .INIT(DR_NULL)) u_reg2 (
    .clk(clk), .rst(rst), .d(sc), .ki(kf), .q(q2), .ko(kf));

  assign q_carry = q2[1];
  assign q_sum   = q2[0];

  ncl_invalid_detect #(.WIDTH(2)) u_inv (.d(sc), .invalid(invalid_data));

  ncl_deadlock_detect #(.CNT_W(CNT_W), .K(K)) u_dl (
    .clk(clk), .rst(rst), .kf(kf),
    .deadlock_no_fire(deadlock_no_fire), .deadlock_no_return0(deadlock_no_return0));

  always_ff @(posedge clk) begin
    if (rst) seu_alarm <= 1'b0;
    else if (invalid_data | deadlock_no_fire | deadlock_no_return0) seu_alarm <= 1'b1;
  end

endmodule

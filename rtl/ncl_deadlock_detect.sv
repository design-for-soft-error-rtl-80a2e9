// ncl_deadlock_detect: deadlock detector on the request line kf between two
// neighbouring NCL registers.
//
// kf high means the register requests DATA, low means it requests NULL. An
// upset that keeps a gate from firing stops the pipeline with kf stuck high
// (no fire); one that keeps a gate from returning to 0 stops it with kf
// stuck low (no return to 0). Two ncl_phase_watch units compare each phase
// of kf with the phase before it:
//   - deadlock_no_return0: a NULL-request phase (kf low, T2) lasting K times
//     the preceding DATA-request phase (T1) or longer;
//   - deadlock_no_fire: a DATA-request phase (T3) lasting K times the
//     preceding NULL-request phase (T2) or longer.
// The thesis uses K = 2; clk must be much faster than the handshake.
module ncl_deadlock_detect #(
  parameter int unsigned CNT_W = 4,
  parameter int unsigned K     = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic kf,
  output logic deadlock_no_fire,
  output logic deadlock_no_return0
);

  ncl_phase_watch #(.CNT_W(CNT_W), .K(K)) u_no_return0 (
    .clk(clk), .rst(rst), .phase(kf), .deadlock(deadlock_no_return0));

  ncl_phase_watch #(.CNT_W(CNT_W), .K(K)) u_no_fire (
    .clk(clk), .rst(rst), .phase(~kf), .deadlock(deadlock_no_fire));

endmodule

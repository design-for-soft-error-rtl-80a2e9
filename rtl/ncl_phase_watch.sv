// ncl_phase_watch: one half of the deadlock detector, an up-counter, a
// multiply-by-K and a down-counter watching one handshake signal.
//
// A delay-insensitive circuit has no deadline, so a stuck handshake can only
// be told from a slow one by assuming a bound: a phase may last at most K
// times the phase before it. While `phase` is high the up-counter counts clk
// cycles (the measured phase, T_prev) and the down-counter is loaded with
// K * T_prev; while `phase` is low the up-counter is cleared and the
// down-counter counts down. When it reaches 0 the watched phase has lasted
// K * T_prev cycles or more and `deadlock` is raised; the down-counter stays
// at 0, so the flag stays high for as long as the handshake stays stuck, and
// drops when `phase` rises again.
// Own choices: the up-counter saturates at its maximum instead of wrapping,
// so a long phase gives a long (but finite) allowance; and the flag is armed
// only after one complete measured phase since reset, so the first watched
// phase after reset cannot raise a false alarm. The down-counter is log2(K)
// bits wider than the up-counter so that K times the largest count fits.
module ncl_phase_watch #(
  parameter int unsigned CNT_W = 4,   // up-counter width
  parameter int unsigned K     = 2    // allowed ratio of consecutive phases
) (
  input  logic clk,
  input  logic rst,
  input  logic phase,      // 1 = measured phase, 0 = watched phase
  output logic deadlock
);

  localparam int unsigned DW = CNT_W + $clog2(K);

  logic [CNT_W-1:0] up_cnt, up_next;
  logic [DW-1:0]    down_cnt;
  logic             armed;

  assign up_next = (&up_cnt) ? up_cnt : up_cnt + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      up_cnt   <= '0;
      down_cnt <= '0;
      armed    <= 1'b0;
    end else if (phase) begin
      up_cnt   <= up_next;
      down_cnt <= DW'(K) * DW'(up_next);
    end else begin
      up_cnt   <= '0;
      if (down_cnt != '0) down_cnt <= down_cnt - 1'b1;
      if (up_cnt != '0)   armed    <= 1'b1;
    end
  end

  assign deadlock = armed & ~phase & (down_cnt == '0);

endmodule

// ncl_source: input wavefront generator of the full-adder pipeline.
//
// Plays the environment in front of the first register: it answers the
// register's request `ki` with alternating wavefronts. While ki is high
// (request DATA) and it presents NULL, it presents the DATA wavefront of the
// 3-bit value v (out[2] = ci, most significant, out[0] = y); while ki is low
// (request NULL) and it presents DATA, it returns to NULL and advances v,
// which wraps after 7. The sequence DATA 000, NULL, DATA 001, NULL, ...
// is the one the thesis drives its pipeline with (its event counter steps on
// both edges of the request); here the request is sampled on clk and each
// answer takes one clk. After reset it presents NULL with v = 0.
module ncl_source
  import ncl_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            ki,
  output dr_t [2:0]       out,
  output logic [2:0]      v,
  output logic            is_data
);

  always_ff @(posedge clk) begin
    if (rst) begin
      is_data <= 1'b0;
      v       <= '0;
    end else if (ki && !is_data) begin
      is_data <= 1'b1;
    end else if (!ki && is_data) begin
      is_data <= 1'b0;
      v       <= v + 3'd1;
    end
  end

  always_comb begin
    for (int i = 0; i < 3; i++)
      out[i] = !is_data ? DR_NULL : (v[i] ? DR_DATA1 : DR_DATA0);
  end

endmodule

// ncl_invalid_detect: detector of the invalid dual-rail code.
//
// An upset that makes a threshold gate fire prematurely or oscillate shows
// up at the computational block's output as a bit with both rails high
// ("11"), which correct NCL logic never produces. The detector ANDs the two
// rails of each bit and ORs the results, as the thesis proposes; it is
// combinational and `invalid` is high for as long as the code is present.
module ncl_invalid_detect
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH = 2
) (
  input  dr_t [WIDTH-1:0] d,
  output logic            invalid
);

  logic [WIDTH-1:0] both;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign both[i] = d[i].rail1 & d[i].rail0;
  end

  assign invalid = |both;

endmodule

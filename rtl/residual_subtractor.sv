// residual_subtractor: extracts the Nikhilam residual of an operand about
// its radix, x = radix + z (neg = 0) or x = radix - z (neg = 1).
// z is the magnitude |x - radix| and neg flags x < radix. Because the RSU
// picks the power of two nearest the operand, z never exceeds a quarter
// of the radix and always fits in WIDTH bits. Combinational.
// Magnitude-and-sign output is this design's choice; the sign drives the
// add/subtract controls of the multiplier.
module residual_subtractor #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH:0]   radix,
  output logic [WIDTH-1:0] z,
  output logic             neg
);
  logic [WIDTH:0] diff;

  always_comb begin
    neg  = ({1'b0, x} < radix);
    diff = neg ? (radix - {1'b0, x}) : ({1'b0, x} - radix);
    z    = diff[WIDTH-1:0];
  end
endmodule

// add_sub: adder-subtractor of two signed words.
// y = a + b when sub is 0 and y = a - b when sub is 1, formed as one
// addition of a, b with every bit inverted under sub, and a carry-in of
// sub (two's complement). Purely combinational; the result wraps at
// WIDTH bits, so callers size WIDTH to hold their range.
// Used twice inside the Nikhilam multiplier and twice to combine the four
// real products of the complex multiplier. The carry-in formulation is a
// choice of this design; the structure only calls for an adder-subtractor.
module add_sub #(
  parameter int unsigned WIDTH = 34
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  input  logic                    sub,
  output logic signed [WIDTH-1:0] y
);
  logic [WIDTH-1:0] b_eff;

  always_comb begin
    b_eff = b ^ {WIDTH{sub}};
    y     = signed'(a + b_eff + WIDTH'(sub));
  end
endmodule

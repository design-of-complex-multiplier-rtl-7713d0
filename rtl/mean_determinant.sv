// mean_determinant: forms twice the mean of the two candidate radices,
// twice_mean = lo + hi = 2^(n-1) + 2^n.
// The RSU compares 2*X against this sum, which is the same as comparing X
// against the mean (2^(n-1)+2^n)/2 but needs no half bit when n-1 = 0.
// Outputting the doubled mean is this design's choice. Combinational.
module mean_determinant #(
  parameter int unsigned WIDTH = 17
) (
  input  logic [WIDTH-1:0] lo,
  input  logic [WIDTH-1:0] hi,
  output logic [WIDTH:0]   twice_mean
);
  always_comb twice_mean = {1'b0, lo} + {1'b0, hi};
endmodule

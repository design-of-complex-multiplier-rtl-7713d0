// urdhva_multiplier: unsigned WIDTH x WIDTH multiplier organised by the
// vertical-and-crosswise (Urdhva-tiryakbhyam) rule, used for the residual
// product z1*z2.
// Column c of the product collects every cross product a[i]&b[c-i]; the
// column total plus the carry coming from column c-1 gives product bit c
// (its LSB) and the carry passed to column c+1 (the rest). Columns run
// from the LSB up, as the vertical/crosswise steps are done by hand.
// Combinational; p = a*b exactly. The ripple of column carries is this
// design's choice of how the column sums are merged.
module urdhva_multiplier #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);
  // A column total is at most WIDTH cross products plus a carry below 2*WIDTH.
  localparam int unsigned CW = $clog2(4 * WIDTH);

  logic [CW-1:0] carry;
  logic [CW-1:0] total;

  always_comb begin
    carry = '0;
    p     = '0;
    for (int c = 0; c < int'(2 * WIDTH); c++) begin
      total = carry;
      for (int i = 0; i < int'(WIDTH); i++) begin
        if (c - i >= 0 && c - i < int'(WIDTH)) begin
          total = total + CW'(a[i] & b[c-i]);
        end
      end
      p[c]  = total[0];
      carry = total >> 1;
    end
  end
endmodule

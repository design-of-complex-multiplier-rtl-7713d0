// left_shifter: logarithmic barrel shifter, dout = din * 2^amount.
// Stage s shifts by 2^s when bit s of amount is set, so the shift takes
// SH_W multiplexer levels. Bits shifted past OUT_W are lost; the caller
// sizes OUT_W for its range. Combinational.
// In the RSU it turns a leading-one index into a power of two (din = 1);
// in the Nikhilam multiplier it forms z2*2^(k1-k2) and 2^k2*(...).
// The barrel structure is a choice of this design.
module left_shifter #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 34,
  parameter int unsigned SH_W  = 5
) (
  input  logic [IN_W-1:0]  din,
  input  logic [SH_W-1:0]  amount,
  output logic [OUT_W-1:0] dout
);
  logic [OUT_W-1:0] stage [SH_W+1];

  always_comb begin
    stage[0] = OUT_W'(din);
    for (int s = 0; s < int'(SH_W); s++) begin
      stage[s+1] = amount[s] ? (stage[s] << (2 ** s)) : stage[s];
    end
    dout = stage[SH_W];
  end
endmodule

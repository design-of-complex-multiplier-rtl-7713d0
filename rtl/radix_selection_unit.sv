// radix_selection_unit (RSU): picks the power of two nearest an operand,
// the radix about which the Nikhilam residual is taken.
// An exponent determinant finds the operand's leading one at bit n-1.
// A shifter turns it into 2^(n-1), an incrementer gives n, and a second
// shifter gives 2^n. The mean determinant adds the two and a comparator
// checks 2X against that sum (X against the mean 3*2^(n-2)): above it the
// radix is 2^n, otherwise 2^(n-1). A multiplexer driven by the comparator
// delivers the radix.
// Interface: start (one-cycle pulse) captures x; done pulses when radix
// and zero are valid, and they stay valid until the next start. zero
// marks a zero operand, which has no radix (radix reads 0).
// Timing: done is set one edge after the exponent determinant's done.
// The structure follows the described RSU; comparing doubled values,
// taking the lower radix on equality and registering the result are this
// design's choices.
module radix_selection_unit #(
  parameter int unsigned WIDTH = 16,
  localparam int unsigned EXP_W = (WIDTH > 1) ? $clog2(WIDTH) : 1,
  localparam int unsigned SH_W  = $clog2(WIDTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [WIDTH-1:0] x,
  output logic           done,
  output logic           zero,
  output logic [WIDTH:0] radix
);
  logic [WIDTH-1:0] x_q;
  logic             ed_done, ed_zero;
  logic [EXP_W-1:0] ed_exp;
  logic [SH_W-1:0]  n_lo, n_hi;
  logic [WIDTH:0]   pow_lo, pow_hi;
  logic [WIDTH+1:0] twice_mean;
  logic             above;

  exponent_determinant #(.WIDTH(WIDTH)) u_ed (
    .clk, .rst_n, .start, .din(x),
    .done(ed_done), .zero(ed_zero), .exponent(ed_exp)
  );

  always_comb begin
    n_lo = SH_W'(ed_exp);
    n_hi = n_lo + 1'b1;           // incrementer
  end

  left_shifter #(.IN_W(1), .OUT_W(WIDTH + 1), .SH_W(SH_W)) u_sh_lo (
    .din(1'b1), .amount(n_lo), .dout(pow_lo)
  );
  left_shifter #(.IN_W(1), .OUT_W(WIDTH + 1), .SH_W(SH_W)) u_sh_hi (
    .din(1'b1), .amount(n_hi), .dout(pow_hi)
  );
  mean_determinant #(.WIDTH(WIDTH + 1)) u_md (
    .lo(pow_lo), .hi(pow_hi), .twice_mean(twice_mean)
  );

  always_comb above = ({1'b0, x_q, 1'b0} > twice_mean);  // comparator

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      radix <= '0;
      zero  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= ed_done;
      if (start) x_q <= x;
      if (ed_done) begin
        zero  <= ed_zero;
        radix <= ed_zero ? '0 : (above ? pow_hi : pow_lo);
      end
    end
  end
endmodule

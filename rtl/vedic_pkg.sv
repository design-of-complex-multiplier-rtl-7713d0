// vedic_pkg: constants shared by the Nikhilam complex multiplier.
// OPERAND_W is the width of each real or imaginary operand; the design
// is built around 16-bit parts, giving a (16,16)x(16,16) complex product.
// ACC_W is the signed width used for every intermediate and result word:
// two bits above the 2N-bit real product, so that Ar*Bi + Ai*Br (up to
// 2*(2^N-1)^2) and Ar*Br - Ai*Bi (down to -(2^N-1)^2) both fit.
package vedic_pkg;
  localparam int unsigned OPERAND_W = 16;

  function automatic int unsigned acc_width(int unsigned n);
    return 2 * n + 2;
  endfunction
endpackage

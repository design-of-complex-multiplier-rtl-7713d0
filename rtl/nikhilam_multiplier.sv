// nikhilam_multiplier: unsigned N x N multiplier built on the Nikhilam
// ("all from 9 and last from 10") rule with power-of-two bases.
// Each operand is written about its nearest power of two,
//   X = 2^k1 + z1',  Y = 2^k2 + z2'   (z1', z2' signed residuals),
// and with k1 >= k2 the product is
//   P = 2^k2 * (X + z2' * 2^(k1-k2)) + z1' * z2'.
// Datapath: two radix selection units give the radices; two exponent
// determinants give k1, k2 from them; residual subtractors give |z| and
// sign; a subtractor gives k1-k2; a shifter forms z2*2^(k1-k2); the first
// adder-subtractor forms X +/- that; a second shifter multiplies by 2^k2;
// the Urdhva array multiplier forms z1*z2; the second adder-subtractor
// adds or subtracts it according to the residual signs.
// A multiplexer first routes the operand with the larger exponent to the
// X side so that k1-k2 is never negative, and a zero operand yields a
// zero product directly; both are this design's additions.
// Interface: start (one-cycle pulse) captures x and y; done pulses when p
// is valid; p holds until the next start. busy is high in between.
// Timing, counting the start edge as edge 1: with R the later of the two
// RSU done edges, done is set at edge R+1 if an operand is zero, and
// otherwise at edge R+1+E+1, E being the longer ED latency on the radices
// (an ED on a radix 2^k takes N+2-k edges). The sequencing FSM is this
// design's own.
module nikhilam_multiplier
  import vedic_pkg::*;
#(
  parameter int unsigned N = OPERAND_W,
  localparam int unsigned W    = acc_width(N),
  localparam int unsigned K_W  = $clog2(N + 1),
  localparam int unsigned SH_W = $clog2(N + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p
);
  typedef enum logic [1:0] {S_IDLE, S_RSU, S_ED} state_t;
  state_t state;

  logic [N-1:0] x_q, y_q;
  logic         rsu_x_done, rsu_y_done, rsu_x_zero, rsu_y_zero;
  logic [N:0]   radix_x, radix_y;
  logic         got_rx, got_ry, got_ex, got_ey;
  logic         ed_go;
  logic         ed_x_done, ed_y_done;
  logic [K_W-1:0] kx, ky;

  radix_selection_unit #(.WIDTH(N)) u_rsu_x (
    .clk, .rst_n, .start, .x(x), .done(rsu_x_done), .zero(rsu_x_zero), .radix(radix_x)
  );
  radix_selection_unit #(.WIDTH(N)) u_rsu_y (
    .clk, .rst_n, .start, .x(y), .done(rsu_y_done), .zero(rsu_y_zero), .radix(radix_y)
  );

  // Exponent determinants on the selected radices give k1 and k2.
  exponent_determinant #(.WIDTH(N + 1)) u_ed_x (
    .clk, .rst_n, .start(ed_go), .din(radix_x), .done(ed_x_done), .zero(), .exponent(kx)
  );
  exponent_determinant #(.WIDTH(N + 1)) u_ed_y (
    .clk, .rst_n, .start(ed_go), .din(radix_y), .done(ed_y_done), .zero(), .exponent(ky)
  );

  // ---------------- combinational assembly ----------------
  logic [N-1:0]  zx, zy;
  logic          nx, ny;
  logic          swap;
  logic [N-1:0]  xa, z1, z2;
  logic          n1, n2;
  logic [K_W-1:0] k1, k2, kdiff;
  logic [W-1:0]  z2_sh, s1_u, prod_sh;
  logic signed [W-1:0] s1, result;
  logic [2*N-1:0] zz;

  residual_subtractor #(.WIDTH(N)) u_res_x (.x(x_q), .radix(radix_x), .z(zx), .neg(nx));
  residual_subtractor #(.WIDTH(N)) u_res_y (.x(y_q), .radix(radix_y), .z(zy), .neg(ny));

  always_comb begin
    swap  = (kx < ky);
    xa    = swap ? y_q : x_q;
    z1    = swap ? zy  : zx;
    n1    = swap ? ny  : nx;
    k1    = swap ? ky  : kx;
    z2    = swap ? zx  : zy;
    n2    = swap ? nx  : ny;
    k2    = swap ? kx  : ky;
    kdiff = k1 - k2;                      // exponent subtractor
  end

  left_shifter #(.IN_W(N), .OUT_W(W), .SH_W(SH_W)) u_sh_z2 (
    .din(z2), .amount(SH_W'(kdiff)), .dout(z2_sh)
  );
  add_sub #(.WIDTH(W)) u_as1 (
    .a(signed'(W'(xa))), .b(signed'(z2_sh)), .sub(n2), .y(s1)
  );
  // X +/- z2*2^(k1-k2) equals Y*2^(k1-k2) and is never negative.
  assign s1_u = unsigned'(s1);
  left_shifter #(.IN_W(W), .OUT_W(W), .SH_W(SH_W)) u_sh_k2 (
    .din(s1_u), .amount(SH_W'(k2)), .dout(prod_sh)
  );
  urdhva_multiplier #(.WIDTH(N)) u_mul (.a(z1), .b(z2), .p(zz));
  add_sub #(.WIDTH(W)) u_as2 (
    .a(signed'(prod_sh)), .b(signed'(W'(zz))), .sub(n1 ^ n2), .y(result)
  );

  // ---------------- sequencing ----------------
  logic rx_ok, ry_ok, ex_ok, ey_ok;
  always_comb begin
    rx_ok = got_rx | rsu_x_done;
    ry_ok = got_ry | rsu_y_done;
    ex_ok = got_ex | ed_x_done;
    ey_ok = got_ey | ed_y_done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      x_q    <= '0;
      y_q    <= '0;
      got_rx <= 1'b0;
      got_ry <= 1'b0;
      got_ex <= 1'b0;
      got_ey <= 1'b0;
      ed_go  <= 1'b0;
      done   <= 1'b0;
      p      <= '0;
    end else begin
      done  <= 1'b0;
      ed_go <= 1'b0;
      if (start) begin
        x_q    <= x;
        y_q    <= y;
        got_rx <= 1'b0;
        got_ry <= 1'b0;
        got_ex <= 1'b0;
        got_ey <= 1'b0;
        state  <= S_RSU;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_RSU: begin
            got_rx <= rx_ok;
            got_ry <= ry_ok;
            if (rx_ok && ry_ok) begin
              if (rsu_x_zero || rsu_y_zero) begin
                p     <= '0;
                done  <= 1'b1;
                state <= S_IDLE;
              end else begin
                ed_go <= 1'b1;
                state <= S_ED;
              end
            end
          end
          S_ED: begin
            got_ex <= ex_ok;
            got_ey <= ey_ok;
            if (ex_ok && ey_ok && !ed_go) begin
              p     <= result[2*N-1:0];
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  always_comb busy = (state != S_IDLE);

  a_nonneg_s1 : assert property (@(posedge clk) disable iff (!rst_n)
    state == S_ED && ex_ok && ey_ok |-> !s1[W-1]);
endmodule

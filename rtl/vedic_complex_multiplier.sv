// vedic_complex_multiplier: (N,N)x(N,N) complex multiplier,
//   Cr = Ar*Br - Ai*Bi,   Ci = Ar*Bi + Ai*Br,
// with N-bit unsigned real and imaginary parts (16 by default).
// Four Nikhilam multipliers form the four real products in parallel; an
// adder-subtractor in subtract mode gives Cr and one in add mode gives Ci.
// Because each Nikhilam multiplier takes a data-dependent number of
// cycles (its exponent determinants search bit by bit), the combiner
// waits until all four have reported done, then registers Cr and Ci.
// Interface: start (one-cycle pulse) captures the operands; done pulses
// when cr and ci are valid; they hold until the next start; busy is high
// in between. cr and ci are signed, 2N+2 bits wide.
// Timing, counting the start edge as edge 1: done is set one edge after
// the last of the four real multipliers sets its done.
// The four-multiplier direct structure follows the described design; the
// handshake, widths and registered outputs are this design's choices.
module vedic_complex_multiplier
  import vedic_pkg::*;
#(
  parameter int unsigned N = OPERAND_W,
  localparam int unsigned W = acc_width(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [N-1:0]        ar,
  input  logic [N-1:0]        ai,
  input  logic [N-1:0]        br,
  input  logic [N-1:0]        bi,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] cr,
  output logic signed [W-1:0] ci
);
  // Products: 0 = Ar*Br, 1 = Ai*Bi, 2 = Ar*Bi, 3 = Ai*Br
  logic [3:0]       m_done, got;
  logic [3:0]       m_busy;
  logic [2*N-1:0]   m_p [4];
  logic [N-1:0]     m_a [4];
  logic [N-1:0]     m_b [4];
  logic signed [W-1:0] re_sum, im_sum;
  logic             running;

  always_comb begin
    m_a[0] = ar; m_b[0] = br;
    m_a[1] = ai; m_b[1] = bi;
    m_a[2] = ar; m_b[2] = bi;
    m_a[3] = ai; m_b[3] = br;
  end

  for (genvar g = 0; g < 4; g++) begin : g_mul
    nikhilam_multiplier #(.N(N)) u_mul (
      .clk, .rst_n, .start, .x(m_a[g]), .y(m_b[g]),
      .busy(m_busy[g]), .done(m_done[g]), .p(m_p[g])
    );
  end

  add_sub #(.WIDTH(W)) u_real (
    .a(signed'(W'(m_p[0]))), .b(signed'(W'(m_p[1]))), .sub(1'b1), .y(re_sum)
  );
  add_sub #(.WIDTH(W)) u_imag (
    .a(signed'(W'(m_p[2]))), .b(signed'(W'(m_p[3]))), .sub(1'b0), .y(im_sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got     <= '0;
      running <= 1'b0;
      done    <= 1'b0;
      cr      <= '0;
      ci      <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        got     <= '0;
        running <= 1'b1;
      end else if (running) begin
        got <= got | m_done;
        if (&(got | m_done)) begin
          cr      <= re_sum;
          ci      <= im_sum;
          done    <= 1'b1;
          running <= 1'b0;
        end
      end
    end
  end

  always_comb busy = running;

  // A multiplier that has reported done must not still be busy.
  a_done_not_busy : assert property (@(posedge clk) disable iff (!rst_n)
    running && !start |-> ((got & m_busy) == '0));
endmodule

// tb_vedic_complex_multiplier: end-to-end test of the (16,16)x(16,16)
// complex multiplier at its default size.
// Each operation drives four 16-bit parts, waits for done and compares
// Cr = Ar*Br - Ai*Bi and Ci = Ar*Bi + Ai*Br with integer arithmetic, and
// the cycle count with one edge more than the slowest real product.
// It also counts the mechanisms the datapath has to exercise, from the
// operands: an upper and a lower radix choice, the operand swap when the
// first factor has the smaller radix exponent, a zero factor, a residual
// product that is subtracted (residual signs differ) and one that is
// added, a negative real part and an imaginary part above 2^(2N). A
// mechanism that never occurred counts as a failure.
module tb_vedic_complex_multiplier;
  import vedic_ref_pkg::*;
  localparam int N = 16;
  localparam int W = 2 * N + 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] ar = '0, ai = '0, br = '0, bi = '0;
  logic busy, done;
  logic signed [W-1:0] cr, ci;
  int checks = 0, failures = 0;

  typedef enum int {M_UPPER, M_LOWER, M_SWAP, M_ZERO, M_RES_SUB, M_RES_ADD,
                    M_CR_NEG, M_CI_WIDE, M_COUNT} mech_t;
  int mech [M_COUNT];

  vedic_complex_multiplier dut (
    .clk, .rst_n, .start, .ar, .ai, .br, .bi, .busy, .done, .cr, .ci
  );

  always #5 clk = ~clk;

  function automatic void note_operand(longint unsigned v);
    if (v == 0) return;
    if (radix_of(v) > v) mech[M_UPPER]++;
    else if (radix_of(v) < v) mech[M_LOWER]++;
  endfunction

  function automatic void note_product(longint unsigned a, longint unsigned b);
    if (a == 0 || b == 0) begin mech[M_ZERO]++; return; end
    if (msb_index(radix_of(a)) < msb_index(radix_of(b))) mech[M_SWAP]++;
    if (radix_of(a) != a && radix_of(b) != b) begin
      if ((radix_of(a) > a) != (radix_of(b) > b)) mech[M_RES_SUB]++;
      else mech[M_RES_ADD]++;
    end
  endfunction

  task automatic run(longint unsigned a_r, longint unsigned a_i,
                     longint unsigned b_r, longint unsigned b_i);
    int lat, exp_lat;
    longint exp_r, exp_i;
    @(negedge clk);
    ar = N'(a_r); ai = N'(a_i); br = N'(b_r); bi = N'(b_i); start = 1;
    @(posedge clk); lat = 1; #1;
    start = 0;
    while (!done && lat < 200) begin @(posedge clk); lat++; #1; end
    exp_r = longint'(a_r * b_r) - longint'(a_i * b_i);
    exp_i = longint'(a_r * b_i) + longint'(a_i * b_r);
    exp_lat = nik_latency(a_r, b_r, N);
    if (nik_latency(a_i, b_i, N) > exp_lat) exp_lat = nik_latency(a_i, b_i, N);
    if (nik_latency(a_r, b_i, N) > exp_lat) exp_lat = nik_latency(a_r, b_i, N);
    if (nik_latency(a_i, b_r, N) > exp_lat) exp_lat = nik_latency(a_i, b_r, N);
    exp_lat++;
    checks += 3;
    if (cr !== W'(exp_r)) begin
      failures++; $display("FAIL Cr (%0d+j%0d)(%0d+j%0d) got %0d exp %0d", a_r, a_i, b_r, b_i, cr, exp_r);
    end
    if (ci !== W'(exp_i)) begin
      failures++; $display("FAIL Ci (%0d+j%0d)(%0d+j%0d) got %0d exp %0d", a_r, a_i, b_r, b_i, ci, exp_i);
    end
    if (lat != exp_lat) begin
      failures++; $display("FAIL latency got %0d exp %0d", lat, exp_lat);
    end
    note_operand(a_r); note_operand(a_i); note_operand(b_r); note_operand(b_i);
    note_product(a_r, b_r); note_product(a_i, b_i);
    note_product(a_r, b_i); note_product(a_i, b_r);
    if (exp_r < 0) mech[M_CR_NEG]++;
    if (exp_i >= (longint'(1) << (2 * N))) mech[M_CI_WIDE]++;
  endtask

  function automatic longint unsigned rnd();
    return longint'($urandom_range(0, 65535) >> $urandom_range(0, 16));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mech[m]) mech[m] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 0, 0, 0);
    run(3, 4, 5, 6);
    run(65535, 65535, 65535, 65535);
    run(1, 65535, 1, 65535);
    run(0, 1000, 2000, 0);
    run(100, 30000, 45000, 7);
    for (int i = 0; i < 600; i++) run(rnd(), rnd(), rnd(), rnd());
    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      $display("mechanism %s occurred %0d times", mech_t'(m), mech[m]);
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never occurred", mech_t'(m)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

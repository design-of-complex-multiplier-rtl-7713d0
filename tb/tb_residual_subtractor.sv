// tb_residual_subtractor: for random non-zero operands and their nearest
// power-of-two radix, checks that z = |x - radix| and neg = (x < radix),
// so that x = radix + z or radix - z.
module tb_residual_subtractor;
  import vedic_ref_pkg::*;
  localparam int unsigned W = 16;
  logic [W-1:0] x, z;
  logic [W:0]   radix;
  logic         neg;
  int checks = 0, failures = 0;

  residual_subtractor #(.WIDTH(W)) dut (.x, .radix, .z, .neg);

  task automatic check(longint unsigned v);
    longint unsigned r = radix_of(v);
    longint unsigned ez = (v < r) ? r - v : v - r;
    x = W'(v); radix = (W + 1)'(r);
    #1;
    checks++;
    if (z !== W'(ez) || neg !== (v < r)) begin
      failures++;
      $display("FAIL x=%0d radix=%0d z=%0d neg=%0b", v, r, z, neg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1); check(3); check(5); check(7); check(65535); check(49152); check(49153);
    for (int i = 0; i < 2000; i++) check($urandom_range(1, 65535));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

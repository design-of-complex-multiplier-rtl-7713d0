// tb_mean_determinant: checks that the mean determinant returns
// 2^(n-1)+2^n for every radix pair of a 16-bit operand, and the plain sum
// for random inputs.
module tb_mean_determinant;
  localparam int unsigned W = 17;
  logic [W-1:0] lo, hi;
  logic [W:0]   twice_mean;
  int checks = 0, failures = 0;

  mean_determinant #(.WIDTH(W)) dut (.lo, .hi, .twice_mean);

  task automatic check(longint unsigned l, longint unsigned h);
    lo = W'(l); hi = W'(h);
    #1;
    checks++;
    if (twice_mean !== (W + 1)'(l + h)) begin
      failures++;
      $display("FAIL lo=%0d hi=%0d got=%0d", l, h, twice_mean);
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
    for (int n = 1; n <= 16; n++) check(64'd1 << (n - 1), 64'd1 << n);
    for (int i = 0; i < 500; i++) check($urandom_range(0, 131071), $urandom_range(0, 131071));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

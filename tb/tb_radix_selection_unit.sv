// tb_radix_selection_unit: checks the chosen radix against the nearest
// power of two (lower one when the operand is at or below the mean of the
// two candidates), the zero flag and the cycle count, for values around
// every mean point and random values. It counts how often the upper and
// the lower radix were chosen and fails if either never was.
module tb_radix_selection_unit;
  import vedic_ref_pkg::*;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] x = '0;
  logic done, zero;
  logic [W:0] radix;
  int checks = 0, failures = 0, n_upper = 0, n_lower = 0;

  radix_selection_unit #(.WIDTH(W)) dut (.clk, .rst_n, .start, .x, .done, .zero, .radix);

  always #5 clk = ~clk;

  task automatic run(longint unsigned v);
    int lat;
    longint unsigned r;
    @(negedge clk);
    x = W'(v); start = 1;
    @(posedge clk); lat = 1; #1;
    start = 0;
    while (!done && lat < 100) begin @(posedge clk); lat++; #1; end
    r = radix_of(v);
    checks += 3;
    if (zero !== (v == 0)) begin failures++; $display("FAIL zero v=%0d", v); end
    if (v != 0 && radix !== (W + 1)'(r)) begin
      failures++; $display("FAIL radix v=%0d got=%0d exp=%0d", v, radix, r);
    end
    if (lat != rsu_latency(v, W)) begin
      failures++; $display("FAIL latency v=%0d got=%0d exp=%0d", v, lat, rsu_latency(v, W));
    end
    if (v != 0) begin
      if (r > v) n_upper++;
      else n_lower++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(3); run(65535);
    for (int p = 2; p < int'(W); p++) begin
      longint unsigned m;
      m = 3 * (64'd1 << (p - 1));   // 1.5 * 2^p, the mean of 2^p and 2^(p+1)
      run(m - 1); run(m); run(m + 1);
    end
    for (int i = 0; i < 300; i++) run($urandom_range(1, 65535) >> $urandom_range(0, 15));
    checks += 2;
    if (n_upper == 0) begin failures++; $display("FAIL upper radix never chosen"); end
    if (n_lower == 0) begin failures++; $display("FAIL lower radix never chosen"); end
    $display("upper=%0d lower=%0d", n_upper, n_lower);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nikhilam_multiplier: multiplies corner values (zero, one, powers of
// two, values at the radix means, all ones) and random operands of all
// magnitudes, checking the product against integer multiplication and
// the cycle count against the sum of the RSU and ED search times.
module tb_nikhilam_multiplier;
  import vedic_ref_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] x = '0, y = '0;
  logic busy, done;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  nikhilam_multiplier #(.N(N)) dut (.clk, .rst_n, .start, .x, .y, .busy, .done, .p);

  always #5 clk = ~clk;

  task automatic run(longint unsigned a, longint unsigned b);
    int lat;
    @(negedge clk);
    x = N'(a); y = N'(b); start = 1;
    @(posedge clk); lat = 1; #1;
    start = 0;
    while (!done && lat < 200) begin @(posedge clk); lat++; #1; end
    checks += 2;
    if (p !== (2 * N)'(a * b)) begin
      failures++; $display("FAIL %0d * %0d got %0d", a, b, p);
    end
    if (lat != nik_latency(a, b, N)) begin
      failures++; $display("FAIL latency %0d*%0d got=%0d exp=%0d", a, b, lat, nik_latency(a, b, N));
    end
  endtask

  function automatic longint unsigned rnd();
    return longint'($urandom_range(0, 65535) >> $urandom_range(0, 16));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 0); run(0, 123); run(77, 0); run(1, 1); run(1, 65535); run(65535, 65535);
    run(96, 100); run(12, 40000); run(40000, 12); run(47, 3); run(49152, 49153);
    for (int i = 0; i < 16; i++) run(64'd1 << i, 64'd3 << (i / 2));
    for (int i = 0; i < 1500; i++) run(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_exponent_determinant: starts a search for every single-bit word,
// zero, all-ones and random words, and checks the exponent (leading-one
// index), the zero flag and the number of cycles from start to done.
module tb_exponent_determinant;
  import vedic_ref_pkg::*;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] din = '0;
  logic done, zero;
  logic [$clog2(W)-1:0] exponent;
  int checks = 0, failures = 0;

  exponent_determinant #(.WIDTH(W)) dut (.clk, .rst_n, .start, .din, .done, .zero, .exponent);

  always #5 clk = ~clk;

  task automatic run(longint unsigned v);
    int lat, exp_msb;
    @(negedge clk);
    din = W'(v); start = 1;
    @(posedge clk); lat = 1; #1;
    start = 0;
    while (!done && lat < 100) begin @(posedge clk); lat++; #1; end
    exp_msb = msb_index(v);
    checks += 3;
    if (zero !== (v == 0)) begin failures++; $display("FAIL zero v=%h", v); end
    if (v != 0 && int'(exponent) != exp_msb) begin
      failures++; $display("FAIL exponent v=%h got=%0d exp=%0d", v, exponent, exp_msb);
    end
    if (lat != ed_latency(v, W)) begin
      failures++; $display("FAIL latency v=%h got=%0d exp=%0d", v, lat, ed_latency(v, W));
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
    run(0);
    for (int i = 0; i < int'(W); i++) run(64'd1 << i);
    run(16'hFFFF);
    for (int i = 0; i < 300; i++) run($urandom_range(0, 65535) >> $urandom_range(0, 15));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

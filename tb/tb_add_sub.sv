// tb_add_sub: checks the adder-subtractor against integer + and - on
// corner values and random signed operands, in both modes.
module tb_add_sub;
  localparam int unsigned W = 34;
  logic signed [W-1:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  add_sub #(.WIDTH(W)) dut (.a, .b, .sub, .y);

  task automatic check(longint sa, longint sb, bit s);
    longint expv;
    a = W'(sa); b = W'(sb); sub = s;
    #1;
    expv = s ? sa - sb : sa + sb;
    checks++;
    if (y !== W'(expv)) begin
      failures++;
      $display("FAIL a=%0d b=%0d sub=%0b y=%0d exp=%0d", sa, sb, s, y, expv);
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
    check(0, 0, 0); check(0, 0, 1); check(5, 7, 1); check(-3, 9, 0);
    check(64'd4294967295, 64'd4294967295, 0);
    check(0, 64'd4294967295, 1);
    for (int i = 0; i < 2000; i++) begin
      longint ra = longint'($urandom) - longint'($urandom);
      longint rb = longint'($urandom) - longint'($urandom);
      check(ra, rb, $urandom_range(0, 1) == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_urdhva_multiplier: checks the vertical-and-crosswise multiplier
// against integer multiplication on corner values and random operands at
// 16 bits, and exhaustively for a 4 x 4 instance.
module tb_urdhva_multiplier;
  localparam int unsigned W = 16;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  urdhva_multiplier #(.WIDTH(W)) dut (.a, .b, .p);

  logic [3:0] a4, b4;
  logic [7:0] p4;
  urdhva_multiplier #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .p(p4));

  task automatic check(longint unsigned va, longint unsigned vb);
    a = W'(va); b = W'(vb);
    #1;
    checks++;
    if (p !== (2 * W)'(va * vb)) begin
      failures++;
      $display("FAIL %0d * %0d = %0d", va, vb, p);
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
    check(0, 0); check(65535, 65535); check(1, 65535); check(65535, 0); check(12, 13);
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (p4 !== 8'(i * j)) begin
          failures++; $display("FAIL 4x4 %0d * %0d = %0d", i, j, p4);
        end
      end
    end
    for (int i = 0; i < 3000; i++) check($urandom_range(0, 65535), $urandom_range(0, 65535));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

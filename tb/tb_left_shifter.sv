// tb_left_shifter: checks the barrel shifter against the << operator for
// every shift amount with random data, truncated to the output width.
module tb_left_shifter;
  localparam int unsigned IN_W = 16, OUT_W = 34, SH_W = 5;
  logic [IN_W-1:0]  din;
  logic [SH_W-1:0]  amount;
  logic [OUT_W-1:0] dout;
  int checks = 0, failures = 0;

  left_shifter #(.IN_W(IN_W), .OUT_W(OUT_W), .SH_W(SH_W)) dut (.din, .amount, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] wide;
    for (int s = 0; s < 32; s++) begin
      for (int r = 0; r < 40; r++) begin
        din    = (r == 0) ? 16'hFFFF : (r == 1) ? 16'h0001 : IN_W'($urandom);
        amount = SH_W'(s);
        #1;
        wide = 128'(din) << s;
        checks++;
        if (dout !== wide[OUT_W-1:0]) begin
          failures++;
          $display("FAIL din=%h amount=%0d dout=%h", din, s, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

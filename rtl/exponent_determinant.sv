// exponent_determinant: finds the index of the leading one of a word by a
// sequential search from the MSB side.
// On start the word is loaded into a parallel-in parallel-out shift
// register and WIDTH-1 is loaded into a decrementer. Each following cycle
// the searched bit (the register's MSB) is examined: while it is 0 the
// register shifts left by one and the decrementer counts down; when it is
// 1 both stop and the decrementer holds the exponent. A zero word is
// flagged at once, since it has no leading one.
// Interface: start is a one-cycle pulse that captures din; done is a
// one-cycle pulse; exponent and zero stay valid until the next start.
// Timing, counting the edge that samples start as edge 1: done is set at
// edge 1 for a zero word and at edge WIDTH-exponent+1 otherwise.
// The shift-and-decrement search follows the described hardware; the
// start/done handshake, zero flag and reset are this design's choices.
module exponent_determinant #(
  parameter int unsigned WIDTH = 16,
  localparam int unsigned EXP_W = (WIDTH > 1) ? $clog2(WIDTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] din,
  output logic             done,
  output logic             zero,
  output logic [EXP_W-1:0] exponent
);
  logic [WIDTH-1:0] shreg;      // PIPO shift register
  logic             searching;  // shift enable, low once the one is found

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      exponent  <= '0;
      searching <= 1'b0;
      done      <= 1'b0;
      zero      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        shreg    <= din;
        exponent <= EXP_W'(WIDTH - 1);
        if (din == '0) begin
          zero      <= 1'b1;
          searching <= 1'b0;
          exponent  <= '0;
          done      <= 1'b1;
        end else begin
          zero      <= 1'b0;
          searching <= 1'b1;
        end
      end else if (searching) begin
        if (shreg[WIDTH-1]) begin
          searching <= 1'b0;
          done      <= 1'b1;
        end else begin
          shreg    <= shreg << 1;
          exponent <= exponent - 1'b1;
        end
      end
    end
  end

  // The decrementer can never pass zero: a non-zero word has a one in it.
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n)
    searching && !shreg[WIDTH-1] |-> exponent != '0);
endmodule

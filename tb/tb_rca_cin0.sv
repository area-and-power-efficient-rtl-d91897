// tb_rca_cin0: exhaustive self-checking test of the carry-in-0 ripple-carry
// adder.
//
// The default 4-bit adder and a 1-bit one (half adder only) are driven with
// every operand pair; {cout, sum} must equal a + b. Ends with a TB_RESULT
// line; a watchdog stops a hung run.
module tb_rca_cin0;

  timeunit 1ns;
  timeprecision 1ps;

  logic [3:0] a4, b4, s4;
  logic       c4;
  logic [0:0] a1, b1, s1;
  logic       c1;
  int         checks   = 0;
  int         failures = 0;

  rca_cin0 dut (.a(a4), .b(b4), .sum(s4), .cout(c4));
  rca_cin0 #(.N(1)) dut_one (.a(a1), .b(b1), .sum(s1), .cout(c1));

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      checks++;
      if ({c4, s4} !== 5'(int'(a4) + int'(b4))) begin
        failures++;
        $display("FAIL N=4 a=%0d b=%0d -> %0d", a4, b4, {c4, s4});
      end
    end
    for (int i = 0; i < 4; i++) begin
      {a1, b1} = 2'(i);
      #1;
      checks++;
      if ({c1, s1} !== 2'(int'(a1) + int'(b1))) begin
        failures++;
        $display("FAIL N=1 a=%0d b=%0d -> %0d", a1, b1, {c1, s1});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

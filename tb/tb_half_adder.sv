// tb_half_adder: exhaustive self-checking test of the half adder.
//
// Applies all four input pairs and compares {cout, sum} with the integer
// sum a + b. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_half_adder;

  timeunit 1ns;
  timeprecision 1ps;

  logic a, b, sum, cout;
  int   checks   = 0;
  int   failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> cout=%0b sum=%0b", a, b, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

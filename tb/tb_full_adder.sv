// tb_full_adder: exhaustive self-checking test of the full adder.
//
// Applies all eight input combinations and compares {cout, sum} with the
// integer sum a + b + cin. Ends with a TB_RESULT line; a watchdog stops a
// hung run.
module tb_full_adder;

  timeunit 1ns;
  timeprecision 1ps;

  logic a, b, cin, sum, cout;
  int   checks   = 0;
  int   failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

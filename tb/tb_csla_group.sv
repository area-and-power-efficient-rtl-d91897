// tb_csla_group: exhaustive self-checking test of the carry select groups.
//
// Instantiates the group at the four widths of the 16-bit adder's upper
// groups (2, 3, 4 and 5 bits) and drives each with every operand pair and
// both incoming carries; {cout, sum} must equal a + b + cin. Ends with a
// TB_RESULT line; a watchdog stops a hung run.
module tb_csla_group;

  timeunit 1ns;
  timeprecision 1ps;

  logic [1:0] a2, b2, s2;
  logic [2:0] a3, b3, s3;
  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic       ci2, ci3, ci4, ci5, co2, co3, co4, co5;
  int         checks   = 0;
  int         failures = 0;

  csla_group         dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  csla_group #(.N(3)) dut3 (.a(a3), .b(b3), .cin(ci3), .sum(s3), .cout(co3));
  csla_group #(.N(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  csla_group #(.N(5)) dut5 (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));

  task automatic check(int n, int a, int b, int ci, int got);
    int want;
    want = (a + b + ci) % (1 << (n + 1));
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL N=%0d a=%0d b=%0d cin=%0d -> %0d, expected %0d", n, a, b, ci, got, want);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 11); i++) begin
      {a2, b2, ci2} = 5'(i);
      {a3, b3, ci3} = 7'(i);
      {a4, b4, ci4} = 9'(i);
      {a5, b5, ci5} = 11'(i);
      #1;
      if (i < (1 << 5)) check(2, int'(a2), int'(b2), int'(ci2), int'({co2, s2}));
      if (i < (1 << 7)) check(3, int'(a3), int'(b3), int'(ci3), int'({co3, s3}));
      if (i < (1 << 9)) check(4, int'(a4), int'(b4), int'(ci4), int'({co4, s4}));
      check(5, int'(a5), int'(b5), int'(ci5), int'({co5, s5}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rca: exhaustive self-checking test of the ripple-carry adder with
// carry in.
//
// The default 2-bit adder (the lowest group of the carry select adder) and a
// 6-bit one are each driven with every operand pair and both carry-in
// values; {cout, sum} must equal a + b + cin. Ends with a TB_RESULT line; a
// watchdog stops a hung run.
module tb_rca;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NW = 6;

  logic [1:0]    a2, b2, s2;
  logic          c2_in, c2_out;
  logic [NW-1:0] a6, b6, s6;
  logic          c6_in, c6_out;
  int            checks   = 0;
  int            failures = 0;

  rca dut (.a(a2), .b(b2), .cin(c2_in), .sum(s2), .cout(c2_out));
  rca #(.N(NW)) dut_wide (.a(a6), .b(b6), .cin(c6_in), .sum(s6), .cout(c6_out));

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 5); i++) begin
      {a2, b2, c2_in} = 5'(i);
      #1;
      checks++;
      if ({c2_out, s2} !== 3'(int'(a2) + int'(b2) + int'(c2_in))) begin
        failures++;
        $display("FAIL N=2 a=%0d b=%0d cin=%0b -> %0d", a2, b2, c2_in, {c2_out, s2});
      end
    end
    for (int i = 0; i < (1 << (2 * NW + 1)); i++) begin
      {a6, b6, c6_in} = (2 * NW + 1)'(i);
      #1;
      checks++;
      if ({c6_out, s6} !== (NW + 1)'(int'(a6) + int'(b6) + int'(c6_in))) begin
        failures++;
        $display("FAIL N=%0d a=%0d b=%0d cin=%0b -> %0d", NW, a6, b6, c6_in, {c6_out, s6});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

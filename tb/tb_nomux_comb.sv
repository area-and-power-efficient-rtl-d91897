// tb_nomux_comb: self-checking test of the AND/XOR carry correction circuit.
//
// For the default 4-bit circuit every value of b, b_carry and carry is
// applied, and {carry_out, x} must equal {b_carry, b} + carry modulo 32:
// with carry = 0 the input passes unchanged, with carry = 1 the 4-bit output
// is b + 1 modulo 16 (1111 wraps to 0000). The one case no adder can produce,
// b_carry = 1 with b = 1111, is also checked against that rule. The rows of the 4-bit function
// table (0000 -> 0001, 1110 -> 1111, 1111 -> 0000 with carry 1) are among
// the cases. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_nomux_comb;

  timeunit 1ns;
  timeprecision 1ps;

  logic [3:0] b, x;
  logic       b_carry, carry, carry_out;
  logic [4:0] expect_v;
  int         checks   = 0;
  int         failures = 0;

  nomux_comb dut (.b(b), .b_carry(b_carry), .carry(carry), .x(x), .carry_out(carry_out));

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {b_carry, carry, b} = 6'(i);
      #1;
      expect_v = 5'(int'({b_carry, b}) + int'(carry));
      checks++;
      if ({carry_out, x} !== expect_v) begin
        failures++;
        $display("FAIL b=%b b_carry=%0b carry=%0b -> x=%b carry_out=%0b, expected %b",
                 b, b_carry, carry, x, carry_out, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

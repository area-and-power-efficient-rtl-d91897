// tb_csla_widths: self-checking test of the carry select adder at the other
// evaluated word lengths, 8, 32 and 64 bits.
//
// Each width gets directed operands (zeros, all ones with carry in 1 as in
// the 64-bit waveform, a full-length carry ripple) and 50000 random operand
// pairs; {carry, sum} must equal a + b + cin computed with a wider integer
// sum. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_csla_widths;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int NRAND = 50000;

  logic [7:0]  a8,  b8,  s8;
  logic [31:0] a32, b32, s32;
  logic [63:0] a64, b64, s64;
  logic        ci, co8, co32, co64;
  logic [64:0] w64;

  int checks   = 0;
  int failures = 0;

  csla_nomux #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(ci), .sum(s8),  .carry(co8));
  csla_nomux #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(ci), .sum(s32), .carry(co32));
  csla_nomux #(.WIDTH(64)) dut64 (.a(a64), .b(b64), .cin(ci), .sum(s64), .carry(co64));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [63:0] x, logic [63:0] y, logic c);
    a8  = x[7:0];
    b8  = y[7:0];
    a32 = x[31:0];
    b32 = y[31:0];
    a64 = x;
    b64 = y;
    ci  = c;
    #1;
    w64 = {1'b0, x} + {1'b0, y} + 65'(c);
    checks += 3;
    if ({co64, s64} !== w64) begin
      failures++;
      $display("FAIL 64: a=%h b=%h cin=%0b -> %h", x, y, c, {co64, s64});
    end
    if ({co32, s32} !== 33'({1'b0, x[31:0]} + {1'b0, y[31:0]} + 33'(c))) begin
      failures++;
      $display("FAIL 32: a=%h b=%h cin=%0b -> %h", x[31:0], y[31:0], c, {co32, s32});
    end
    if ({co8, s8} !== 9'({1'b0, x[7:0]} + {1'b0, y[7:0]} + 9'(c))) begin
      failures++;
      $display("FAIL 8: a=%h b=%h cin=%0b -> %h", x[7:0], y[7:0], c, {co8, s8});
    end
  endtask

  initial begin
    // Group counts implied by the 2, 2, 3, 4, ... layout.
    checks += 3;
    if (dut8.NG != 4)   begin failures++; $display("FAIL 8-bit groups %0d", dut8.NG); end
    if (dut32.NG != 8)  begin failures++; $display("FAIL 32-bit groups %0d", dut32.NG); end
    if (dut64.NG != 11) begin failures++; $display("FAIL 64-bit groups %0d", dut64.NG); end

    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);
    apply({32{2'b01}}, {32{2'b10}}, 1'b1);
    for (int i = 0; i < NRAND; i++) begin
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    end
    // The waveform case: both operands all ones, carry in 1, gives all ones
    // and a carry out at 64 bits.
    apply('1, '1, 1'b1);
    checks++;
    if (!(s64 == '1 && co64 == 1'b1)) begin
      failures++;
      $display("FAIL all-ones case gave sum=%h carry=%0b", s64, co64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

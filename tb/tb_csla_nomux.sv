// tb_csla_nomux: end-to-end self-checking test of the 16-bit multiplexer-free
// carry select adder at its default parameters.
//
// Drives directed operands (all zeros, all ones with carry in 1, a carry that
// ripples through every group) and 200000 random operand pairs, and compares
// {carry, sum} with a + b + cin computed as a 17-bit integer sum. It also
// counts, for each of the four upper groups [3:2], [6:4], [10:7] and
// [15:11], how often the mechanisms of the design were exercised: a carry of
// 1 arriving at the group (the AND/XOR chain corrects the carry-in-0 sum), a
// carry generated by the group's own carry-in-0 adder, and a carry produced
// by the AND chain itself (incoming carry 1 on an all-ones partial sum). A
// mechanism that never occurred counts as a failure. The group boundaries
// are written out here independently of the adder's own layout package.
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_csla_nomux;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int NG = 5;
  localparam int LO [NG] = '{0, 2, 4, 7, 11};
  localparam int W  [NG] = '{2, 2, 3, 4, 5};
  localparam int NRAND = 200000;

  logic [15:0] a, b, sum;
  logic        cin, carry;
  logic [16:0] want;

  int checks   = 0;
  int failures = 0;
  int n_cin1   [NG];
  int n_rcagen [NG];
  int n_chain  [NG];
  int n_ripple_all = 0;

  csla_nomux dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carry into bit position lo of a + b + cin.
  function automatic int carry_into(logic [15:0] x, logic [15:0] y, logic ci, int lo);
    int m;
    m = (1 << lo) - 1;
    return ((int'(x) & m) + (int'(y) & m) + int'(ci)) >> lo;
  endfunction

  task automatic apply(logic [15:0] x, logic [15:0] y, logic ci);
    int part;
    int cg;
    a = x;
    b = y;
    cin = ci;
    #1;
    want = 17'(int'(x) + int'(y) + int'(ci));
    checks++;
    if ({carry, sum} !== want) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b -> carry=%0b sum=%h, expected %h", x, y, ci, carry, sum, want);
    end
    for (int g = 1; g < NG; g++) begin
      part = ((int'(x) >> LO[g]) & ((1 << W[g]) - 1)) + ((int'(y) >> LO[g]) & ((1 << W[g]) - 1));
      cg   = carry_into(x, y, ci, LO[g]);
      if (cg == 1) n_cin1[g]++;
      if ((part >> W[g]) == 1) n_rcagen[g]++;
      if (cg == 1 && part == (1 << W[g]) - 1) n_chain[g]++;
    end
    if (ci && (int'(x) + int'(y)) == 32'hFFFF) n_ripple_all++;
  endtask

  initial begin
    foreach (n_cin1[g]) begin
      n_cin1[g] = 0;
      n_rcagen[g] = 0;
      n_chain[g] = 0;
    end

    // The layout of the adder must be the five groups drawn for 16 bits.
    checks++;
    if (dut.NG != NG) begin
      failures++;
      $display("FAIL adder has %0d groups, expected %0d", dut.NG, NG);
    end

    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hFFFF, 16'hFFFF, 1'b1);   // all ones, as in the 64-bit waveform
    apply(16'hFFFF, 16'h0000, 1'b1);   // carry ripples through every group
    apply(16'h5555, 16'hAAAA, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < NRAND; i++) begin
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    end

    for (int g = 1; g < NG; g++) begin
      $display("group %0d [%0d:%0d]: carry in 1 %0d, carry from RCA %0d, carry from AND chain %0d",
               g + 1, LO[g] + W[g] - 1, LO[g], n_cin1[g], n_rcagen[g], n_chain[g]);
      checks += 3;
      if (n_cin1[g] == 0)   begin failures++; $display("FAIL group %0d never received a carry", g + 1); end
      if (n_rcagen[g] == 0) begin failures++; $display("FAIL group %0d RCA never carried", g + 1); end
      if (n_chain[g] == 0)  begin failures++; $display("FAIL group %0d AND chain never carried", g + 1); end
    end
    $display("carry rippled through all groups %0d times", n_ripple_all);
    checks++;
    if (n_ripple_all == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

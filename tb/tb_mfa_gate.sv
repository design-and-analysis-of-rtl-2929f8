// tb_mfa_gate: exhaustive test of the MFA gate.
// Applies all sixteen inputs, one per clock, compares P, Q, R and S with the
// gate's equations written out here independently (P = A, Q = A xor B, R = A xor B xor C, S = (A xor B)C xor AB xor D), checks that the
// sixteen output words are all different (the gate is a bijection), and checks
// that with d = 0 the gate is a full adder: R is the sum and S the carry of
// the other three inputs. A watchdog ends the run as a failure after 100 cycles.
module tb_mfa_gate;
  int checks = 0, failures = 0;
  logic clk;
  logic a, b, c, d, p, q, r, s;
  logic exp_q, exp_r, exp_s;
  int   ones;
  bit   seen [16];

  mfa_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abcd=%0b%0b%0b%0b -> pqrs=%0b%0b%0b%0b", what, a, b, c, d, p, q, r, s);
    end
  endtask

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      @(posedge clk);
      {a, b, c, d} = 4'(v);
      exp_q = a ^ b;
      exp_r = a ^ b ^ c;
      exp_s = ((a ^ b) & c) ^ (a & b) ^ d;
      #1;
      check(p == a, "P");
      check(q == exp_q, "Q");
      check(r == exp_r, "R");
      check(s == exp_s, "S");
      check(!seen[{p, q, r, s}], "bijective");
      seen[{p, q, r, s}] = 1'b1;
      if (d == 1'b0) begin
        ones = int'(a) + int'(b) + int'(c);
        check(r == ones[0], "full-adder sum");
        check(s == ones[1], "full-adder carry");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_peres_gate: exhaustive test of the Peres gate.
// Applies all eight inputs, one per clock, compares P, Q and R with the
// gate's equations written out here independently (P = A, Q = A xor B, R = AB xor C), and checks that the
// eight output words are all different (the gate is a bijection). A watchdog
// ends the run as a failure after 100 cycles.
module tb_peres_gate;
  int checks = 0, failures = 0;
  logic clk;
  logic a, b, c, p, q, r;
  logic exp_q, exp_r;
  bit   seen [8];

  peres_gate dut (.a, .b, .c, .p, .q, .r);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abc=%0b%0b%0b -> pqr=%0b%0b%0b", what, a, b, c, p, q, r);
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
    for (int v = 0; v < 8; v++) begin
      @(posedge clk);
      {a, b, c} = 3'(v);
      exp_q = (a != b);
      exp_r = (a && b) != c;
      #1;
      check(p == a, "P");
      check(q == exp_q, "Q");
      check(r == exp_r, "R");
      check(!seen[{p, q, r}], "bijective");
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

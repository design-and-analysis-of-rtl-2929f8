// tb_feynman_gate: exhaustive test of the Feynman gate.
// Applies all four inputs, one per clock, compares P and Q with A and A xor B,
// and checks that the four output words are all different (the gate is a
// bijection). A watchdog ends the run as a failure after 100 cycles.
module tb_feynman_gate;
  int checks = 0, failures = 0;
  logic clk;
  logic a, b, p, q;
  bit   seen [4];

  feynman_gate dut (.a, .b, .p, .q);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b -> p=%0b q=%0b", what, a, b, p, q);
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
    for (int v = 0; v < 4; v++) begin
      @(posedge clk);
      {a, b} = 2'(v);
      #1;
      check(p == a, "P");
      check(q == (a != b), "Q");
      check(!seen[{p, q}], "bijective");
      seen[{p, q}] = 1'b1;
    end
    // copying: with B = 0 both outputs equal A
    for (int v = 0; v < 2; v++) begin
      @(posedge clk);
      a = v[0]; b = 1'b0;
      #1;
      check(p == v[0] && q == v[0], "copy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fa_fgtg: exhaustive test of the Feynman and Toffoli gate reversible full-adder cell.
// Applies all eight (a, b, cin), one per clock, and compares sum and cout
// with the binary sum a + b + cin worked out here. It also checks the two
// garbage outputs (a and a xor b) and that the eight words {sum, cout,
// garbage} are all different: with its constant input the cell is still
// reversible. A watchdog ends the run as a failure after 100 cycles.
module tb_fa_fgtg;
  import rev_pkg::*;

  int checks = 0, failures = 0;
  logic clk;
  logic a, b, cin, sum, cout;
  logic [FA_GARBAGE-1:0] garbage;
  logic [1:0] total;
  bit   seen [16];

  fa_fgtg dut (.a, .b, .cin, .sum, .cout, .garbage);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b cin=%0b -> sum=%0b cout=%0b garbage=%b",
               what, a, b, cin, sum, cout, garbage);
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
      {a, b, cin} = 3'(v);
      total = 2'(a) + 2'(b) + 2'(cin);
      #1;
      check(sum == total[0], "sum");
      check(cout == total[1], "carry");
      check(garbage == {a ^ b, a}, "garbage");
      check(!seen[{sum, cout, garbage}], "reversible");
      seen[{sum, cout, garbage}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rev_full_adder: exhaustive test of the full-adder wrapper in all four
// versions. One instance per KIND (Peres, MFA, FG&TG, TSG) is driven with the
// same (a, b, cin); all eight inputs are applied, one per clock, and each
// instance's sum and cout are compared with a + b + cin worked out here, and
// its garbage with {a xor b, a}. A watchdog ends the run as a failure after
// 100 cycles.
module tb_rev_full_adder;
  import rev_pkg::*;

  int checks = 0, failures = 0;
  logic clk;
  logic a, b, cin;
  logic [NUM_FA_KINDS-1:0] sum, cout;
  logic [NUM_FA_KINDS-1:0][FA_GARBAGE-1:0] garbage;
  logic [1:0] total;

  rev_full_adder #(.KIND(FA_PERES)) u_peres (.a, .b, .cin, .sum(sum[0]), .cout(cout[0]), .garbage(garbage[0]));
  rev_full_adder #(.KIND(FA_MFA))   u_mfa   (.a, .b, .cin, .sum(sum[1]), .cout(cout[1]), .garbage(garbage[1]));
  rev_full_adder #(.KIND(FA_FGTG))  u_fgtg  (.a, .b, .cin, .sum(sum[2]), .cout(cout[2]), .garbage(garbage[2]));
  rev_full_adder                    u_tsg   (.a, .b, .cin, .sum(sum[3]), .cout(cout[3]), .garbage(garbage[3]));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input int k, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL kind %0d %s: a=%0b b=%0b cin=%0b -> sum=%0b cout=%0b", k, what, a, b, cin,
               sum[k], cout[k]);
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
      for (int k = 0; k < NUM_FA_KINDS; k++) begin
        check(sum[k] == total[0], k, "sum");
        check(cout[k] == total[1], k, "carry");
        check(garbage[k] == {a ^ b, a}, k, "garbage");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

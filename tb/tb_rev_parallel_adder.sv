// tb_rev_parallel_adder: exhaustive test of the N-bit reversible ripple-carry
// adder at its default width (N = 8), in all four full-adder versions. Every
// (a, b, cin) is applied, one per clock, to four instances (Peres, MFA,
// FG&TG, TSG); sum and cout are compared with a + b + cin worked out here and
// the garbage with {a xor b, a} per cell. It counts how often the carry
// rippled through all N cells (a + b = 2^N - 1 with cin = 1) and fails if
// that never happened. A watchdog ends the run as a failure after 140000
// cycles.
module tb_rev_parallel_adder;
  import rev_pkg::*;

  localparam int unsigned N = 8;

  int checks = 0, failures = 0, full_ripple = 0;
  logic clk;
  logic [N-1:0] a, b;
  logic cin;
  logic [NUM_FA_KINDS-1:0][N-1:0] sum;
  logic [NUM_FA_KINDS-1:0] cout;
  logic [NUM_FA_KINDS-1:0][adder_garbage_bits(N)-1:0] garbage;
  logic [N:0] total;
  logic [adder_garbage_bits(N)-1:0] exp_g;

  rev_parallel_adder #(.KIND(FA_PERES)) u_peres (.a, .b, .cin, .sum(sum[0]), .cout(cout[0]), .garbage(garbage[0]));
  rev_parallel_adder #(.KIND(FA_MFA))   u_mfa   (.a, .b, .cin, .sum(sum[1]), .cout(cout[1]), .garbage(garbage[1]));
  rev_parallel_adder #(.KIND(FA_FGTG))  u_fgtg  (.a, .b, .cin, .sum(sum[2]), .cout(cout[2]), .garbage(garbage[2]));
  rev_parallel_adder                    u_tsg   (.a, .b, .cin, .sum(sum[3]), .cout(cout[3]), .garbage(garbage[3]));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (140000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * N + 1)); v++) begin
      @(posedge clk);
      {cin, b, a} = (2 * N + 1)'(v);
      total = (N + 1)'(a) + (N + 1)'(b) + (N + 1)'(cin);
      for (int k = 0; k < N; k++) exp_g[2*k +: 2] = {a[k] ^ b[k], a[k]};
      if (cin && ((a ^ b) == '1)) full_ripple++;
      #1;
      for (int k = 0; k < NUM_FA_KINDS; k++) begin
        checks++;
        if ({cout[k], sum[k]} !== total) begin
          failures++;
          if (failures < 10)
            $display("FAIL kind %0d: %h + %h + %0b = %h, got %h", k, a, b, cin, total, {cout[k], sum[k]});
        end
        checks++;
        if (garbage[k] !== exp_g) begin
          failures++;
          if (failures < 10) $display("FAIL kind %0d garbage: a=%h b=%h", k, a, b);
        end
      end
    end
    checks++;
    if (full_ripple == 0) begin
      failures++;
      $display("FAIL: carry never rippled through all cells");
    end
    $display("full-length carry ripples: %0d", full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

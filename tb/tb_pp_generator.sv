// tb_pp_generator: exhaustive test of the N x N Peres partial-product array
// at its default size (N = 8). Every (x, y) pair is applied, one per clock;
// each partial-product bit is compared with x[i] AND y[j], each Peres garbage
// bit with x[i] xor y[j], and the end-of-chain garbage with x. A watchdog
// ends the run as a failure after 70000 cycles.
module tb_pp_generator;
  import rev_pkg::*;

  localparam int unsigned N = 8;

  int checks = 0, failures = 0;
  logic clk;
  logic [N-1:0] x, y;
  logic [N-1:0][N-1:0] pp;
  logic [pp_garbage_bits(N)-1:0] garbage;
  logic [N-1:0][N-1:0] exp_pp, exp_g;

  pp_generator dut (.x, .y, .pp, .garbage);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      @(posedge clk);
      {y, x} = (2 * N)'(v);
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) begin
          exp_pp[j][i] = x[i] & y[j];
          exp_g[j][i]  = x[i] ^ y[j];
        end
      #1;
      checks++;
      if (pp !== exp_pp) begin
        failures++;
        if (failures < 10) $display("FAIL pp x=%h y=%h pp=%h exp=%h", x, y, pp, exp_pp);
      end
      checks++;
      if (garbage !== {x, exp_g}) begin
        failures++;
        if (failures < 10) $display("FAIL garbage x=%h y=%h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rev_multiplier: exhaustive test of the N x N reversible multiplier at its
// default size (N = 8). The default instance (TSG full adders) and one
// instance of each other full-adder version (Peres, MFA, FG&TG) get the same
// operands. First the three operand pairs of the design's example waveforms
// (51 x 255, 255 x 204, 204 x 227), then every (x, y) pair, one per clock.
// Each product is compared with x * y worked out here, and the
// partial-product part of the garbage with x[i] xor y[j] and x. A watchdog
// ends the run as a failure after 70000 cycles.
module tb_rev_multiplier;
  import rev_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned G = mult_garbage_bits(N);
  localparam int unsigned PPG = pp_garbage_bits(N);

  int checks = 0, failures = 0;
  logic clk;
  logic [N-1:0] x, y;
  logic [NUM_FA_KINDS-1:0][2*N-1:0] product;
  logic [NUM_FA_KINDS-1:0][G-1:0] garbage;
  logic [N-1:0][N-1:0] exp_g;

  rev_multiplier #(.KIND(FA_PERES)) u_peres (.x, .y, .product(product[0]), .garbage(garbage[0]));
  rev_multiplier #(.KIND(FA_MFA))   u_mfa   (.x, .y, .product(product[1]), .garbage(garbage[1]));
  rev_multiplier #(.KIND(FA_FGTG))  u_fgtg  (.x, .y, .product(product[2]), .garbage(garbage[2]));
  rev_multiplier                    u_tsg   (.x, .y, .product(product[3]), .garbage(garbage[3]));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic apply(input logic [N-1:0] xv, input logic [N-1:0] yv);
    logic [2*N-1:0] expected;
    @(posedge clk);
    x = xv;
    y = yv;
    expected = (2 * N)'(xv) * (2 * N)'(yv);
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) exp_g[j][i] = xv[i] ^ yv[j];
    #1;
    for (int k = 0; k < NUM_FA_KINDS; k++) begin
      checks++;
      if (product[k] !== expected) begin
        failures++;
        if (failures < 10) $display("FAIL kind %0d: %0d * %0d = %0d, got %0d", k, xv, yv, expected, product[k]);
      end
      checks++;
      if (garbage[k][PPG-1:0] !== {xv, exp_g}) begin
        failures++;
        if (failures < 10) $display("FAIL kind %0d garbage: x=%h y=%h", k, xv, yv);
      end
    end
  endtask

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(8'b0011_0011, 8'b1111_1111);
    apply(8'b1111_1111, 8'b1100_1100);
    apply(8'b1100_1100, 8'b1110_0011);
    for (int v = 0; v < (1 << (2 * N)); v++) apply(N'(v), N'(v >> N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

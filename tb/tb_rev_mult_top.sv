// tb_rev_mult_top: end-to-end test of the four-version 8 x 8 reversible
// multiplier with every parameter at its default.
//
// Each clock, each version k (Peres, MFA, FG&TG, TSG) gets its own operand
// pair, taken from a counter offset by a different amount per version, so
// over 65536 clocks every version multiplies every (x, y) pair once, and the
// four see different pairs at any one time. The first three clocks apply the
// operand pairs of the design's example waveforms (51 x 255, 255 x 204,
// 204 x 227) to all four. Products are compared with x * y worked out here, and the
// partial-product garbage with x[i] xor y[j] and x.
//
// It also counts the events the array is built around and fails if one never
// happened: a carry out of each of the N-1 row adders of each version, a
// product using all 2N bits, and a zero operand (product must be 0). A
// watchdog ends the run as a failure after 70000 cycles.
module tb_rev_mult_top;
  import rev_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned G = mult_garbage_bits(N);
  localparam int unsigned PPG = pp_garbage_bits(N);

  int checks = 0, failures = 0;
  int row_carry [NUM_FA_KINDS][N];
  int top_bit_used [NUM_FA_KINDS];
  int zero_operand [NUM_FA_KINDS];
  logic clk;
  logic [NUM_FA_KINDS-1:0][N-1:0]   x, y;
  logic [NUM_FA_KINDS-1:0][2*N-1:0] product;
  logic [NUM_FA_KINDS-1:0][G-1:0]   garbage;
  logic [NUM_FA_KINDS-1:0][N-1:1]   row_cout;

  rev_mult_top dut (.x, .y, .product, .garbage);

  assign row_cout[FA_PERES] = dut.u_mult_peres.row_cout;
  assign row_cout[FA_MFA]   = dut.u_mult_mfa.row_cout;
  assign row_cout[FA_FGTG]  = dut.u_mult_fgtg.row_cout;
  assign row_cout[FA_TSG]   = dut.u_mult_tsg.row_cout;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check_all();
    logic [2*N-1:0] expected;
    logic [N-1:0][N-1:0] exp_g;
    #1;
    for (int k = 0; k < NUM_FA_KINDS; k++) begin
      expected = (2 * N)'(x[k]) * (2 * N)'(y[k]);
      checks++;
      if (product[k] !== expected) begin
        failures++;
        if (failures < 10) $display("FAIL kind %0d: %0d * %0d = %0d, got %0d", k, x[k], y[k], expected, product[k]);
      end
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) exp_g[j][i] = x[k][i] ^ y[k][j];
      checks++;
      if (garbage[k][PPG-1:0] !== {x[k], exp_g}) begin
        failures++;
        if (failures < 10) $display("FAIL kind %0d garbage: x=%h y=%h", k, x[k], y[k]);
      end
      for (int j = 1; j < N; j++) if (row_cout[k][j]) row_carry[k][j]++;
      if (product[k][2*N-1]) top_bit_used[k]++;
      if (x[k] == '0 || y[k] == '0) zero_operand[k]++;
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
    logic [N-1:0] fig_x [3];
    logic [N-1:0] fig_y [3];
    logic [2*N-1:0] pair;
    fig_x = '{8'b0011_0011, 8'b1111_1111, 8'b1100_1100};
    fig_y = '{8'b1111_1111, 8'b1100_1100, 8'b1110_0011};
    for (int k = 0; k < NUM_FA_KINDS; k++) begin
      top_bit_used[k] = 0;
      zero_operand[k] = 0;
      for (int j = 0; j < N; j++) row_carry[k][j] = 0;
    end

    for (int f = 0; f < 3; f++) begin
      @(posedge clk);
      for (int k = 0; k < NUM_FA_KINDS; k++) begin
        x[k] = fig_x[f];
        y[k] = fig_y[f];
      end
      check_all();
    end

    for (int v = 0; v < (1 << (2 * N)); v++) begin
      @(posedge clk);
      for (int k = 0; k < NUM_FA_KINDS; k++) begin
        pair = (2 * N)'(v + k * 16411);
        {y[k], x[k]} = pair;
      end
      check_all();
    end

    for (int k = 0; k < NUM_FA_KINDS; k++) begin
      for (int j = 1; j < N; j++) begin
        checks++;
        if (row_carry[k][j] == 0) begin
          failures++;
          $display("FAIL kind %0d: row adder %0d never produced a carry out", k, j);
        end
      end
      checks++;
      if (top_bit_used[k] == 0) begin
        failures++;
        $display("FAIL kind %0d: no product reached the top bit", k);
      end
      checks++;
      if (zero_operand[k] == 0) begin
        failures++;
        $display("FAIL kind %0d: no zero operand applied", k);
      end
      $display("kind %0d: row carries %0d %0d %0d %0d %0d %0d %0d, top bit %0d, zero operand %0d", k,
               row_carry[k][1], row_carry[k][2], row_carry[k][3], row_carry[k][4],
               row_carry[k][5], row_carry[k][6], row_carry[k][7], top_bit_used[k], zero_operand[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end testbench for modified_booth_multiplier at its default size
// (64 x 64 -> 128 bits, no parameter override).
//
// Applies the worked example 13 x -6 = -78, edge operands (0, +-1, the most
// negative and most positive numbers, alternating patterns) in every pairing,
// then random operands, including random ones of small magnitude. The
// product is compared with a 128-bit signed multiplication done by the
// simulator. The multiplier is combinational, so each product is checked
// in the clock cycle its operands are applied (latency 0).
//
// Coverage: every radix-4 digit value -2..+2 that the recoding can produce
// must be selected in some row, each with a negative multiplicand as well
// as a positive one; products of both signs must occur; and the
// -2 * (most negative multiplicand) case, which needs the widened multiple,
// must be hit. A counter that stays at zero is counted as a failure.
module modified_booth_multiplier_tb;

  localparam int unsigned N = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;

  int checks = 0, failures = 0;
  int digit_pos_x [5];  // digits -2..+2 applied with x >= 0
  int digit_neg_x [5];  // digits -2..+2 applied with x < 0
  int neg_products = 0, pos_products = 0, min_times_m2 = 0;

  modified_booth_multiplier dut (.x(x), .y(y), .p(p));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] xa, input logic [N-1:0] ya);
    logic signed [2*N-1:0] expected;
    int d;
    x = xa;
    y = ya;
    @(negedge clk);
    expected = (2*N)'($signed(xa)) * (2*N)'($signed(ya));
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d expected %0d",
                                  $signed(xa), $signed(ya), $signed(p), expected);
    end
    for (int i = 0; i < N / 2; i++) begin
      d = -2 * int'(ya[2*i+1]) + int'(ya[2*i]) + ((i == 0) ? 0 : int'(ya[2*i-1]));
      if (xa[N-1]) digit_neg_x[d+2]++;
      else         digit_pos_x[d+2]++;
      if (d == -2 && xa == {1'b1, {(N-1){1'b0}}}) min_times_m2++;
    end
    if (expected < 0) neg_products++;
    if (expected > 0) pos_products++;
  endtask

  initial begin
    logic [N-1:0] edges [8];
    edges = '{'0, N'(1), '1, {1'b1, {(N-1){1'b0}}}, {1'b0, {(N-1){1'b1}}},
              {(N/4){4'ha}}, {(N/4){4'h5}}, N'(13)};
    x = '0;
    y = '0;
    @(negedge clk);

    // worked example: multiplicand 13, multiplier -6
    apply(N'(13), -N'(6));
    checks++;
    if (p !== -(2*N)'(78)) begin
      failures++;
      $display("FAIL worked example: p=%h", p);
    end

    foreach (edges[i]) foreach (edges[j]) apply(edges[i], edges[j]);

    for (int t = 0; t < 20000; t++) apply({$urandom, $urandom}, {$urandom, $urandom});
    for (int t = 0; t < 2000; t++)
      apply(N'($signed(16'($urandom))), N'($signed(16'($urandom))));

    for (int d = 0; d < 5; d++) begin
      checks += 2;
      if (digit_pos_x[d] == 0) begin
        failures++;
        $display("FAIL digit %0d never used with a positive multiplicand", d - 2);
      end
      if (digit_neg_x[d] == 0) begin
        failures++;
        $display("FAIL digit %0d never used with a negative multiplicand", d - 2);
      end
    end
    checks += 3;
    if (neg_products == 0) begin failures++; $display("FAIL no negative product"); end
    if (pos_products == 0) begin failures++; $display("FAIL no positive product"); end
    if (min_times_m2 == 0) begin failures++; $display("FAIL -2 x most negative never hit"); end
    $display("digits -2..+2, x>=0: %0d %0d %0d %0d %0d", digit_pos_x[0], digit_pos_x[1],
             digit_pos_x[2], digit_pos_x[3], digit_pos_x[4]);
    $display("digits -2..+2, x<0:  %0d %0d %0d %0d %0d", digit_neg_x[0], digit_neg_x[1],
             digit_neg_x[2], digit_neg_x[3], digit_neg_x[4]);
    $display("negative products %0d, positive products %0d, -2 x min %0d",
             neg_products, pos_products, min_times_m2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Runs the multiplier at the four operand widths of the evaluation: 8, 16,
// 32 and 64 bits, one instance each. Every instance computes the worked
// example 13 x -6 = -78 (whose product is -78 in 2N bits, e.g.
// 1111111110110010 at 8 bits) and then random products, compared with the
// simulator's own signed multiplication. The products are combinational and
// are checked in the cycle their operands are applied.
module modified_booth_multiplier_sizes_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]   x8,  y8;
  logic [15:0]  p8;
  logic [15:0]  x16, y16;
  logic [31:0]  p16;
  logic [31:0]  x32, y32;
  logic [63:0]  p32;
  logic [63:0]  x64, y64;
  logic [127:0] p64;

  modified_booth_multiplier #(.N(8))  dut8  (.x(x8),  .y(y8),  .p(p8));
  modified_booth_multiplier #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16));
  modified_booth_multiplier #(.N(32)) dut32 (.x(x32), .y(y32), .p(p32));
  modified_booth_multiplier #(.N(64)) dut64 (.x(x64), .y(y64), .p(p64));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int width, input logic [127:0] got, input logic signed [127:0] expected);
    logic [127:0] mask;
    mask = (width == 64) ? '1 : ((128'd1 << (2 * width)) - 1);
    checks++;
    if ((got & mask) !== (expected & mask)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d-bit: got %h expected %h", width, got & mask, expected & mask);
    end
  endtask

  task automatic apply(input logic [63:0] xa, input logic [63:0] ya);
    x8  = xa[7:0];  y8  = ya[7:0];
    x16 = xa[15:0]; y16 = ya[15:0];
    x32 = xa[31:0]; y32 = ya[31:0];
    x64 = xa;       y64 = ya;
    @(negedge clk);
    check(8,  128'(p8),  128'($signed(x8))  * 128'($signed(y8)));
    check(16, 128'(p16), 128'($signed(x16)) * 128'($signed(y16)));
    check(32, 128'(p32), 128'($signed(x32)) * 128'($signed(y32)));
    check(64, p64,       128'($signed(x64)) * 128'($signed(y64)));
  endtask

  initial begin
    @(negedge clk);
    apply(64'd13, -64'd6);
    checks++;
    if (p8 !== 16'b1111111110110010) begin
      failures++;
      $display("FAIL 8-bit worked example: %b", p8);
    end
    checks++;
    if ($signed(p16) != -78 || $signed(p32) != -78 || $signed(p64) != -78) begin
      failures++;
      $display("FAIL worked example at 16/32/64 bits");
    end
    for (int t = 0; t < 5000; t++) apply({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

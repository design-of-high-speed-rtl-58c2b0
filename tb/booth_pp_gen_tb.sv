// Self-checking testbench for booth_pp_gen.
//
// Two instances: an 8-bit one driven with every pair of operands, and one
// at the default 64-bit size driven with edge values and random operands.
// For each row i the expected partial product is d_i * x * 4^i (mod 2^(2N)),
// with the radix-4 digit d_i = -2*y[2i+1] + y[2i] + y[2i-1] computed here
// from the operand bits. The sum of all rows must also equal x * y.
module booth_pp_gen_tb;

  localparam int unsigned NS = 8;   // small instance, exhaustive
  localparam int unsigned NL = 64;  // default size, random

  int checks = 0, failures = 0;

  logic [NS-1:0]   xs, ys;
  logic [2*NS-1:0] pps [NS/2];
  logic [NL-1:0]   xl, yl;
  logic [2*NL-1:0] ppl [NL/2];

  booth_pp_gen #(.N(NS)) dut_s (.x(xs), .y(ys), .pp(pps));
  booth_pp_gen              dut_l (.x(xl), .y(yl), .pp(ppl));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // radix-4 digit i of y (y[-1] = 0)
  function automatic int digit(input logic [NL-1:0] y, input int i);
    int lo;
    lo = (i == 0) ? 0 : int'(y[2*i-1]);
    return -2 * int'(y[2*i+1]) + int'(y[2*i]) + lo;
  endfunction

  task automatic check_small();
    logic signed [2*NS-1:0] xe, exp_row, total, prod;
    xe = (2*NS)'($signed(xs));
    total = '0;
    for (int i = 0; i < NS / 2; i++) begin
      exp_row = (xe * (2*NS)'(digit(NL'(ys), i))) <<< (2 * i);
      total += pps[i];
      checks++;
      if (pps[i] !== exp_row) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 x=%0d y=%0d row %0d = %h expected %h",
                                    $signed(xs), $signed(ys), i, pps[i], exp_row);
      end
    end
    prod = xe * (2*NS)'($signed(ys));
    checks++;
    if (total !== prod) begin
      failures++;
      if (failures < 10) $display("FAIL N=8 x=%0d y=%0d row sum %h expected %h",
                                  $signed(xs), $signed(ys), total, prod);
    end
  endtask

  task automatic check_large();
    logic signed [2*NL-1:0] xe, exp_row, total, prod;
    xe = (2*NL)'($signed(xl));
    total = '0;
    for (int i = 0; i < NL / 2; i++) begin
      exp_row = (xe * (2*NL)'(digit(yl, i))) <<< (2 * i);
      total += ppl[i];
      checks++;
      if (ppl[i] !== exp_row) begin
        failures++;
        if (failures < 10) $display("FAIL N=64 x=%h y=%h row %0d = %h expected %h",
                                    xl, yl, i, ppl[i], exp_row);
      end
    end
    prod = xe * (2*NL)'($signed(yl));
    checks++;
    if (total !== prod) begin
      failures++;
      if (failures < 10) $display("FAIL N=64 x=%h y=%h row sum %h expected %h", xl, yl, total, prod);
    end
  endtask

  initial begin
    logic [NL-1:0] edges [6];
    edges = '{64'h0, 64'h1, {64{1'b1}}, {1'b1, 63'h0}, {1'b0, {63{1'b1}}}, 64'haaaa_5555_cccc_3333};
    xl = '0;
    yl = '0;
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        xs = NS'(a);
        ys = NS'(b);
        #1;
        check_small();
      end
    end
    foreach (edges[i]) begin
      foreach (edges[j]) begin
        xl = edges[i];
        yl = edges[j];
        #1;
        check_large();
      end
    end
    for (int t = 0; t < 2000; t++) begin
      xl = {$urandom, $urandom};
      yl = {$urandom, $urandom};
      #1;
      check_large();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

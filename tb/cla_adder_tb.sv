// Self-checking testbench for cla_adder.
//
// Checks the default 128-bit adder and an 8-bit one (exhaustively, both
// carry-in values). Edge cases make a carry cross every look-ahead level:
// all-ones plus one, alternating patterns, and carries entering at each
// 4-bit group boundary. The reference is the simulator's own addition.
module cla_adder_tb;

  int checks = 0, failures = 0;

  logic [127:0] a, b, sum;
  logic         cin, cout;
  logic [7:0]   a8, b8, sum8;
  logic         cin8, cout8;

  cla_adder             dut   (.a(a),  .b(b),  .cin(cin),  .sum(sum),  .cout(cout));
  cla_adder #(.W(8))    dut8  (.a(a8), .b(b8), .cin(cin8), .sum(sum8), .cout(cout8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [128:0] ref_sum;
    ref_sum = {1'b0, a} + {1'b0, b} + 129'(cin);
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b = %b_%h expected %h", a, b, cin, cout, sum, ref_sum);
    end
  endtask

  initial begin
    a8 = '0; b8 = '0; cin8 = 0;
    a = '0; b = '0; cin = 0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          logic [8:0] r8;
          a8 = 8'(x); b8 = 8'(y); cin8 = c[0];
          #1;
          r8 = 9'(x) + 9'(y) + 9'(c);
          checks++;
          if ({cout8, sum8} !== r8) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit %0d + %0d + %0d = %0d", x, y, c, {cout8, sum8});
          end
        end

    a = '1; b = 128'd1; cin = 0; #1; check();
    a = '1; b = '0;     cin = 1; #1; check();
    a = '1; b = '1;     cin = 1; #1; check();
    a = {32{4'ha}}; b = {32{4'h5}}; cin = 1; #1; check();
    for (int k = 0; k < 128; k++) begin
      a = '1 >> k; b = 128'd1; cin = 0; #1; check();   // carry runs k..127 bits
      a = 128'd1 << k; b = 128'd1 << k; cin = 1; #1; check();
    end
    for (int t = 0; t < 5000; t++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      cin = 1'($urandom);
      #1;
      check();
      b = ~a;  // every bit propagates
      #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for csa_tree.
//
// Three instances: the default 128-bit, 32-row tree of the 64-bit
// multiplier, a 16-bit tree with 4 rows and one with the minimum of 2 rows.
// Random rows (and all-ones rows, which make every carry fire) are applied;
// the two output rows must add to the sum of the input rows modulo 2^W.
module csa_tree_tb;

  int checks = 0, failures = 0;

  logic [127:0] r32 [32];
  logic [127:0] s32, c32;
  logic [15:0]  r4 [4];
  logic [15:0]  s4, c4;
  logic [7:0]   r2 [2];
  logic [7:0]   s2, c2;

  csa_tree                       dut32 (.rows(r32), .s(s32), .c(c32));
  csa_tree #(.W(16), .ROWS(4))   dut4  (.rows(r4),  .s(s4),  .c(c4));
  csa_tree #(.W(8),  .ROWS(2))   dut2  (.rows(r2),  .s(s2),  .c(c2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [127:0] t32;
    logic [15:0]  t4;
    logic [7:0]   t2;
    t32 = '0;
    foreach (r32[i]) t32 += r32[i];
    t4 = '0;
    foreach (r4[i]) t4 += r4[i];
    t2 = r2[0] + r2[1];
    checks += 3;
    if (s32 + c32 !== t32) begin
      failures++;
      $display("FAIL 32 rows: s+c=%h expected %h", s32 + c32, t32);
    end
    if (s4 + c4 !== t4) begin
      failures++;
      $display("FAIL 4 rows: s+c=%h expected %h", s4 + c4, t4);
    end
    if (s2 + c2 !== t2) begin
      failures++;
      $display("FAIL 2 rows: s+c=%h expected %h", s2 + c2, t2);
    end
  endtask

  initial begin
    foreach (r32[i]) r32[i] = '1;
    foreach (r4[i]) r4[i] = '1;
    foreach (r2[i]) r2[i] = '1;
    #1;
    check();
    for (int t = 0; t < 3000; t++) begin
      foreach (r32[i]) r32[i] = {$urandom, $urandom, $urandom, $urandom};
      foreach (r4[i]) r4[i] = 16'($urandom);
      foreach (r2[i]) r2[i] = 8'($urandom);
      #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

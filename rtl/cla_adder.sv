// Carry look-ahead adder, the final stage of the multiplier.
//
// Adds the sum and carry rows left by the carry-save tree. Its width is the
// product width, twice the operand width (128 bits for the 64-bit
// multiplier).
//
// It is a hierarchical carry look-ahead adder with groups of four
// (mbm_pkg::lookahead4). Level 0 holds the bit generate g = a & b and
// propagate p = a ^ b. Going up, every four nodes of a level form one node
// of the next, with a group generate and a group propagate, until a single
// node is left: for W = 128 the levels hold 128, 32, 8, 2 and 1 nodes. Going
// down, each node's carry in and the look-ahead equations give the carry
// into each of its four children at once, so a carry crosses log4(W) levels
// of look-ahead logic instead of rippling through W bits. The sum is
// p ^ carry at level 0. The group size of four is this design's choice.
//
// Combinational: sum = a + b + cin (mod 2^W), cout the carry out of bit W-1.
module cla_adder
  import mbm_pkg::*;
#(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned G = CLA_GROUP;

  // number of nodes at a level of the look-ahead tree
  function automatic int unsigned nodes_at(input int unsigned level);
    int unsigned n;
    n = W;
    for (int unsigned l = 0; l < level; l++) n = (n + G - 1) / G;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n, l;
    n = W;
    l = 0;
    while (n > 1) begin
      n = (n + G - 1) / G;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  // gv/pv: generate and propagate of every node, cv: carry into every node
  logic [W-1:0] gv [LEVELS+1];
  logic [W-1:0] pv [LEVELS+1];
  logic [W-1:0] cv [LEVELS+1];

  always_comb begin
    lookahead_t    la;
    logic [G-1:0]  g4, p4;

    for (int k = 0; k <= LEVELS; k++) begin
      gv[k] = '0;
      pv[k] = '0;
      cv[k] = '0;
    end
    gv[0] = a & b;
    pv[0] = a ^ b;

    // up: group generate and propagate
    for (int k = 0; k < LEVELS; k++) begin
      for (int j = 0; j < W / G; j++) begin
        if (j < nodes_at(k + 1)) begin
          for (int m = 0; m < G; m++) begin
            // missing children of a partial group: generate 0, propagate 1
            g4[m] = (G * j + m < nodes_at(k)) ? gv[k][G*j+m] : 1'b0;
            p4[m] = (G * j + m < nodes_at(k)) ? pv[k][G*j+m] : 1'b1;
          end
          la = lookahead4(g4, p4, 1'b0);
          gv[k+1][j] = la.g;
          pv[k+1][j] = la.p;
        end
      end
    end

    // down: carries into the children of every node
    cv[LEVELS][0] = cin;
    for (int k = LEVELS - 1; k >= 0; k--) begin
      for (int j = 0; j < W / G; j++) begin
        if (j < nodes_at(k + 1)) begin
          for (int m = 0; m < G; m++) begin
            g4[m] = (G * j + m < nodes_at(k)) ? gv[k][G*j+m] : 1'b0;
            p4[m] = (G * j + m < nodes_at(k)) ? pv[k][G*j+m] : 1'b1;
          end
          la = lookahead4(g4, p4, cv[k+1][j]);
          for (int m = 0; m < G; m++) begin
            if (G * j + m < nodes_at(k)) cv[k][G*j+m] = la.c[m];
          end
        end
      end
    end
  end

  assign sum  = pv[0] ^ cv[0];
  assign cout = gv[LEVELS][0] | (pv[LEVELS][0] & cin);

endmodule

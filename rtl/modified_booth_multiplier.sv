// Signed N x N modified Booth multiplier (N = 64 by default).
//
// The product of two two's complement numbers is formed in three steps:
//   1. booth_pp_gen recodes the multiplier y in radix 4, one digit in
//      {-2,-1,0,+1,+2} per pair of bits, and generates N/2 partial products
//      (half the N rows of a plain AND array);
//   2. csa_tree adds the partial products with 3:2 carry-save rows until two
//      rows remain;
//   3. cla_adder, a 2N-bit carry look-ahead adder, adds those two rows into
//      the 2N-bit product.
// The radix-4 recoding, the two-row reduction and the carry look-ahead final
// adder follow the method; the carry-save tree shape, the 4-bit look-ahead
// groups and the purely combinational form (no pipeline registers) are this
// design's choices.
//
// Interface: x (multiplicand) and y (multiplier) in, p = x * y out, all
// signed. Combinational: p is valid one propagation delay after x and y.
module modified_booth_multiplier #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  localparam int unsigned W    = 2 * N;
  localparam int unsigned ROWS = N / 2;

  logic [W-1:0] pp [ROWS];
  logic [W-1:0] row_s, row_c;
  logic         cout;

  booth_pp_gen #(.N(N)) u_ppg (
    .x  (x),
    .y  (y),
    .pp (pp)
  );

  csa_tree #(.W(W), .ROWS(ROWS)) u_tree (
    .rows (pp),
    .s    (row_s),
    .c    (row_c)
  );

  // the carry out is the bit above the product, discarded as in any
  // modulo-2^(2N) signed multiplication
  cla_adder #(.W(W)) u_cla (
    .a    (row_s),
    .b    (row_c),
    .cin  (1'b0),
    .sum  (p),
    .cout (cout)
  );

endmodule

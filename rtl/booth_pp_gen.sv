// Modified Booth partial product generator.
//
// Produces the N/2 partial products of a signed N x N multiplication. The
// multiples of the multiplicand that a radix-4 digit can ask for are formed
// once and shared by every row: +X, -X, +2X and -2X (named m, m11, m2 and m21
// below, as in the reference simulation). Each row i has its own booth_encoder
// on the triplet {y[2i+1], y[2i], y[2i-1]}, y[-1] = 0, and a selector that
// picks 0, +-X or +-2X. The selected multiple, N+2 bits wide so that
// +-2 * (-2^(N-1)) still fits, is sign-extended to 2N bits and shifted left by
// 2i. Summing all rows modulo 2^(2N) gives the signed product X*Y.
//
// Forming the negative multiples with a subtractor, rather than inverting and
// adding a correction bit in the tree, is this design's choice.
//
// Combinational. N must be even.
module booth_pp_gen
  import mbm_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   x,             // multiplicand, two's complement
  input  logic [N-1:0]   y,             // multiplier, two's complement
  output logic [2*N-1:0] pp [N/2]       // partial products, already aligned
);

  localparam int unsigned ROWS = N / 2;
  localparam int unsigned MW   = N + 2;  // width of a selected multiple

  if (N % 2 != 0 || N < 4) begin : g_bad_n
    $error("booth_pp_gen: N must be even and at least 4");
  end

  logic [MW-1:0] m, m11, m2, m21;

  assign m   = {{2{x[N-1]}}, x};  // +X
  assign m11 = -m;                // -X
  assign m2  = m << 1;            // +2X
  assign m21 = m11 << 1;          // -2X

  // multiplier with the implied y[-1] = 0 appended below bit 0
  logic [N:0] y_ext;
  assign y_ext = {y, 1'b0};

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    booth_sel_t    sel;
    logic [MW-1:0] mult;

    booth_encoder u_enc (
      .triplet (y_ext[2*i +: 3]),
      .sel     (sel)
    );

    always_comb begin
      unique case (1'b1)
        sel.two: mult = sel.neg ? m21 : m2;
        sel.one: mult = sel.neg ? m11 : m;
        default: mult = '0;
      endcase
    end

    assign pp[i] = {{(2*N-MW){mult[MW-1]}}, mult} << (2 * i);
  end

endmodule

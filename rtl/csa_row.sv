// Row of 3:2 carry-save compressors (one full adder per bit).
//
// Reduces three W-bit operands to a sum word and a carry word with
// a + b + c == s + co (mod 2^W). The carry word is returned already shifted
// one place left; the carry out of the top bit is dropped, since the
// multiplier works modulo 2^W.
//
// Combinational; no carry travels between bits.
module csa_row #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  logic [W-2:0] maj;  // majority of the lower W-1 bits, the carries that stay in range

  assign s   = a ^ b ^ c;
  assign maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
  assign co  = {maj, 1'b0};

endmodule

// Radix-4 (modified) Booth encoder for one digit.
//
// The multiplier is scanned in overlapping triplets {y[2i+1], y[2i], y[2i-1]}
// (with y[-1] = 0). Each triplet stands for the digit
// -2*y[2i+1] + y[2i] + y[2i-1], which this block reports as the three flags
// of mbm_pkg::booth_sel_t. The recoding table is the standard one:
//   000 -> 0   001 -> +1   010 -> +1   011 -> +2
//   100 -> -2  101 -> -1   110 -> -1   111 -> 0
// The flag encoding {neg, one, two} is this design's choice; a zero digit,
// including 111, has neg clear.
//
// Purely combinational: triplet in, sel out, no clock.
module booth_encoder
  import mbm_pkg::*;
(
  input  logic [2:0]  triplet,
  output booth_sel_t  sel
);

  always_comb begin
    unique case (triplet)
      3'b000:  sel = '{neg: 1'b0, one: 1'b0, two: 1'b0};  //  0
      3'b001:  sel = '{neg: 1'b0, one: 1'b1, two: 1'b0};  // +1
      3'b010:  sel = '{neg: 1'b0, one: 1'b1, two: 1'b0};  // +1
      3'b011:  sel = '{neg: 1'b0, one: 1'b0, two: 1'b1};  // +2
      3'b100:  sel = '{neg: 1'b1, one: 1'b0, two: 1'b1};  // -2
      3'b101:  sel = '{neg: 1'b1, one: 1'b1, two: 1'b0};  // -1
      3'b110:  sel = '{neg: 1'b1, one: 1'b1, two: 1'b0};  // -1
      default: sel = '{neg: 1'b0, one: 1'b0, two: 1'b0};  //  0 (111)
    endcase
  end

endmodule

// Shared types and functions of the modified Booth multiplier.
//
// booth_sel_t is the control word one Booth encoder hands to the partial
// product selector. A radix-4 Booth digit d in {-2,-1,0,+1,+2} is carried as
// three flags: `two` (|d| = 2), `one` (|d| = 1) and `neg` (d < 0). A zero
// digit has all three flags clear.
//
// lookahead4() holds the carry look-ahead equations used at every level of
// the final adder: for four (generate, propagate) pairs and an incoming carry
// it returns the carry into each position in sum-of-products form, so that no
// carry waits for the one below it, together with the group generate and
// group propagate. The group size of four is a choice of this design.
package mbm_pkg;

  typedef struct packed {
    logic neg;  // digit is negative
    logic one;  // |digit| == 1
    logic two;  // |digit| == 2
  } booth_sel_t;

  localparam int unsigned CLA_GROUP = 4;

  typedef struct packed {
    logic [CLA_GROUP:0] c;  // c[0] = carry in, c[k] = carry into position k, c[4] = carry out
    logic               g;  // group generate
    logic               p;  // group propagate
  } lookahead_t;

  // c[k] = g[k-1] | p[k-1]g[k-2] | ... | p[k-1]..p[0]cin, each term formed
  // directly from the inputs.
  function automatic lookahead_t lookahead4(input logic [CLA_GROUP-1:0] g,
                                            input logic [CLA_GROUP-1:0] p,
                                            input logic cin);
    lookahead_t r;
    logic       term;
    r.c    = '0;
    r.c[0] = cin;
    for (int k = 1; k <= CLA_GROUP; k++) begin
      // term through the carry in
      term = cin;
      for (int m = 0; m < k; m++) term = term & p[m];
      r.c[k] = term;
      // terms through each generate below position k
      for (int j = 0; j < k; j++) begin
        term = g[j];
        for (int m = j + 1; m < k; m++) term = term & p[m];
        r.c[k] = r.c[k] | term;
      end
    end
    // group generate: the carry out with a zero carry in
    r.g = 1'b0;
    for (int j = 0; j < CLA_GROUP; j++) begin
      term = g[j];
      for (int m = j + 1; m < CLA_GROUP; m++) term = term & p[m];
      r.g = r.g | term;
    end
    r.p = &p;
    return r;
  endfunction

endpackage

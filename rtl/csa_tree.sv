// Carry-save reduction tree for the partial products.
//
// Adds ROWS operands of W bits until only two remain (a sum row and a carry
// row), which the final carry look-ahead adder then adds. At each level the
// rows are taken in groups of three and each group is reduced to two by a
// csa_row; the rows left over (one or two) pass straight to the next level.
// A level with n rows thus leaves 2*floor(n/3) + n mod 3. For 32 rows this
// takes 8 levels (32, 22, 15, 10, 7, 5, 4, 3, 2). Using 3:2 full-adder rows
// in this Wallace-style arrangement is this design's choice; the method only
// fixes that rows are added until two remain.
//
// Combinational. s + c == sum of rows (mod 2^W). ROWS must be at least 2.
module csa_tree #(
  parameter int unsigned W    = 128,
  parameter int unsigned ROWS = 32
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  function automatic int unsigned rows_after(input int unsigned n);
    return 2 * (n / 3) + n % 3;
  endfunction

  // number of rows present at a given level
  function automatic int unsigned rows_at(input int unsigned n, input int unsigned level);
    for (int unsigned l = 0; l < level; l++) n = rows_after(n);
    return n;
  endfunction

  function automatic int unsigned num_levels(input int unsigned n);
    int unsigned l;
    l = 0;
    while (n > 2) begin
      n = rows_after(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels(ROWS);

  if (ROWS < 2) begin : g_bad_rows
    $error("csa_tree: ROWS must be at least 2");
  end

  // Each level keeps its rows in its own array (entries beyond the level's
  // row count are unused and tied to zero).
  for (genvar l = 0; l <= LEVELS; l++) begin : g_level
    localparam int unsigned NIN = rows_at(ROWS, l);
    logic [W-1:0] r [ROWS];

    if (l == 0) begin : g_first
      for (genvar k = 0; k < ROWS; k++) begin : g_in
        assign r[k] = rows[k];
      end
    end else begin : g_next
      localparam int unsigned NPREV = rows_at(ROWS, l - 1);
      localparam int unsigned NG    = NPREV / 3;

      for (genvar j = 0; j < NG; j++) begin : g_csa
        csa_row #(.W(W)) u_csa (
          .a  (g_level[l-1].r[3*j]),
          .b  (g_level[l-1].r[3*j+1]),
          .c  (g_level[l-1].r[3*j+2]),
          .s  (r[2*j]),
          .co (r[2*j+1])
        );
      end

      for (genvar j = 3 * NG; j < NPREV; j++) begin : g_pass
        assign r[2*NG + j - 3*NG] = g_level[l-1].r[j];
      end

      for (genvar j = NIN; j < ROWS; j++) begin : g_unused
        assign r[j] = '0;
      end
    end
  end

  assign s = g_level[LEVELS].r[0];
  assign c = g_level[LEVELS].r[1];

endmodule

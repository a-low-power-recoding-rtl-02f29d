// csa_tree: carry-save (Wallace-style) reduction tree.
//
// Reduces ROWS rows of WIDTH bits to two rows, sum and carry, with
//     sum + carry == sum of all rows (mod 2^WIDTH).
// Each level groups its rows in threes and passes every group through a 3:2
// carry-save adder (csa32); one or two leftover rows pass straight on. A level
// of r rows leaves 2*floor(r/3) + r%3 rows, until two remain. The tree takes
// the partial product rows and the correction term, as in the source design;
// the grouping rule is this design's own. Purely combinational; depth is the
// number of levels, about log1.5(ROWS/2).
//
// Interface: rows[ROWS] in; sum, carry out, both WIDTH bits. ROWS must be at
// least 1 (with a single row, carry is zero).
module csa_tree #(
  parameter int unsigned ROWS  = 10,
  parameter int unsigned WIDTH = 33
) (
  input  logic [WIDTH-1:0] rows [ROWS],
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);
  // rows left after l reduction levels
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned r;
    r = ROWS;
    for (int unsigned i = 0; i < l; i++)
      if (r > 2) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned r, n;
    r = ROWS;
    n = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      n++;
    end
    return n;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NIN  = rows_at(l);
    localparam int unsigned NGRP = NIN / 3;
    localparam int unsigned NOUT = rows_at(l + 1);
    logic [WIDTH-1:0] cur [NIN];    // rows entering this level
    logic [WIDTH-1:0] nxt [NOUT];   // rows leaving this level
    if (l == 0) begin : g_in
      assign cur = rows;
    end else begin : g_in
      assign cur = g_lvl[l-1].nxt;
    end
    for (genvar g = 0; g < NGRP; g++) begin : g_csa
      csa32 #(.WIDTH(WIDTH)) u_csa (
        .x(cur[3*g]), .y(cur[3*g+1]), .z(cur[3*g+2]),
        .s(nxt[2*g]), .c(nxt[2*g+1])
      );
    end
    for (genvar r = 0; r < NIN % 3; r++) begin : g_pass
      assign nxt[2*NGRP+r] = cur[3*NGRP+r];
    end
  end

  if (LEVELS == 0) begin : g_out
    assign sum = rows[0];
    if (ROWS > 1) begin : g_two
      assign carry = rows[ROWS-1];
    end else begin : g_one
      assign carry = '0;
    end
  end else begin : g_out
    assign sum   = g_lvl[LEVELS-1].nxt[0];
    assign carry = g_lvl[LEVELS-1].nxt[1];
  end
endmodule

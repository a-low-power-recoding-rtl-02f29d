// cla_adder: two-level carry-lookahead adder (the final adder of the
// multiplier).
//
// Adds the carry-save rows a and b (plus cin) into sum, modulo 2^WIDTH, and
// reports the carry out. Bits are split into groups of GRP (4) bits. Level one
// forms bit generate g = a&b and propagate p = a^b and, per group, the group
// generate G and propagate P. Level two computes the carry into every group
// directly from all lower G/P and cin as a sum of products (no ripple between
// groups). Inside a group, every bit carry is again a sum of products of the
// bit g/p and the group carry-in. The source design names a CLA adder here;
// the group size and two-level arrangement are this design's own. Purely
// combinational.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out.
module cla_adder #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned GRP   = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NG = (WIDTH + GRP - 1) / GRP;
  localparam int unsigned WP = NG * GRP;

  logic [WP-1:0] g, p, c;
  logic [NG-1:0] gg, gp;
  logic [NG:0]   gc;

  always_comb begin
    g = WP'(a & b);
    p = WP'(a ^ b);

    // level 1: group generate / propagate
    for (int unsigned k = 0; k < NG; k++) begin
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int unsigned i = 0; i < GRP; i++) begin
        logic term;
        term = g[k*GRP+i];
        for (int unsigned m = i + 1; m < GRP; m++) term &= p[k*GRP+m];
        gg[k] |= term;
        gp[k] &= p[k*GRP+i];
      end
    end

    // level 2: carry into each group as a sum of products
    for (int unsigned k = 0; k <= NG; k++) begin
      logic all_p;
      gc[k] = 1'b0;
      for (int unsigned i = 0; i < k; i++) begin
        logic term;
        term = gg[i];
        for (int unsigned m = i + 1; m < k; m++) term &= gp[m];
        gc[k] |= term;
      end
      all_p = 1'b1;
      for (int unsigned m = 0; m < k; m++) all_p &= gp[m];
      gc[k] |= all_p & cin;
    end

    // bit carries inside each group
    for (int unsigned k = 0; k < NG; k++) begin
      for (int unsigned i = 0; i < GRP; i++) begin
        logic cbit, all_pi;
        cbit = 1'b0;
        for (int unsigned j = 0; j < i; j++) begin
          logic term;
          term = g[k*GRP+j];
          for (int unsigned m = j + 1; m < i; m++) term &= p[k*GRP+m];
          cbit |= term;
        end
        all_pi = 1'b1;
        for (int unsigned m = 0; m < i; m++) all_pi &= p[k*GRP+m];
        c[k*GRP+i] = cbit | (all_pi & gc[k]);
      end
    end

    sum  = WIDTH'(p ^ c);
    cout = (WIDTH == WP) ? gc[NG] : (g[WIDTH-1] | (p[WIDTH-1] & c[WIDTH-1]));
  end
endmodule

// ha_star: signed-bit half adder HA*.
//
// Adds two positively weighted bits p and q of weight 1 and returns a
// positively weighted carry c of weight 2 and a negatively weighted sum bit s
// of weight 1, so that
//     p + q = 2*c - s.
// Truth table: 00 -> c=0,s=0; 01/10 -> c=1,s=1 (2-1 = 1); 11 -> c=1,s=0 (2).
// The name HA* and the use of signed-bit adders as recoder building blocks
// follow the source design; this particular sign assignment (two positive
// inputs, negative sum) is this design's own reading of the cell. It is the
// cell that turns the odd-position bit of each digit pair into the negatively
// weighted top bit of a Modified Booth digit. Purely combinational.
module ha_star (
  input  logic p,   // positive input, weight 1
  input  logic q,   // positive input, weight 1
  output logic c,   // positive carry, weight 2
  output logic s    // negative sum, weight -1
);
  always_comb begin
    c = p | q;
    s = p ^ q;
  end
endmodule

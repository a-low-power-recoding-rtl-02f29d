// booth_ppg: Modified Booth partial product row.
//
// Forms one row of the partial product generator from the multiplicand X and
// one MB digit d: the magnitude is X (d.one), 2X (d.two) or 0, and a negative
// digit inverts it (one's complement); the missing +1 is supplied by the
// correction term row at the digit's weight. The row's sign bit is then
// inverted so no sign extension is needed in the carry-save tree; the
// constant -2^M that this inversion implies is also folded into the
// correction term. The unsigned value of pp is therefore
//     pp = d*X - d.neg + 2^M.
// The row-per-digit structure follows the source design; the sign handling is
// this design's own (a standard MB technique). Purely combinational.
//
// Interface: x (M bits, two's complement), d (MB digit) in; pp (M+1 bits) out.
module booth_ppg
  import fam_pkg::*;
#(
  parameter int unsigned M = 16
) (
  input  logic [M-1:0] x,
  input  mb_digit_t    d,
  output logic [M:0]   pp
);
  logic [M:0] mag, row;

  always_comb begin
    if (d.one)      mag = {x[M-1], x};
    else if (d.two) mag = {x, 1'b0};
    else            mag = '0;
    row = d.neg ? ~mag : mag;
    pp  = {~row[M], row[M-1:0]};
  end
endmodule

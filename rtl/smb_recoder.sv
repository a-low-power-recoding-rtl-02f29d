// smb_recoder: sum-to-Modified-Booth (S-MB) recoder.
//
// Produces the Modified Booth digits y_j in {-2..+2} of the sum A+B of two
// N-bit two's-complement numbers directly from the bits of A and B, without a
// carry-propagate adder in front of a Booth encoder. That direct recoding is
// the idea of the source design; the cell arrangement below is this design's
// own, as the source does not detail the recoder's cells.
//
// Both addends are sign-extended (zero-extended when SIGNED = 0) to
// W = smb_width(N) bits (N+2, rounded up to even) and split into D = W/2 digit pairs (bit 2j at weight 1, bit 2j+1 at
// weight 2 within digit j). For every pair:
//   * a half adder on the odd bits gives q_j (weight 2) and a carry c_j+1
//     that goes to the even position of the next pair (weight 4);
//   * a full adder on the even bits and the carry c_j from the previous pair
//     gives the sum bit se_j (weight 1) and a carry k_j (weight 2);
//   * HA* adds q_j and k_j into a negative bit so_j (weight -2) and a
//     positive carry e_j that enters the next digit (weight 4);
//   * the digit is y_j = -2*so_j + se_j + e_(j-1), always in {-2..+2}.
// No carry travels further than one digit pair, so the delay does not grow
// with N. Signed: because |A+B| <= 2^N <= 2^(W-2), the D digits represent A+B
// exactly (the weight-2^W carries out of the top pair are dropped). Unsigned:
// the two top bits of both extended addends are zero, so no carry leaves the
// top pair at all. Handling both signed and unsigned, odd and even widths
// follows the source design.
//
// Interface: a, b (N bits, two's complement or unsigned per SIGNED) in; y[0..D-1] out, y[0] least
// significant, as (neg, two, one) select bits. Purely combinational. Odd and
// even N are both accepted.
module smb_recoder
  import fam_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter bit          SIGNED = 1'b1   // 1: two's complement, 0: unsigned addends
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output mb_digit_t    y [fam_pkg::smb_digits(N)]
);
  localparam int unsigned W = smb_width(N);
  localparam int unsigned D = smb_digits(N);

  logic [W-1:0] ae, be;
  logic [D:0]   c_odd;   // carry from the odd-bit half adder of pair j-1 into pair j
  logic [D-1:0] q, k, se, so, e;

  assign ae = {{(W - N){SIGNED & a[N-1]}}, a};
  assign be = {{(W - N){SIGNED & b[N-1]}}, b};
  assign c_odd[0] = 1'b0;

  for (genvar j = 0; j < D; j++) begin : g_pair
    logic e_prev;
    // odd position: conventional half adder
    assign q[j]        = ae[2*j+1] ^ be[2*j+1];
    assign c_odd[j+1]  = ae[2*j+1] & be[2*j+1];
    // even position: conventional full adder with the carry of the previous pair
    assign se[j] = ae[2*j] ^ be[2*j] ^ c_odd[j];
    assign k[j]  = (ae[2*j] & be[2*j]) | (c_odd[j] & (ae[2*j] ^ be[2*j]));
    // odd position: signed-bit half adder makes the negative MB top bit
    ha_star u_has (.p(q[j]), .q(k[j]), .c(e[j]), .s(so[j]));

    if (j == 0) begin : g_first
      assign e_prev = 1'b0;
    end else begin : g_rest
      assign e_prev = e[j-1];
    end

    // y_j = -2*so + se + e_prev
    assign y[j].one = se[j] ^ e_prev;
    assign y[j].two = so[j] ? ~(se[j] | e_prev) : (se[j] & e_prev);
    assign y[j].neg = so[j] & ~(se[j] & e_prev);
  end

endmodule

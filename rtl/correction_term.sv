// correction_term: the CT row fed into the carry-save tree.
//
// Each of the D partial product rows from booth_ppg has the value
// d_j*X - neg_j + 2^M (one's-complement negation, inverted sign bit). Row j
// sits at weight 4^j, so the rows together exceed the true product by
//     2^M * (4^D - 1)/3  -  sum_j neg_j * 4^j .
// The correction term is the P-bit row that cancels this modulo 2^P:
//     ct = K + sum_j neg_j * 4^j,   K = -(2^M * sum_j 4^j) mod 2^P.
// K has no set bits below position M, so the neg bits at positions below M
// are simply placed in the row; only neg bits at or above M need the small
// constant addition. The CT block and its place in the datapath come from the
// source design; what it contains is this design's own choice, as the source
// names the block without describing it. Purely combinational.
//
// Interface: neg[D] (digit signs) in; ct (P bits) out.
module correction_term #(
  parameter int unsigned M = 16,
  parameter int unsigned D = 9,
  parameter int unsigned P = 33
) (
  input  logic [D-1:0] neg,
  output logic [P-1:0] ct
);
  function automatic logic [P-1:0] sign_constant();
    logic [P-1:0] acc;
    acc = '0;
    for (int unsigned j = 0; j < D; j++)
      if (M + 2*j < P) acc += P'(1) << (M + 2*j);
    return -acc;
  endfunction

  localparam logic [P-1:0] K = sign_constant();

  logic [P-1:0] negrow;

  always_comb begin
    negrow = '0;
    for (int unsigned j = 0; j < D; j++)
      if (2*j < P) negrow[2*j] = neg[j];
    ct = K + negrow;
  end
endmodule

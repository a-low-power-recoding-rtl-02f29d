// fam_pkg: types and size functions shared by the fused add-multiply (FAM)
// operator.
//
// A Modified Booth (MB) digit takes the values -2, -1, 0, +1, +2. It is carried
// between the sum-to-MB recoder and the partial product generator as three
// select bits (one, two, neg): one selects X, two selects 2X and neg selects the
// negated row. A zero digit has all three bits low; a negative zero never
// occurs. The select-bit form is the usual MB encoding; the width rules below
// are this design's own.
package fam_pkg;

  typedef struct packed {
    logic neg;   // digit is negative
    logic two;   // |digit| == 2
    logic one;   // |digit| == 1
  } mb_digit_t;

  // Width, in bits, to which both addends are sign-extended before recoding:
  // at least N+2 bits so that the MB digit string cannot wrap, rounded up to an
  // even number so the bits split into whole digit pairs.
  function automatic int unsigned smb_width(int unsigned n);
    return (n % 2 == 0) ? n + 2 : n + 3;
  endfunction

  // Number of MB digits produced for N-bit addends.
  function automatic int unsigned smb_digits(int unsigned n);
    return smb_width(n) / 2;
  endfunction

endpackage

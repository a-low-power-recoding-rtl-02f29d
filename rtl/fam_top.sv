// fam_top: fused add-multiply (FAM) operator, Z = X * (A + B).
//
// Instead of adding A and B in a carry-propagate adder and Booth-encoding the
// sum, the sum is recoded straight into Modified Booth (MB) digits by the
// S-MB recoder (smb_recoder). The rest is a Booth multiplier: one partial
// product row per digit (booth_ppg), a correction term row (correction_term)
// that supplies the +1 of negated rows and cancels the sign-extension
// offsets, a carry-save tree (csa_tree) down to a sum and a carry row, and a
// final carry-lookahead adder (cla_adder). The only carry-propagate adder in
// the whole datapath is that final one. This block structure follows the
// source design; the operand widths N = M = 16 are this design's default, the
// source giving none.
//
// SIGNED selects two's-complement (default) or unsigned operands, both of
// which the source design supports; an unsigned X is zero-extended by one bit
// so the Booth rows can treat it as signed.
//
// Interface: a, b (N bits) and x (M bits) in; z = x*(a+b) (M+N+1 bits,
// always exact; two's complement when SIGNED, unsigned otherwise) out. Purely
// combinational: z is valid one propagation delay after the inputs settle.
module fam_top
  import fam_pkg::*;
#(
  parameter int unsigned N = 16,   // width of the addends A and B
  parameter int unsigned M = 16,   // width of the multiplicand X
  parameter bit          SIGNED = 1'b1   // 1: all operands two's complement, 0: all unsigned
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [M-1:0]   x,
  output logic [M+N:0]   z
);
  localparam int unsigned D = smb_digits(N);   // MB digits of A+B
  localparam int unsigned P = M + N + 1;       // product width
  localparam int unsigned R = D + 1;           // rows into the CSA tree
  localparam int unsigned XW = SIGNED ? M : M + 1;   // X as a signed number

  mb_digit_t    y [D];
  logic [XW-1:0] xs;
  logic [XW:0]  pp [D];
  logic [D-1:0] neg;
  logic [P-1:0] ct;
  logic [P-1:0] rows [R];
  logic [P-1:0] s_row, c_row;
  logic         cout_unused;

  // unsigned X gets a zero sign bit so the Booth rows can treat it as signed
  assign xs = XW'(x);

  smb_recoder #(.N(N), .SIGNED(SIGNED)) u_smb (.a(a), .b(b), .y(y));

  for (genvar j = 0; j < D; j++) begin : g_pp
    booth_ppg #(.M(XW)) u_ppg (.x(xs), .d(y[j]), .pp(pp[j]));
    assign neg[j]  = y[j].neg;
    // row j at weight 4^j, truncated to the product width
    assign rows[j] = P'({{(2*D){1'b0}}, pp[j]} << (2*j));
  end

  correction_term #(.M(XW), .D(D), .P(P)) u_ct (.neg(neg), .ct(ct));
  assign rows[D] = ct;

  csa_tree #(.ROWS(R), .WIDTH(P)) u_csa (.rows(rows), .sum(s_row), .carry(c_row));

  cla_adder #(.WIDTH(P)) u_cla (.a(s_row), .b(c_row), .cin(1'b0), .sum(z), .cout(cout_unused));

endmodule

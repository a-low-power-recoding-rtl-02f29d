// csa32: word-wide 3:2 carry-save adder (a row of full adders).
//
// Reduces three WIDTH-bit rows x, y, z to a sum row s and a carry row c with
// x + y + z == s + c (mod 2^WIDTH). The carry row is already shifted one place
// left; the carry out of the top bit is dropped. Purely combinational. Building
// block of csa_tree.
module csa32 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c
);
  logic [WIDTH-1:0] maj;

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x & y) | (x & z) | (y & z);
    c   = {maj[WIDTH-2:0], 1'b0};
  end
endmodule

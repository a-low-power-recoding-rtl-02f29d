// tb_fam_top: end-to-end self-check of the fused add-multiply operator.
//
// The default instance (N = M = 16, no parameter override) gets all corner
// combinations of A, B and X (0, +-1, largest and smallest values, 0x5555)
// followed by random operands. A second instance with odd addend width
// (N = 5, M = 4) is checked exhaustively over every A, B and X, and so is an
// unsigned instance of the same size (SIGNED = 0); a 16-bit unsigned instance
// gets the same operands as the default one. Every result must equal X*(A+B)
// computed with integer arithmetic.
//
// It also counts how often each mechanism of the datapath occurred and fails
// if one never did: each Modified Booth digit value -2..+2 out of the
// recoder, a sum A+B that does not fit in N bits (it needs the extra
// recoded digit), a negative product, a zero product, and unsigned operands
// with their top bits set (values a signed reading would get wrong). A watchdog stops the
// run after 60000 cycles with a failure.
module tb_fam_top;
  import fam_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int unsigned D16 = smb_digits(16);

  logic [15:0] a, b, x;
  logic [32:0] z;
  logic [4:0]  a5, b5;
  logic [3:0]  x4;
  logic [9:0]  z5, z5u;
  logic [32:0] zu;

  fam_top                    dut   (.a(a),  .b(b),  .x(x),  .z(z));
  fam_top #(.N(5), .M(4))    dut_s (.a(a5), .b(b5), .x(x4), .z(z5));
  fam_top #(.N(5), .M(4), .SIGNED(1'b0))   dut_su (.a(a5), .b(b5), .x(x4), .z(z5u));
  fam_top #(.SIGNED(1'b0))                 dut_u  (.a(a),  .b(b),  .x(x),  .z(zu));

  int seen_digit [5];
  int n_sum_wide, n_neg_prod, n_zero_prod, n_unsigned_top;

  function automatic int digit_value(mb_digit_t d);
    int mag;
    mag = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -mag : mag;
  endfunction

  localparam logic [15:0] CORNER [7] =
    '{16'h0000, 16'h0001, 16'hffff, 16'h7fff, 16'h8000, 16'h5555, 16'h8001};

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s, e, e5, eu;
    int n;
    n = 0;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      if (n < 343) begin
        a = CORNER[n % 7];
        b = CORNER[(n / 7) % 7];
        x = CORNER[n / 49];
      end else begin
        a = 16'($urandom);
        b = 16'($urandom);
        x = 16'($urandom);
      end
      n++;
      {x4, b5, a5} = 14'(i);
      @(posedge clk);

      s = longint'($signed(a)) + longint'($signed(b));
      e = longint'($signed(x)) * s;
      checks++;
      if (longint'($signed(z)) != e) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=16: x=%0d a=%0d b=%0d z=%0d expected %0d",
                   $signed(x), $signed(a), $signed(b), $signed(z), e);
      end
      eu = longint'(x) * (longint'(a) + longint'(b));
      checks++;
      if (longint'(zu) != eu) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=16 unsigned: x=%0d a=%0d b=%0d z=%0d expected %0d", x, a, b, zu, eu);
      end
      if (a[15] && b[15] && x[15]) n_unsigned_top++;
      if (s > 32767 || s < -32768) n_sum_wide++;
      if (e < 0) n_neg_prod++;
      if (e == 0) n_zero_prod++;
      for (int j = 0; j < D16; j++) seen_digit[digit_value(dut.y[j]) + 2]++;

      if (i < 16384) begin
        e5 = longint'($signed(x4)) * (longint'($signed(a5)) + longint'($signed(b5)));
        checks++;
        if (longint'($signed(z5)) != e5) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=5,M=4: x=%0d a=%0d b=%0d z=%0d expected %0d",
                     $signed(x4), $signed(a5), $signed(b5), $signed(z5), e5);
        end
        e5 = longint'(x4) * (longint'(a5) + longint'(b5));
        checks++;
        if (longint'(z5u) != e5) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=5,M=4 unsigned: x=%0d a=%0d b=%0d z=%0d expected %0d",
                     x4, a5, b5, z5u, e5);
        end
      end
    end

    for (int v = 0; v < 5; v++) begin
      checks++;
      $display("MB digit %0d produced %0d times", v - 2, seen_digit[v]);
      if (seen_digit[v] == 0) failures++;
    end
    $display("sum wider than N bits: %0d, negative products: %0d, zero products: %0d",
             n_sum_wide, n_neg_prod, n_zero_prod);
    $display("unsigned operations with all top bits set: %0d", n_unsigned_top);
    checks += 4;
    if (n_unsigned_top == 0) failures++;
    if (n_sum_wide == 0)  failures++;
    if (n_neg_prod == 0)  failures++;
    if (n_zero_prod == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

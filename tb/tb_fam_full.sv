// tb_fam_full: full-size end-to-end check of the fused add-multiply operator.
//
// Instantiates fam_top with its default parameters only (N = M = 16). It
// applies all corner combinations of A, B and X (0, +-1, largest and
// smallest values, 0x5555, 0x8001), then random operands. Every result must
// equal X*(A+B) computed with integer arithmetic. It counts how often each
// Modified Booth digit value -2..+2, a sum A+B wider than N bits, a negative
// product and a zero product occurred, and fails if one never did. A watchdog
// stops the run after 60000 cycles with a failure.
module tb_fam_full;
  import fam_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int unsigned D16 = smb_digits(16);

  logic [15:0] a, b, x;
  logic [32:0] z;

  fam_top                    dut   (.a(a),  .b(b),  .x(x),  .z(z));

  int seen_digit [5];
  int n_sum_wide, n_neg_prod, n_zero_prod;

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
    longint s, e;
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
      if (s > 32767 || s < -32768) n_sum_wide++;
      if (e < 0) n_neg_prod++;
      if (e == 0) n_zero_prod++;
      for (int j = 0; j < D16; j++) seen_digit[digit_value(dut.y[j]) + 2]++;
    end

    for (int v = 0; v < 5; v++) begin
      checks++;
      $display("MB digit %0d produced %0d times", v - 2, seen_digit[v]);
      if (seen_digit[v] == 0) failures++;
    end
    $display("sum wider than N bits: %0d, negative products: %0d, zero products: %0d",
             n_sum_wide, n_neg_prod, n_zero_prod);
    checks += 3;
    if (n_sum_wide == 0)  failures++;
    if (n_neg_prod == 0)  failures++;
    if (n_zero_prod == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

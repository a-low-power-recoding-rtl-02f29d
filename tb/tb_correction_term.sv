// tb_correction_term: self-check of the correction term row.
//
// With the default sizes (M = 16, D = 9, P = 33) and with M = 4, D = 4,
// P = 11 (where negation bits overlap the sign-extension constant) it applies
// corner and random digit-sign vectors and checks
//     ct == (sum_j neg_j*4^j - 2^M * sum_j 4^j) mod 2^P,
// computed with integer arithmetic. A watchdog stops the run after 3000
// cycles with a failure.
module tb_correction_term;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [8:0]  neg9;
  logic [32:0] ct33;
  logic [3:0]  neg4;
  logic [10:0] ct11;

  correction_term                           dut_a (.neg(neg9), .ct(ct33));
  correction_term #(.M(4), .D(4), .P(11))   dut_b (.neg(neg4), .ct(ct11));

  function automatic longint expected(longint negv, int m, int dd, int p);
    longint r;
    r = 0;
    for (int j = 0; j < dd; j++) begin
      if (negv[j]) r += longint'(1) << (2 * j);
      r -= longint'(1) << (m + 2 * j);
    end
    return r & ((longint'(1) << p) - 1);
  endfunction

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i < 512) neg9 = 9'(i);
      else         neg9 = 9'($urandom);
      neg4 = 4'(i);
      @(posedge clk);
      checks += 2;
      if (longint'(ct33) != expected(longint'(neg9), 16, 9, 33)) begin
        failures++;
        $display("FAIL default neg=%b ct=%h", neg9, ct33);
      end
      if (longint'(ct11) != expected(longint'(neg4), 4, 4, 11)) begin
        failures++;
        $display("FAIL small neg=%b ct=%h", neg4, ct11);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

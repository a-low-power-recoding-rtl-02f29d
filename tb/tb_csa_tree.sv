// tb_csa_tree: self-check of the carry-save reduction tree.
//
// Instances with the default 10 rows of 33 bits, with 3 rows and with 2 rows
// (no reduction level) get random and all-ones rows; sum + carry must equal
// the sum of the rows modulo 2^WIDTH, computed with integer arithmetic. A
// watchdog stops the run after 3000 cycles with a failure.
module tb_csa_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [32:0] r10 [10];
  logic [32:0] s10, c10;
  logic [7:0]  r3 [3];
  logic [7:0]  s3, c3;
  logic [7:0]  r2 [2];
  logic [7:0]  s2, c2;

  csa_tree                          dut10 (.rows(r10), .sum(s10), .carry(c10));
  csa_tree #(.ROWS(3), .WIDTH(8))   dut3  (.rows(r3),  .sum(s3),  .carry(c3));
  csa_tree #(.ROWS(2), .WIDTH(8))   dut2  (.rows(r2),  .sum(s2),  .carry(c2));

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e10, e3, e2;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      e10 = 0; e3 = 0; e2 = 0;
      for (int r = 0; r < 10; r++) begin
        r10[r] = (i == 0) ? '1 : {1'($urandom), 32'($urandom)};
        e10 += longint'(r10[r]);
      end
      for (int r = 0; r < 3; r++) begin
        r3[r] = (i == 0) ? '1 : 8'($urandom);
        e3 += longint'(r3[r]);
      end
      for (int r = 0; r < 2; r++) begin
        r2[r] = 8'($urandom);
        e2 += longint'(r2[r]);
      end
      @(posedge clk);
      checks += 3;
      if (33'(longint'(s10) + longint'(c10)) != 33'(e10)) begin
        failures++;
        $display("FAIL 10 rows: %h + %h != %h", s10, c10, 33'(e10));
      end
      if (8'(s3 + c3) != 8'(e3)) begin
        failures++;
        $display("FAIL 3 rows");
      end
      if (8'(s2 + c2) != 8'(e2)) begin
        failures++;
        $display("FAIL 2 rows");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ha_star: exhaustive self-check of the signed-bit half adder HA*.
// For all four input pairs it checks p + q == 2*c - s. A watchdog ends the
// run with a failure if the test does not finish within 100 clock cycles.
module tb_ha_star;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic p, q, c, s;

  ha_star dut (.p(p), .q(q), .c(c), .s(s));

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      {p, q} = 2'(i);
      @(posedge clk);
      checks++;
      if (int'(p) + int'(q) != 2 * int'(c) - int'(s)) begin
        failures++;
        $display("FAIL p=%0d q=%0d -> c=%0d s=%0d", p, q, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

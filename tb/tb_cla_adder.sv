// tb_cla_adder: self-check of the carry-lookahead adder.
//
// An 8-bit instance is checked exhaustively over both operands and the carry
// in; the default 33-bit instance (a width that is not a multiple of the group
// size) with random and carry-chain corner operands. Sum and carry out are
// compared with integer addition. A watchdog stops the run after 140000
// cycles with a failure.
module tb_cla_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [32:0] a33, b33, s33;
  logic        ci33, co33;

  cla_adder #(.WIDTH(8)) dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  cla_adder              dut33 (.a(a33), .b(b33), .cin(ci33), .sum(s33), .cout(co33));

  initial begin : watchdog
    repeat (140000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int i = 0; i < 131072; i++) begin
      @(negedge clk);
      {ci8, b8, a8} = 17'(i);
      case (i % 4)
        0: begin a33 = '1; b33 = 33'(i % 2 == 0); end
        default: begin
          a33 = {1'($urandom), 32'($urandom)};
          b33 = {1'($urandom), 32'($urandom)};
        end
      endcase
      ci33 = 1'($urandom);
      @(posedge clk);
      checks += 2;
      if ({co8, s8} != 9'(int'(a8) + int'(b8) + int'(ci8))) begin
        failures++;
        if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d", a8, b8, ci8);
      end
      e = longint'(a33) + longint'(b33) + longint'(ci33);
      if ({co33, s33} != 34'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL 33-bit %h+%h+%0d", a33, b33, ci33);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

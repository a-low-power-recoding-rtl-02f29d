// tb_smb_recoder: self-check of the sum-to-Modified-Booth recoder.
//
// Four instances: N = 6 (even) and N = 5 (odd) are checked exhaustively over
// every pair of addends, N = 6 also with unsigned addends, and the default
// N = 16 with corner values and random addends. For each result the Modified Booth digits must be legal (one and
// two never both set, no negative zero) and sum_j y_j*4^j must equal A+B,
// computed here with plain integer arithmetic. It also counts that every
// digit value -2..+2 was produced. A watchdog stops the run after 20000
// cycles with a failure.
module tb_smb_recoder;
  import fam_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int unsigned D6  = smb_digits(6);
  localparam int unsigned D5  = smb_digits(5);
  localparam int unsigned D16 = smb_digits(16);

  logic [5:0]  a6, b6;
  logic [4:0]  a5, b5;
  logic [15:0] a16, b16;
  mb_digit_t   y6 [D6];
  mb_digit_t   y6u [D6];
  mb_digit_t   y5 [D5];
  mb_digit_t   y16 [D16];

  smb_recoder #(.N(6))  dut6  (.a(a6),  .b(b6),  .y(y6));
  smb_recoder #(.N(5))  dut5  (.a(a5),  .b(b5),  .y(y5));
  smb_recoder #(.N(6), .SIGNED(1'b0)) dut6u (.a(a6), .b(b6), .y(y6u));
  smb_recoder           dut16 (.a(a16), .b(b16), .y(y16));

  int seen [5];   // how often each digit value -2..+2 appeared

  function automatic int digit_value(mb_digit_t d);
    int mag;
    mag = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -mag : mag;
  endfunction

  function automatic bit digit_legal(mb_digit_t d);
    return !(d.one && d.two) && !(d.neg && !d.one && !d.two);
  endfunction

  task automatic check_digits(string tag, longint expected, longint got, bit legal);
    checks++;
    if (!legal || expected != got) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: expected %0d got %0d legal=%0d", tag, expected, got, legal);
    end
  endtask

  task automatic check_all();
    longint v;
    bit ok;
    v = 0; ok = 1;
    for (int j = D6 - 1; j >= 0; j--) begin
      v = v * 4 + digit_value(y6[j]);
      ok &= digit_legal(y6[j]);
      seen[digit_value(y6[j]) + 2]++;
    end
    check_digits("N=6", longint'($signed(a6)) + longint'($signed(b6)), v, ok);
    v = 0; ok = 1;
    for (int j = D6 - 1; j >= 0; j--) begin
      v = v * 4 + digit_value(y6u[j]);
      ok &= digit_legal(y6u[j]);
    end
    check_digits("N=6 unsigned", longint'(a6) + longint'(b6), v, ok);
    v = 0; ok = 1;
    for (int j = D5 - 1; j >= 0; j--) begin
      v = v * 4 + digit_value(y5[j]);
      ok &= digit_legal(y5[j]);
    end
    check_digits("N=5", longint'($signed(a5)) + longint'($signed(b5)), v, ok);
    v = 0; ok = 1;
    for (int j = D16 - 1; j >= 0; j--) begin
      v = v * 4 + digit_value(y16[j]);
      ok &= digit_legal(y16[j]);
    end
    check_digits("N=16", longint'($signed(a16)) + longint'($signed(b16)), v, ok);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [15:0] CORNER [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h5555};

  initial begin
    int n;
    n = 0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      {b6, a6} = 12'(i);
      {b5, a5} = 10'(i);
      if (n < 36) begin
        a16 = CORNER[n % 6];
        b16 = CORNER[n / 6];
      end else begin
        a16 = 16'($urandom);
        b16 = 16'($urandom);
      end
      n++;
      @(posedge clk);
      check_all();
    end
    for (int v = 0; v < 5; v++) begin
      checks++;
      if (seen[v] == 0) begin
        failures++;
        $display("FAIL digit value %0d never produced", v - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

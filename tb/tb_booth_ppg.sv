// tb_booth_ppg: self-check of one Modified Booth partial product row.
//
// For the default M = 16 and for M = 3 it applies every digit -2..+2 with
// corner and random multiplicands (M = 3: all eight) and checks the row
// against d*X - neg + 2^M modulo 2^(M+1), worked out with integer arithmetic.
// A watchdog stops the run after 5000 cycles with a failure.
module tb_booth_ppg;
  import fam_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] x16;
  logic [2:0]  x3;
  mb_digit_t   d;
  logic [16:0] pp16;
  logic [3:0]  pp3;

  booth_ppg          dut16 (.x(x16), .d(d), .pp(pp16));
  booth_ppg #(.M(3)) dut3  (.x(x3),  .d(d), .pp(pp3));

  function automatic mb_digit_t encode(int v);
    mb_digit_t r;
    r.neg = v < 0;
    r.one = (v == 1) || (v == -1);
    r.two = (v == 2) || (v == -2);
    return r;
  endfunction

  function automatic longint expected(int v, longint xs, int m);
    longint r;
    r = longint'(v) * xs - ((v < 0) ? 1 : 0) + (longint'(1) << m);
    return r & ((longint'(1) << (m + 1)) - 1);
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int v = -2; v <= 2; v++) begin
        @(negedge clk);
        d   = encode(v);
        x3  = 3'(i);
        case (i)
          0: x16 = 16'h8000;
          1: x16 = 16'h7fff;
          2: x16 = 16'hffff;
          3: x16 = 16'h0000;
          default: x16 = 16'($urandom);
        endcase
        @(posedge clk);
        checks += 2;
        if (longint'(pp16) != expected(v, longint'($signed(x16)), 16)) begin
          failures++;
          $display("FAIL M=16 d=%0d x=%0d pp=%h", v, $signed(x16), pp16);
        end
        if (longint'(pp3) != expected(v, longint'($signed(x3)), 3)) begin
          failures++;
          $display("FAIL M=3 d=%0d x=%0d pp=%h", v, $signed(x3), pp3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

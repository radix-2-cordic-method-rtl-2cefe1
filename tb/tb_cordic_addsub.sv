// tb_cordic_addsub: checks the adder/subtractor on random and corner
// operands, both operations, at 16 bits, against longint arithmetic wrapped
// to 16 bits.
module tb_cordic_addsub;
  import tb_cordic_ref_pkg::*;

  localparam int W = 16;
  logic signed [W-1:0] a, b, s;
  logic                sub;
  int checks = 0, failures = 0;

  cordic_addsub #(.WIDTH(W)) dut (.a(a), .b(b), .sub(sub), .s(s));

  task automatic apply(longint av, longint bv, bit sv);
    longint exp;
    a = W'(av); b = W'(bv); sub = sv;
    #1;
    exp = sv ? wrap(longint'(a) - longint'(b), W) : wrap(longint'(a) + longint'(b), W);
    checks++;
    if (longint'(s) != exp) begin
      failures++;
      $display("FAIL a=%0d b=%0d sub=%0b s=%0d exp=%0d", a, b, sub, s, exp);
    end
  endtask

  initial begin
    apply(100, 23, 0);
    apply(100, 23, 1);
    apply(-32768, 1, 1);     // wraps to +32767
    apply(32767, 1, 0);      // wraps to -32768
    for (int n = 0; n < 2000; n++) apply($urandom, $urandom, $urandom % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

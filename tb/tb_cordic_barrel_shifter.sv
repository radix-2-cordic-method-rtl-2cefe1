// tb_cordic_barrel_shifter: checks the multiplexer shifter at every shift
// amount with random and corner words against a floor division by 2^n.
// A 16-bit instance covers shifts 0..15; an 8-bit instance with a 4-bit
// shift amount also covers shifts past the word width (all sign bits).
module tb_cordic_barrel_shifter;
  import tb_cordic_ref_pkg::*;

  logic signed [15:0] din16, dout16;
  logic        [3:0]  sh16;
  logic signed [7:0]  din8, dout8;
  logic        [3:0]  sh8;
  int checks = 0, failures = 0;

  cordic_barrel_shifter #(.WIDTH(16)) dut16 (.din(din16), .shamt(sh16), .dout(dout16));
  cordic_barrel_shifter #(.WIDTH(8), .SHIFT_W(4)) dut8 (.din(din8), .shamt(sh8), .dout(dout8));

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int s = 0; s < 16; s++) begin
        case (n)
          0: din16 = 16'sh8000;
          1: din16 = 16'sh7fff;
          2: din16 = -16'sd1;
          default: din16 = 16'($urandom);
        endcase
        din8 = 8'($urandom);
        sh16 = 4'(s); sh8 = 4'(s);
        #1;
        check(longint'(dout16), floor_shift(longint'(din16), s), "w16");
        check(longint'(dout8), floor_shift(longint'(din8), s), "w8");
      end
    end
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

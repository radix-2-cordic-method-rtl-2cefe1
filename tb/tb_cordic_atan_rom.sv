// tb_cordic_atan_rom: reads every entry of the arctangent ROM at 16 and 32
// bits and compares it with round(atan(2^-i) * 2^(WIDTH-2)) computed with
// $atan. Also checks that addresses past the table depth read 0 and a few
// well-known values (pi/4 = 12868 at 16 bits).
module tb_cordic_atan_rom;
  import tb_cordic_ref_pkg::*;

  logic        [3:0]  a16;
  logic signed [15:0] q16;
  logic        [4:0]  a32;
  logic signed [31:0] q32;
  logic        [3:0]  a12;
  logic signed [15:0] q12;
  int checks = 0, failures = 0;

  cordic_atan_rom #(.WIDTH(16)) dut16 (.addr(a16), .angle(q16));
  cordic_atan_rom #(.WIDTH(32)) dut32 (.addr(a32), .angle(q32));
  cordic_atan_rom #(.WIDTH(16), .DEPTH(12)) dut12 (.addr(a12), .angle(q12));

  task automatic check(longint got, longint exp, string what, int i);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s i=%0d got=%0d exp=%0d", what, i, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      a16 = 4'(i); a12 = 4'(i); #1;
      check(longint'(q16), ref_atan(i, 14), "w16", i);
      check(longint'(q12), (i < 12) ? ref_atan(i, 14) : 0, "depth12", i);
    end
    for (int i = 0; i < 32; i++) begin
      a32 = 5'(i); #1;
      check(longint'(q32), ref_atan(i, 30), "w32", i);
    end
    a16 = 0; a32 = 0; #1;
    check(longint'(q16), 12868, "pi/4 16", 0);
    check(longint'(q32), 843314857, "pi/4 32", 0);
    a16 = 1; #1;
    check(longint'(q16), 7596, "atan(1/2) 16", 1);
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

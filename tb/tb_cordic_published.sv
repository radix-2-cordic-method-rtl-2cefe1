// tb_cordic_published: the two published 30-degree examples, stage by stage.
//
// 16 bit, default build (WIDTH = 16, STAGES = 16): x = 9949, y = 0,
// z = 8579 gives X = 14191, Y = 8189, Z = 0 and stage results
// x1..x8 = 9949 14923 13680 14768 14331 14084 14214 14151.
//
// 32 bit: runs the published 32-bit 30-degree example, x = 652032874, y = 0,
// z = 562209904 (1.0 = 2^30), on two builds:
//  - STAGES = 30: X = 929887701, Y = 536870913, Z = -1 (0xFFFFFFFF), and
//    stage results x1..x8 = 652032874 978049311 896545202 967861297
//    939207509 922990261 931557482 927386541, all as published;
//  - STAGES = 32 (one stage per bit, the module default for WIDTH = 32):
//    the same X and Y, Z = 0.
// Then random angles in +/-1.74 rad with x = 1/An, y = 0 on both builds,
// bit-exact against the reference model and within 64 LSB (6e-8) of
// cos z and sin z.
module tb_cordic_published;
  import tb_cordic_ref_pkg::*;

  localparam int W = 32;
  localparam real ONE = 1073741824.0;

  logic clk = 0, rst = 0;
  logic signed [W-1:0] x, y, z;
  logic signed [W-1:0] X30, Y30, Z30, X32, Y32, Z32;
  logic signed [15:0] x16, y16, z16, X16, Y16, Z16;
  int checks = 0, failures = 0;

  cordic_processor #(.WIDTH(32), .STAGES(30)) dut30 (
    .clk(clk), .rst(rst), .x(x), .y(y), .z(z), .X(X30), .Y(Y30), .Z(Z30));
  cordic_processor #(.WIDTH(32), .STAGES(32)) dut32 (
    .clk(clk), .rst(rst), .x(x), .y(y), .z(z), .X(X32), .Y(Y32), .Z(Z32));

  cordic_processor dut16 (
    .clk(clk), .rst(rst), .x(x16), .y(y16), .z(z16), .X(X16), .Y(Y16), .Z(Z16));

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d (z=%0d)", what, got, exp, z);
    end
  endtask

  task automatic check_near(real got, real exp, string what);
    checks++;
    if (got - exp > 64.0 || exp - got > 64.0) begin
      failures++;
      $display("FAIL %s got=%f exp=%f (z=%0d)", what, got, exp, z);
    end
  endtask

  task automatic apply(longint xv, longint yv, longint zv);
    longint ex, ey, ez;
    x = W'(xv); y = W'(yv); z = W'(zv);
    #1;
    ex = longint'(x); ey = longint'(y); ez = longint'(z);
    rotate(W, 30, ex, ey, ez);
    check(longint'(X30), ex, "X30");
    check(longint'(Y30), ey, "Y30");
    check(longint'(Z30), ez, "Z30");
    ex = longint'(x); ey = longint'(y); ez = longint'(z);
    rotate(W, 32, ex, ey, ez);
    check(longint'(X32), ex, "X32");
    check(longint'(Y32), ey, "Y32");
    check(longint'(Z32), ez, "Z32");
  endtask

  initial begin
    longint zv;
    real ang;
    x16 = 16'sd9949; y16 = 16'sd0; z16 = 16'sd8579;
    #1;
    check(longint'(X16), 14191, "fig16 X");
    check(longint'(Y16), 8189, "fig16 Y");
    check(longint'(Z16), 0, "fig16 Z");
    check(longint'(dut16.xs[1]), 9949, "x1 16");
    check(longint'(dut16.xs[2]), 14923, "x2 16");
    check(longint'(dut16.xs[3]), 13680, "x3 16");
    check(longint'(dut16.xs[4]), 14768, "x4 16");
    check(longint'(dut16.xs[5]), 14331, "x5 16");
    check(longint'(dut16.xs[6]), 14084, "x6 16");
    check(longint'(dut16.xs[7]), 14214, "x7 16");
    check(longint'(dut16.xs[8]), 14151, "x8 16");
    apply(652032874, 0, 562209904);
    check(longint'(X30), 929887701, "fig X");
    check(longint'(Y30), 536870913, "fig Y");
    check(longint'(unsigned'(Z30)), 64'd4294967295, "fig Z");
    check(longint'(X32), 929887701, "X 32 stages");
    check(longint'(Y32), 536870913, "Y 32 stages");
    check(longint'(dut30.xs[1]), 652032874, "x1");
    check(longint'(dut30.xs[2]), 978049311, "x2");
    check(longint'(dut30.xs[3]), 896545202, "x3");
    check(longint'(dut30.xs[4]), 967861297, "x4");
    check(longint'(dut30.xs[5]), 939207509, "x5");
    check(longint'(dut30.xs[6]), 922990261, "x6");
    check(longint'(dut30.xs[7]), 931557482, "x7");
    check(longint'(dut30.xs[8]), 927386541, "x8");
    check(inv_gain(W, 32), 652032874, "1/An");
    for (int n = 0; n < 2000; n++) begin
      zv = longint'($urandom_range(32'd3735000000)) - 64'sd1867500000; // +/-1.739 rad
      apply(652032874, 0, zv);
      ang = real'(zv) / ONE;
      check_near(real'(X32), $cos(ang) * ONE, "cos");
      check_near(real'(Y32), $sin(ang) * ONE, "sin");
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

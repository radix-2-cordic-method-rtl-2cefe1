// tb_cordic_vectoring: the vectoring build of the unrolled CORDIC
// (MODE = CORDIC_VECTORING) at 16 and 32 bits.
//
// Random vectors (x, y) with 0 <= x < 0.6, |y| < 0.6 and z = 0 (and, in a
// second pass, a random starting z) are applied. The outputs must match the
// bit-exact reference model, and X must be within 16 LSB (16-bit) or
// 256 LSB (32-bit) of An * sqrt(x^2 + y^2) and Y of 0; for |(x, y)| >= 1/4,
// Z must be as close to z + atan(y / x). (For shorter vectors the angle
// resolution drops with the magnitude, a property of vectoring CORDIC.)
// Counted and required: vectors above and below the x axis, and y = 0.
module tb_cordic_vectoring;
  import tb_cordic_ref_pkg::*;

  logic clk = 0, rst = 0;
  logic signed [15:0] x, y, z, X, Y, Z;
  logic signed [31:0] x32, y32, z32, X32, Y32, Z32;
  int checks = 0, failures = 0;
  int n_above = 0, n_below = 0, n_on = 0;

  cordic_processor #(.MODE(cordic_pkg::CORDIC_VECTORING)) dut (
    .clk(clk), .rst(rst), .x(x), .y(y), .z(z), .X(X), .Y(Y), .Z(Z));
  cordic_processor #(.WIDTH(32), .MODE(cordic_pkg::CORDIC_VECTORING)) dut32 (
    .clk(clk), .rst(rst), .x(x32), .y(y32), .z(z32), .X(X32), .Y(Y32), .Z(Z32));

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic check_near(real got, real exp, real tol, string what);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s got=%f exp=%f (x=%0d y=%0d)", what, got, exp, x, y);
    end
  endtask

  function automatic real gain(int stages);
    real g;
    g = 1.0;
    for (int i = 0; i < stages; i++) g = g * $sqrt(1.0 + $pow(2.0, -2.0 * i));
    return g;
  endfunction

  initial begin
    longint ex, ey, ez, xv, yv, zv;
    real xr, yr, zr, s16, s32;
    s16 = 16384.0;
    s32 = 1073741824.0;
    for (int n = 0; n < 4000; n++) begin
      xv = longint'($urandom_range(9830));             // [0, 0.6)
      yv = (n % 50 == 0) ? 0 : longint'($urandom_range(19660)) - 9830;
      zv = (n < 2000) ? 0 : longint'($urandom_range(8192)) - 4096;  // +/-0.25, keeps z + atan inside +/-2
      if (yv > 0) n_above++; else if (yv < 0) n_below++; else n_on++;
      x = 16'(xv); y = 16'(yv); z = 16'(zv);
      x32 = 32'(xv <<< 16); y32 = 32'(yv <<< 16); z32 = 32'(zv <<< 16);
      #1;
      ex = xv; ey = yv; ez = zv;
      rotate(16, 16, ex, ey, ez, 1'b1);
      check(longint'(X), ex, "X");
      check(longint'(Y), ey, "Y");
      check(longint'(Z), ez, "Z");
      ex = longint'(x32); ey = longint'(y32); ez = longint'(z32);
      rotate(32, 32, ex, ey, ez, 1'b1);
      check(longint'(X32), ex, "X32");
      check(longint'(Y32), ey, "Y32");
      check(longint'(Z32), ez, "Z32");
      xr = real'(xv) / s16; yr = real'(yv) / s16; zr = real'(zv) / s16;
      check_near(real'(X), gain(16) * $sqrt(xr * xr + yr * yr) * s16, 16.0, "mag");
      check_near(real'(Y), 0.0, 16.0, "y->0");
      check_near(real'(X32), gain(32) * $sqrt(xr * xr + yr * yr) * s32, 256.0, "mag32");
      if (xr * xr + yr * yr >= 1.0 / 16.0) begin  // angle resolution needs |v| >= 1/4
        check_near(real'(Z), (zr + $atan2(yr, xr)) * s16, 16.0, "angle");
        check_near(real'(Z32), (zr + $atan2(yr, xr)) * s32, 256.0, "angle32");
      end
    end
    checks++;
    if (n_above == 0 || n_below == 0 || n_on == 0) begin
      failures++;
      $display("FAIL coverage above=%0d below=%0d on axis=%0d", n_above, n_below, n_on);
    end
    $display("vectors above x axis %0d, below %0d, on it %0d", n_above, n_below, n_on);
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

// tb_cordic_stage: checks single CORDIC stages (indices 0, 1, 5, 15 at
// 16 bits, 29 at 32 bits, and a vectoring-mode stage 3 at 16 bits) on
// random inputs against the reference step,
// and counts that both rotation directions and the z = 0 tie case
// (which must rotate in the + direction) were exercised.
module tb_cordic_stage;
  import tb_cordic_ref_pkg::*;

  localparam int NS = 4;
  localparam int IDX [NS] = '{0, 1, 5, 15};

  logic signed [15:0] xi, yi, zi;
  logic signed [15:0] xo [NS];
  logic signed [15:0] yo [NS];
  logic signed [15:0] zo [NS];
  logic signed [15:0] xov, yov, zov;
  logic signed [31:0] xi32, yi32, zi32, xo32, yo32, zo32;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_tie = 0;

  for (genvar g = 0; g < NS; g++) begin : g_dut
    cordic_stage #(.WIDTH(16), .STAGES(16), .STAGE(IDX[g])) dut (
      .x_in(xi), .y_in(yi), .z_in(zi),
      .x_out(xo[g]), .y_out(yo[g]), .z_out(zo[g])
    );
  end

  cordic_stage #(.WIDTH(32), .STAGES(32), .STAGE(29)) dut32 (
    .x_in(xi32), .y_in(yi32), .z_in(zi32),
    .x_out(xo32), .y_out(yo32), .z_out(zo32)
  );

  cordic_stage #(.WIDTH(16), .STAGES(16), .STAGE(3),
                 .MODE(cordic_pkg::CORDIC_VECTORING)) dutv (
    .x_in(xi), .y_in(yi), .z_in(zi), .x_out(xov), .y_out(yov), .z_out(zov)
  );

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    longint x, y, z;
    for (int n = 0; n < 1000; n++) begin
      xi = 16'($urandom); yi = 16'($urandom);
      zi = (n % 10 == 0) ? 16'sd0 : 16'($urandom);
      xi32 = $urandom; yi32 = $urandom; zi32 = (n % 10 == 0) ? 0 : $urandom;
      #1;
      if (zi == 0) n_tie++;
      else if (zi < 0) n_neg++;
      else n_pos++;
      for (int g = 0; g < NS; g++) begin
        x = xi; y = yi; z = zi;
        step(16, IDX[g], x, y, z);
        check(longint'(xo[g]), x, "x");
        check(longint'(yo[g]), y, "y");
        check(longint'(zo[g]), z, "z");
      end
      x = xi; y = yi; z = zi;
      step(16, 3, x, y, z, 1'b1);
      check(longint'(xov), x, "xv");
      check(longint'(yov), y, "yv");
      check(longint'(zov), z, "zv");
      x = xi32; y = yi32; z = zi32;
      step(32, 29, x, y, z);
      check(longint'(xo32), x, "x32");
      check(longint'(yo32), y, "y32");
      check(longint'(zo32), z, "z32");
    end
    // Hand-worked case, stage 1: x = y = 9949, z = -4289 (d = -1):
    // x + (y >> 1) = 14923, y - (x >> 1) = 4975, z + 7596 = 3307.
    xi = 16'sd9949; yi = 16'sd9949; zi = -16'sd4289; #1;
    check(longint'(xo[1]), 14923, "hand x");
    check(longint'(yo[1]), 4975, "hand y");
    check(longint'(zo[1]), 3307, "hand z");
    // Vectoring stage 3: x = 8192, y = -4096 (d = +1): x - (y >> 3) = 8704,
    // y + (x >> 3) = -3072, z - round(atan(1/8) * 2^14) = 100 - 2037 = -1937.
    xi = 16'sd8192; yi = -16'sd4096; zi = 16'sd100; #1;
    check(longint'(xov), 8704, "hand xv");
    check(longint'(yov), -3072, "hand yv");
    check(longint'(zov), -1937, "hand zv");
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_tie == 0) begin
      failures++;
      $display("FAIL coverage pos=%0d neg=%0d tie=%0d", n_pos, n_neg, n_tie);
    end
    $display("directions: d=+1 %0d, d=-1 %0d, z=0 ties %0d", n_pos, n_neg, n_tie);
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

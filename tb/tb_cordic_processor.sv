// tb_cordic_processor: end-to-end test of the 16-bit unrolled CORDIC at its
// default parameters (WIDTH = 16, STAGES = 16).
//
//  1. The published 30-degree example: x = 9949, y = 0, z = 8579 must give
//     X = 14191, Y = 8189, Z = 0 (the stage-by-stage values are checked
//     in tb_cordic_published).
//  2. Sine/cosine sweep: x = 1/An, y = 0, z random in +/-1.74 rad; the
//     outputs must match the bit-exact reference model and lie within
//     16 LSB of cos z and sin z.
//  3. General rotation: random (x, y) with |x|, |y| < 0.8 and random z,
//     bit-exact against the model and within 16 LSB of An * rotation.
// All checks are made with no clock edge between applying inputs and
// reading outputs (the datapath is combinational), while clk and rst
// toggle elsewhere. Mechanisms counted, each must occur: d = +1 and d = -1
// at every stage, a z = 0 tie at some stage input, negative input angles.
module tb_cordic_processor;
  import tb_cordic_ref_pkg::*;

  localparam int W = 16;
  localparam int N = 16;
  localparam real ONE = 16384.0;

  logic clk = 0, rst = 1;
  logic signed [W-1:0] x, y, z, X, Y, Z;
  int checks = 0, failures = 0;
  int n_pos [N];
  int n_neg [N];
  int n_tie = 0, n_neg_angle = 0;

  cordic_processor dut (.clk(clk), .rst(rst), .x(x), .y(y), .z(z), .X(X), .Y(Y), .Z(Z));

  always #5 clk = ~clk;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d (x=%0d y=%0d z=%0d)", what, got, exp, x, y, z);
    end
  endtask

  task automatic check_near(real got, real exp, real tol, string what);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s got=%f exp=%f (z=%0d)", what, got, exp, z);
    end
  endtask

  // Apply inputs, wait less than a clock half-period, compare with the
  // model and record which way each stage turned.
  task automatic apply(longint xv, longint yv, longint zv);
    longint ex, ey, ez;
    x = W'(xv); y = W'(yv); z = W'(zv);
    #1;
    ex = longint'(x); ey = longint'(y); ez = longint'(z);
    for (int i = 0; i < N; i++) begin
      if (ez == 0) n_tie++;
      if (ez < 0) n_neg[i]++; else n_pos[i]++;
      step(W, i, ex, ey, ez);
    end
    if (z < 0) n_neg_angle++;
    check(longint'(X), ex, "X");
    check(longint'(Y), ey, "Y");
    check(longint'(Z), ez, "Z");
  endtask

  initial begin
    longint k, xv, yv, zv;
    real ang, xr, yr, gain;
    for (int i = 0; i < N; i++) begin n_pos[i] = 0; n_neg[i] = 0; end
    #3 rst = 0;

    // 1. Published example.
    apply(9949, 0, 8579);
    check(longint'(X), 14191, "fig X");
    check(longint'(Y), 8189, "fig Y");
    check(longint'(Z), 0, "fig Z");

    // 2. Sine/cosine sweep.
    k = inv_gain(W, N);
    check(k, 9949, "1/An");
    for (int n = 0; n < 3000; n++) begin
      zv = longint'($urandom_range(57000)) - 28500;   // +/-1.7395 rad
      apply(k, 0, zv);
      ang = real'(zv) / ONE;
      check_near(real'(X), $cos(ang) * ONE, 16.0, "cos");
      check_near(real'(Y), $sin(ang) * ONE, 16.0, "sin");
      @(negedge clk);
    end

    // 3. General rotation.
    gain = 1.0;
    for (int i = 0; i < N; i++) gain = gain * $sqrt(1.0 + $pow(2.0, -2.0 * i));
    for (int n = 0; n < 3000; n++) begin
      xv = longint'($urandom_range(26200)) - 13100;    // +/-0.8
      yv = longint'($urandom_range(26200)) - 13100;
      zv = longint'($urandom_range(57000)) - 28500;
      apply(xv, yv, zv);
      ang = real'(zv) / ONE;
      xr = gain * (real'(xv) * $cos(ang) - real'(yv) * $sin(ang));
      yr = gain * (real'(yv) * $cos(ang) + real'(xv) * $sin(ang));
      check_near(real'(X), xr, 16.0, "rot X");
      check_near(real'(Y), yr, 16.0, "rot Y");
      if (n % 7 == 0) rst = ~rst;
    end

    // Mechanism coverage.
    for (int i = 0; i < N; i++) begin
      checks++;
      if (n_pos[i] == 0 || n_neg[i] == 0) begin
        failures++;
        $display("FAIL stage %0d never turned both ways (+%0d -%0d)", i, n_pos[i], n_neg[i]);
      end
    end
    checks++;
    if (n_tie == 0 || n_neg_angle == 0) begin
      failures++;
      $display("FAIL coverage: ties %0d, negative angles %0d", n_tie, n_neg_angle);
    end
    $display("stage 0 turns: +%0d -%0d; stage %0d turns: +%0d -%0d; z=0 ties %0d; negative angles %0d",
             n_pos[0], n_neg[0], N-1, n_pos[N-1], n_neg[N-1], n_tie, n_neg_angle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cordic_stage: one elementary rotation of the radix-2 CORDIC.
//
// For stage index i = STAGE it computes
//   d      = +1 if z_in >= 0, else -1          (MODE = CORDIC_ROTATION)
//   d      = +1 if y_in <  0, else -1          (MODE = CORDIC_VECTORING)
//   x_out  = x_in - d * (y_in >>> i)
//   y_out  = y_in + d * (x_in >>> i)
//   z_out  = z_in - d * atan(2^-i)
// which rotates (x, y) by d*atan(2^-i) and grows its length by
// sqrt(1 + 2^-2i); the growth is not corrected here. The sign of z_in
// (or of y_in) steers all three adder/subtractors, so each step drives the
// residual angle (or the y component) towards zero.
//
// Structure: two barrel shifters with the constant amount i (wiring after
// synthesis), an arctangent ROM read at the constant address i, and three
// adder/subtractors. Purely combinational; all words are signed WIDTH-bit
// two's complement with WIDTH-2 fraction bits.
//
// The equations and the row structure follow the published design. The sign-filling
// shift, the choice d = +1 for z = 0 (the published design's rule "d = -1 if z < 0,
// else +1") and two's-complement wrap on overflow are as stated or chosen
// here. The vectoring decision is read from the published description ("the
// sign of the residual y component is used to determine which direction to
// rotate next"); its equations use the same update as rotation mode.
module cordic_stage #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned STAGES = WIDTH,
  parameter int unsigned STAGE  = 0,
  parameter cordic_pkg::cordic_mode_e MODE = cordic_pkg::CORDIC_ROTATION
) (
  input  logic signed [WIDTH-1:0] x_in,
  input  logic signed [WIDTH-1:0] y_in,
  input  logic signed [WIDTH-1:0] z_in,
  output logic signed [WIDTH-1:0] x_out,
  output logic signed [WIDTH-1:0] y_out,
  output logic signed [WIDTH-1:0] z_out
);

  localparam int unsigned SHIFT_W = (STAGES > 2) ? $clog2(STAGES) : 1;

  logic                    d_neg;     // d = -1
  logic signed [WIDTH-1:0] x_shift;   // x_in >>> i
  logic signed [WIDTH-1:0] y_shift;   // y_in >>> i
  logic signed [WIDTH-1:0] angle;     // atan(2^-i)

  if (MODE == cordic_pkg::CORDIC_ROTATION) begin : g_rot
    assign d_neg = z_in[WIDTH-1];
  end else begin : g_vec
    assign d_neg = !y_in[WIDTH-1];
  end

  cordic_barrel_shifter #(.WIDTH(WIDTH), .SHIFT_W(SHIFT_W)) u_shift_x (
    .din(x_in), .shamt(SHIFT_W'(STAGE)), .dout(x_shift)
  );

  cordic_barrel_shifter #(.WIDTH(WIDTH), .SHIFT_W(SHIFT_W)) u_shift_y (
    .din(y_in), .shamt(SHIFT_W'(STAGE)), .dout(y_shift)
  );

  cordic_atan_rom #(.WIDTH(WIDTH), .DEPTH(STAGES), .ADDR_W(SHIFT_W)) u_rom (
    .addr(SHIFT_W'(STAGE)), .angle(angle)
  );

  // d = +1: x - y', y + x', z - atan.  d = -1: x + y', y - x', z + atan.
  cordic_addsub #(.WIDTH(WIDTH)) u_add_x (
    .a(x_in), .b(y_shift), .sub(!d_neg), .s(x_out)
  );

  cordic_addsub #(.WIDTH(WIDTH)) u_add_y (
    .a(y_in), .b(x_shift), .sub(d_neg), .s(y_out)
  );

  cordic_addsub #(.WIDTH(WIDTH)) u_add_z (
    .a(z_in), .b(angle), .sub(!d_neg), .s(z_out)
  );

endmodule

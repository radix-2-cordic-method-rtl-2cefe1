// cordic_processor: unrolled radix-2 CORDIC rotator (sine and cosine engine).
//
// Rotates the vector (x, y) by the angle z using STAGES cascaded
// shift-and-add stages, stage i rotating by +/-atan(2^-i) in the direction
// that shrinks the remaining angle. The outputs are
//   X = An (x cos z - y sin z),  Y = An (y cos z + x sin z),  Z ~ 0,
// with the constant gain An = prod sqrt(1 + 2^-2i) ~ 1.6468. Loading
// x = 1/An (0.60725), y = 0 gives X = cos z and Y = sin z directly, so no
// scaling multiplier is needed.
//
// Vectoring build (MODE = CORDIC_VECTORING): each stage turns the vector
// towards the positive x axis instead, so with z = 0 the outputs are
//   X = An sqrt(x^2 + y^2),  Y ~ 0,  Z = z + atan(y / x),
// for x >= 0 (any y) or, more generally, vectors within +/-99.9 degrees of
// the +x axis. The default build is the rotation mode the published design
// implements; vectoring is the second mode it describes.
//
// Number format: signed two's complement, WIDTH bits, 1.0 = 2^(WIDTH-2)
// (range [-2, 2)); z is in radians in the same format. z must lie within
// +/-1.743 rad (about +/-99.9 degrees), the sum of all stage angles, and
// An*|(x, y)| must stay below 2, or the result wraps.
// Example (16 bit): x = 9949, y = 0, z = 8579 (30 degrees) gives
// X = 14191 (cos), Y = 8189 (sin), Z = 0.
//
// Timing: the whole chain is combinational. Outputs follow the inputs
// after the ripple delay of STAGES adder stages; there is no register and
// no latency in clock cycles. clk and rst belong to the processor's pin
// list but the datapath does not use them, so a lint tool reports them as
// unused inputs; that warning stands on purpose.
//
// Follows the published design: the unrolled structure, the rotation equations,
// the decision rule, the 16-bit default and the stage count of one stage
// per word bit. This design's own choices: the fixed-point format (read off
// the published example values), rounding of the angle table, wrap on
// overflow, and leaving clk/rst unconnected.
module cordic_processor #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned STAGES = WIDTH,
  parameter cordic_pkg::cordic_mode_e MODE = cordic_pkg::CORDIC_ROTATION
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [WIDTH-1:0] x,
  input  logic signed [WIDTH-1:0] y,
  input  logic signed [WIDTH-1:0] z,
  output logic signed [WIDTH-1:0] X,
  output logic signed [WIDTH-1:0] Y,
  output logic signed [WIDTH-1:0] Z
);

  // xs[i], ys[i], zs[i] enter stage i; index STAGES is the result.
  logic signed [WIDTH-1:0] xs [STAGES+1];
  logic signed [WIDTH-1:0] ys [STAGES+1];
  logic signed [WIDTH-1:0] zs [STAGES+1];

  assign xs[0] = x;
  assign ys[0] = y;
  assign zs[0] = z;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    cordic_stage #(.WIDTH(WIDTH), .STAGES(STAGES), .STAGE(i), .MODE(MODE)) u_stage (
      .x_in (xs[i]),   .y_in (ys[i]),   .z_in (zs[i]),
      .x_out(xs[i+1]), .y_out(ys[i+1]), .z_out(zs[i+1])
    );
  end

  assign X = xs[STAGES];
  assign Y = ys[STAGES];
  assign Z = zs[STAGES];

endmodule

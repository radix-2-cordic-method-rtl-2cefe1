// cordic_barrel_shifter: arithmetic right shift built from multiplexers.
//
// dout = din >>> shamt on a signed WIDTH-bit word: bits shifted in at the
// top copy the sign bit, so a negative value is divided by 2^shamt and
// rounded towards minus infinity. The shifter has SHIFT_W levels; level k
// either passes its input or shifts it right by 2^k, selected by shamt[k].
// Shifts of WIDTH or more give all sign bits.
//
// Purely combinational. In the unrolled CORDIC every instance gets a
// constant shift amount, so synthesis reduces the multiplexers to wiring,
// as the published design notes for the unrolled form. The logarithmic structure
// and the sign fill are this design's choices; the published design asks only for a
// right shift made of multiplexers.
module cordic_barrel_shifter #(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned SHIFT_W = (WIDTH > 2) ? $clog2(WIDTH) : 1
) (
  input  logic signed [WIDTH-1:0]   din,
  input  logic        [SHIFT_W-1:0] shamt,
  output logic signed [WIDTH-1:0]   dout
);

  logic signed [WIDTH-1:0] level [SHIFT_W+1];

  assign level[0] = din;

  for (genvar k = 0; k < SHIFT_W; k++) begin : g_level
    // A shift by 2^k >= WIDTH leaves only copies of the sign bit.
    localparam int unsigned AMOUNT = 32'd1 << k;
    logic signed [WIDTH-1:0] shifted;
    if (AMOUNT >= WIDTH) begin : g_full
      assign shifted = {WIDTH{level[k][WIDTH-1]}};
    end else begin : g_part
      assign shifted = level[k] >>> AMOUNT;
    end
    assign level[k+1] = shamt[k] ? shifted : level[k];
  end

  assign dout = level[SHIFT_W];

endmodule

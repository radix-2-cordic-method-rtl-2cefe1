// cordic_atan_rom: table of the CORDIC elementary rotation angles.
//
// Entry i holds atan(2^-i) in radians in the processor's angle format
// (signed WIDTH bits, 1.0 = 2^(WIDTH-2)), rounded to nearest, for
// i = 0 .. DEPTH-1. Addresses at or beyond DEPTH read 0. The contents are
// computed at elaboration by cordic_pkg::atan_fixed, so the table follows
// the word width without a data file.
//
// Asynchronous read, purely combinational. In the unrolled processor each
// stage drives the address with its own constant index, so the ROM
// collapses to the hard-wired constant of that stage, as the published design
// describes. Rounding to nearest is this design's choice; it is what
// reproduces the published example results.
module cordic_atan_rom #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned DEPTH  = WIDTH,
  parameter int unsigned ADDR_W = (DEPTH > 2) ? $clog2(DEPTH) : 1
) (
  input  logic        [ADDR_W-1:0] addr,
  output logic signed [WIDTH-1:0]  angle
);

  typedef logic signed [WIDTH-1:0] word_t;
  typedef word_t table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned i = 0; i < DEPTH; i++)
      t[i] = word_t'(cordic_pkg::atan_fixed(i, cordic_pkg::frac_bits(WIDTH)));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb begin
    if (32'(addr) < DEPTH) angle = TABLE[addr];
    else                   angle = '0;
  end

endmodule

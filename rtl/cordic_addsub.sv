// cordic_addsub: the adder/subtractor of one CORDIC datapath column.
//
// Computes s = a + b when sub = 0 and s = a - b when sub = 1, on signed
// two's-complement words of WIDTH bits. The result wraps; there is no carry
// or overflow output. Every CORDIC stage holds three of these, one each for
// x, y and z, steered by the rotation direction of that stage.
//
// Purely combinational. The published design names the unit and its job; the
// single add-or-subtract expression is this design's choice.
module cordic_addsub #(
  parameter int unsigned WIDTH = 16
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  input  logic                    sub,
  output logic signed [WIDTH-1:0] s
);

  always_comb begin
    if (sub) s = a - b;
    else     s = a + b;
  end

endmodule

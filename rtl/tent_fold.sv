// tent_fold: the "fold" of the tent map, without the common factor mu.
//
// The tent map is x' = mu*x for x < 1/2 and x' = mu*(1-x) for x >= 1/2.
// Both branches share the factor mu, so this block only forms the value
// that mu multiplies: x itself, or 1 - x. With x an unsigned fraction of
// WIDTH bits, 1 - x is 2^WIDTH - x, i.e. the WIDTH-bit two's complement of
// x, and the branch condition x >= 1/2 is simply the MSB of x. For MSB = 1
// the result is at most 2^(WIDTH-1), so it always fits in WIDTH bits and
// never has its MSB set except for x = 1/2 exactly (where 1 - x = 1/2).
//
// Interface: x in, y out, both WIDTH-bit fractions; combinational.
//
// Splitting the map into "2^bits - x plus an MSB selector" and pulling mu
// out follows the published design.
module tent_fold #(
  parameter int unsigned WIDTH = tent_pkg::X_WIDTH
) (
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] one_minus_x;

  always_comb begin
    one_minus_x = '0 - x;            // 2^WIDTH - x, modulo 2^WIDTH
    y = x[WIDTH-1] ? one_minus_x : x;
  end

endmodule

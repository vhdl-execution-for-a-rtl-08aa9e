// tent_origin_select: chooses the value the tent map iterates on.
//
// Before the first iteration after reset the map must start from the
// external initial value (seed); from then on it iterates on its own last
// result, held in the output register. The selector is a plain 2:1
// multiplexer steered by `started`, which the generator ties to the output
// register's valid flag, so no extra state is needed.
//
// Interface: seed and x_fb are WIDTH-bit fractions; x_sel = started ? x_fb
// : seed. Purely combinational, no clock.
//
// The job of the block is the published design's; using the valid flag as
// its select is this design's choice.
module tent_origin_select #(
  parameter int unsigned WIDTH = tent_pkg::X_WIDTH
) (
  input  logic [WIDTH-1:0] seed,
  input  logic [WIDTH-1:0] x_fb,
  input  logic             started,
  output logic [WIDTH-1:0] x_sel
);

  always_comb begin
    if (started) x_sel = x_fb;
    else         x_sel = seed;
  end

endmodule

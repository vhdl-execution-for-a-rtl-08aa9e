// tent_prng: pseudo-random number generator built on the tent map.
//
// The generator iterates the tent map x' = mu*x (x < 1/2),
// x' = mu*(1-x) (x >= 1/2) in fixed point. The state x is an unsigned
// WIDTH-bit fraction in [0,1) and mu an unsigned MU_WIDTH-bit number with
// MU_FRAC fraction bits (0 <= mu < 2); for mu near 2 the map is chaotic and
// the output words spread over the whole range. Three stages form a loop:
//   origin select -> seed on the first iteration, last result afterwards
//   fold          -> x or 2^WIDTH - x, chosen by the MSB of x
//   mul + register-> times mu, keep the WIDTH-bit fraction, store it
// The stored word is both the output and the next iteration's input.
//
// Interface: seed and mu are sampled at every enabled clock edge (seed
// only on the first one after reset). x is the registered output, 0 with
// valid low after reset; each clock edge with en high produces the next
// value one cycle later, so the generator delivers one word per clock.
//
// The map, its split into these three stages, the 32-bit/8-bit sizes and
// the zero output before the first result follow the published design.
// The enable, the valid flag and the reset style are this design's own.
module tent_prng #(
  parameter int unsigned WIDTH    = tent_pkg::X_WIDTH,
  parameter int unsigned MU_WIDTH = tent_pkg::MU_WIDTH,
  parameter int unsigned MU_FRAC  = tent_pkg::MU_FRAC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [WIDTH-1:0]    seed,
  input  logic [MU_WIDTH-1:0] mu,
  output logic [WIDTH-1:0]    x,
  output logic                valid
);

  logic [WIDTH-1:0] x_sel;
  logic [WIDTH-1:0] y;

  tent_origin_select #(.WIDTH(WIDTH)) u_origin (
    .seed    (seed),
    .x_fb    (x),
    .started (valid),
    .x_sel   (x_sel)
  );

  tent_fold #(.WIDTH(WIDTH)) u_fold (
    .x (x_sel),
    .y (y)
  );

  tent_mul_reg #(
    .WIDTH    (WIDTH),
    .MU_WIDTH (MU_WIDTH),
    .MU_FRAC  (MU_FRAC)
  ) u_mulreg (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .y     (y),
    .mu    (mu),
    .x_q   (x),
    .valid (valid)
  );

endmodule

// tent_mul_reg: multiplication by mu and the generator's output register.
//
// The folded value y (x or 1-x, a WIDTH-bit fraction) is multiplied by the
// control parameter mu (MU_WIDTH bits, MU_FRAC of them fraction bits). The
// full product has WIDTH+MU_WIDTH bits with WIDTH+MU_FRAC fraction bits;
// dropping the MU_FRAC low bits gives the new state as a WIDTH-bit
// fraction again (truncation, no rounding). Since y <= 2^(WIDTH-1) and
// mu < 2^(MU_WIDTH), the bits above the kept slice are always zero, so
// nothing is lost at the top; an assertion checks this.
//
// The product is stored in the output register on every clock edge with
// en high, so one map iteration takes one clock. Reset (asynchronous,
// active low) clears the register to 0 and drops valid: the output reads 0
// and is marked not valid until the first iteration, so logic downstream
// never sees a half-formed value. valid rises with the first stored
// product and stays high until the next reset.
//
// Following the published design: the multiply after the fold, the 32-bit
// output word, 8-bit mu, the 1.7 mu format and the zero output before the
// first value. This design's own: the enable, the valid flag and the
// reset style.
//
// Lint may report rst_n as used both asynchronously and synchronously:
// the second use is only the assertion's disable condition, not logic.
module tent_mul_reg #(
  parameter int unsigned WIDTH    = tent_pkg::X_WIDTH,
  parameter int unsigned MU_WIDTH = tent_pkg::MU_WIDTH,
  parameter int unsigned MU_FRAC  = tent_pkg::MU_FRAC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [WIDTH-1:0]    y,
  input  logic [MU_WIDTH-1:0] mu,
  output logic [WIDTH-1:0]    x_q,
  output logic                valid
);

  localparam int unsigned PW = WIDTH + MU_WIDTH;

  logic [PW-1:0]    prod;
  logic [WIDTH-1:0] x_next;

  always_comb begin
    prod   = PW'(y) * PW'(mu);
    x_next = prod[WIDTH+MU_FRAC-1:MU_FRAC];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      valid <= 1'b0;
    end else if (en) begin
      x_q   <= x_next;
      valid <= 1'b1;
    end
  end

  // The folded input never exceeds one half, so no product bit above the
  // kept slice can be set.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    en && (y <= (WIDTH'(1) << (WIDTH-1))) |-> (prod >> (WIDTH+MU_FRAC)) == '0);

endmodule

// tent_pkg: number formats shared by the tent-map generator.
//
// The map state x is an unsigned fraction in [0,1): X_WIDTH bits, all of
// them fraction bits, so the MSB alone tells whether x >= 1/2. The control
// parameter mu is an unsigned fixed-point number of MU_WIDTH bits with
// MU_FRAC fraction bits (one integer bit), covering 0 to just under 2;
// 8'hC0 is mu = 1.5. A 32-bit state and an 8-bit mu are the sizes of the
// published generator; the 1.7 split of mu follows from its example
// values, everything else in the design derives from these constants.
package tent_pkg;

  parameter int unsigned X_WIDTH  = 32;  // state / output word
  parameter int unsigned MU_WIDTH = 8;   // control parameter word
  parameter int unsigned MU_FRAC  = 7;   // fraction bits of mu

endpackage

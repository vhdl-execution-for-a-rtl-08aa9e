// tb_tent_prng_mu_sweep: bifurcation-style sweep of the control parameter.
//
// For a range of mu values the 32-bit generator is run from seed AAAABBBB
// for 4000 steps to let transients die out, then 2000 more outputs are
// observed. Expected behaviour of the tent map x' = mu*min(x, 1-x):
//  * mu < 1: the map contracts and the state reaches 0 and stays there;
//  * 1 < mu < 2: the state stays inside [mu*(1-mu/2), mu/2], and this band
//    widens as mu grows, i.e. the output spreads over more of the range.
// The bench checks the bounds (upper bound exact, lower bound with a small
// allowance for truncation), that the band has non-zero width and that its
// width grows strictly from one mu to the next.
module tb_tent_prng_mu_sweep;

  logic        clk = 1'b0;
  logic        rst_n, en;
  logic [31:0] seed, x;
  logic [7:0]  mu;
  logic        valid;
  int          checks = 0, failures = 0, cycles = 0;

  tent_prng dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  localparam int N_LOW  = 3;
  localparam int N_HIGH = 9;
  logic [7:0] mu_low  [N_LOW]  = '{8'h40, 8'h70, 8'h7F};
  logic [7:0] mu_high [N_HIGH] = '{8'h88, 8'h90, 8'hA0, 8'hB0, 8'hC0,
                                   8'hD0, 8'hE0, 8'hF0, 8'hFF};

  task automatic run(input logic [7:0] m, output longint unsigned lo,
                     output longint unsigned hi);
    en = 1'b0; mu = m; seed = 32'hAAAA_BBBB;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    repeat (4000) @(negedge clk);
    lo = 64'hFFFF_FFFF; hi = 0;
    repeat (2000) begin
      @(negedge clk);
      if (longint'(x) < lo) lo = longint'(x);
      if (longint'(x) > hi) hi = longint'(x);
    end
  endtask

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned lo, hi, prev_width, bound_lo, bound_hi;
    foreach (mu_low[i]) begin
      run(mu_low[i], lo, hi);
      checks++;
      if (hi != 0) begin
        failures++;
        $display("FAIL mu=%h: state did not settle at 0 (max %h)", mu_low[i], hi);
      end
    end
    prev_width = 0;
    foreach (mu_high[i]) begin
      run(mu_high[i], lo, hi);
      // mu/2 in 32-bit fraction units is m * 2^24
      bound_hi = longint'(mu_high[i]) << 24;
      // mu*(1-mu/2) = m/128 * (256-m)/256, in units of 2^-32
      bound_lo = (longint'(mu_high[i]) * (64'd256 - longint'(mu_high[i]))) << 17;
      $display("mu=%h band %h .. %h (theory %h .. %h)", mu_high[i], lo, hi, bound_lo, bound_hi);
      checks++;
      if (hi > bound_hi || lo + 64'h10_0000 < bound_lo) begin
        failures++;
        $display("FAIL mu=%h: band outside the tent-map bounds", mu_high[i]);
      end
      checks++;
      if (hi - lo <= prev_width) begin
        failures++;
        $display("FAIL mu=%h: band width %h not above previous %h", mu_high[i], hi - lo, prev_width);
      end
      prev_width = hi - lo;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

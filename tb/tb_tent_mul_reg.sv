// tb_tent_mul_reg: self-checking test of the multiplier and output register.
//
// Checks that the register reads 0 with valid low after reset, that en low
// holds the register, and that each enabled edge stores
// floor(y * mu / 2^7) for random y up to one half and random 8-bit mu.
// The expected value comes from 64-bit integer arithmetic in the bench.
module tb_tent_mul_reg;

  localparam int unsigned W = 32;

  logic          clk = 1'b0;
  logic          rst_n, en;
  logic [W-1:0]  y, x_q;
  logic [7:0]    mu;
  logic          valid;
  int            checks = 0, failures = 0, cycles = 0;

  tent_mul_reg #(.WIDTH(W), .MU_WIDTH(8), .MU_FRAC(7)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic expect_state(input logic [W-1:0] ex, input logic ev,
                              input string what);
    checks++;
    if (x_q !== ex || valid !== ev) begin
      failures++;
      $display("FAIL %s: x_q=%h valid=%0b expected %h/%0b", what, x_q, valid, ex, ev);
    end
  endtask

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned p;
    logic [W-1:0]    held;
    rst_n = 1'b0; en = 1'b0; y = '0; mu = '0;
    #12;
    expect_state('0, 1'b0, "in reset");
    rst_n = 1'b1;
    @(negedge clk);
    expect_state('0, 1'b0, "after reset, not enabled");
    // the 32-bit example's first step: 2^32 - AAAABBBB = 55554445, mu 1.5
    y = 32'h5555_4445; mu = 8'hC0; en = 1'b1;
    @(negedge clk);
    expect_state(32'h7FFF_E667, 1'b1, "example step");
    for (int i = 0; i < 1000; i++) begin
      y  = $urandom_range(32'h8000_0000, 0);
      mu = 8'($urandom);
      en = ($urandom_range(3, 0) != 0);
      held = x_q;
      p  = (longint'(y) * longint'(mu)) >> 7;
      @(negedge clk);
      if (en) expect_state(p[W-1:0], 1'b1, "product");
      else    expect_state(held, 1'b1, "hold");
    end
    // maximum inputs: one half times the largest mu
    y = 32'h8000_0000; mu = 8'hFF; en = 1'b1;
    @(negedge clk);
    expect_state(32'hFF00_0000, 1'b1, "max product");
    // a second reset clears it again
    rst_n = 1'b0;
    #1;
    expect_state('0, 1'b0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

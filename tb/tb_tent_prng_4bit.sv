// tb_tent_prng_4bit: the generator reduced to a 4-bit state.
//
// A 4-bit state makes every step easy to follow by hand: seed 6 (0.375)
// with mu = 1.375 (8'hB0) gives
//   6  -> 1.375*6        = 8.25  -> 8
//   8  -> 1.375*(16-8)   = 11.0  -> 11
//   11 -> 1.375*(16-11)  = 6.875 -> 6
// and then repeats 8, 11, 6 with period three. The bench checks the zero
// output before the first value, six outputs of that cycle, one per clock,
// and the same numbers from an integer reference model.
module tb_tent_prng_4bit;

  logic       clk = 1'b0;
  logic       rst_n, en;
  logic [3:0] seed, x;
  logic [7:0] mu;
  logic       valid;
  int         checks = 0, failures = 0, cycles = 0;

  tent_prng #(.WIDTH(4), .MU_WIDTH(8), .MU_FRAC(7)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [3:0] step4(input logic [3:0] v, input logic [7:0] m);
    int unsigned f;
    f = v[3] ? (16 - int'(v)) : int'(v);
    return 4'((f * int'(m)) >> 7);
  endfunction

  logic [3:0] hand [6] = '{4'd8, 4'd11, 4'd6, 4'd8, 4'd11, 4'd6};

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] model;
    int         t0;
    seed = 4'd6; mu = 8'hB0; en = 1'b0; rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (x !== 4'd0 || valid !== 1'b0) begin
      failures++;
      $display("FAIL output before first value: x=%0d valid=%0b", x, valid);
    end
    en    = 1'b1;
    model = seed;
    t0    = cycles;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      model = step4(model, mu);
      checks++;
      if (x !== hand[i] || x !== model || valid !== 1'b1) begin
        failures++;
        $display("FAIL iteration %0d: x=%0d hand=%0d model=%0d", i + 1, x, hand[i], model);
      end
    end
    checks++;
    if (cycles - t0 != 6) begin
      failures++;
      $display("FAIL six iterations took %0d cycles", cycles - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

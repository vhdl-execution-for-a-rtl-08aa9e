// tb_tent_prng: end-to-end test of the tent-map generator at full size.
//
// The top is used with its default parameters (32-bit state, 8-bit mu with
// 7 fraction bits). The bench
//  1. checks that the output reads 0 with valid low after reset and while
//     en is low,
//  2. runs the published 32-bit example, seed AAAABBBB and mu C0 (1.5),
//     and compares the first nine outputs with the published table, one
//     new word per enabled clock,
//  3. runs many random seeds and mu values against a reference model of the
//     map written with 64-bit integers, with en dropped at random cycles,
//  4. counts how often each mechanism occurred: seed taken by the origin
//     selector, feedback taken, the x >= 1/2 fold, the x < 1/2 pass, a hold
//     with en low, and the zero-before-valid output. A mechanism that never
//     occurred counts as a failure.
module tb_tent_prng;

  logic        clk = 1'b0;
  logic        rst_n, en;
  logic [31:0] seed, x;
  logic [7:0]  mu;
  logic        valid;
  int          checks = 0, failures = 0, cycles = 0;
  int          n_seed = 0, n_feedback = 0, n_fold = 0, n_pass = 0;
  int          n_hold = 0, n_zero = 0;

  tent_prng dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Reference model of one map step: fold by the MSB, multiply by mu,
  // drop the 7 fraction bits of mu.
  function automatic logic [31:0] tent_step(input logic [31:0] v,
                                            input logic [7:0] m);
    longint unsigned f;
    f = v[31] ? (64'h1_0000_0000 - longint'(v)) : longint'(v);
    return 32'((f * longint'(m)) >> 7);
  endfunction

  task automatic check(input logic [31:0] ex, input logic ev, input string what);
    checks++;
    if (x !== ex || valid !== ev) begin
      failures++;
      $display("FAIL %s: x=%h valid=%0b expected %h/%0b", what, x, valid, ex, ev);
    end
  endtask

  // Restart the generator from a new seed.
  task automatic restart(input logic [31:0] s, input logic [7:0] m);
    en = 1'b0; seed = s; mu = m;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check('0, 1'b0, "zero before first value");
    n_zero++;
  endtask

  logic [31:0] table1 [9] = '{32'h7FFFE667, 32'hBFFFD99A, 32'h60003999,
                              32'h90005665, 32'hA7FF7E68, 32'h8400C264,
                              32'hB9FEDC6A, 32'h6901B561, 32'h9D829011};

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    logic        started;
    int          t0;

    // ---- published 32-bit example --------------------------------------
    restart(32'hAAAA_BBBB, 8'hC0);
    en = 1'b1;
    t0 = cycles;
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      check(table1[i], 1'b1, $sformatf("table iteration %0d", i + 1));
    end
    checks++;
    if (cycles - t0 != 9) begin
      failures++;
      $display("FAIL nine words took %0d cycles", cycles - t0);
    end
    // the seed may change once running: it must be ignored
    seed = 32'h1234_5678;
    @(negedge clk);
    check(tent_step(table1[8], 8'hC0), 1'b1, "seed ignored after start");

    // ---- random runs against the reference model -----------------------
    for (int run = 0; run < 40; run++) begin
      logic [7:0] m;
      // mostly the chaotic region (mu between 1 and 2), some below
      m = (run % 4 == 3) ? 8'($urandom_range(127, 1)) : 8'($urandom_range(255, 128));
      restart($urandom, m);
      model   = '0;
      started = 1'b0;
      for (int k = 0; k < 200; k++) begin
        en = ($urandom_range(4, 0) != 0);
        if (en) begin
          logic [31:0] src;
          src = started ? model : seed;
          if (started) n_feedback++; else n_seed++;
          if (src[31]) n_fold++; else n_pass++;
          model   = tent_step(src, mu);
          started = 1'b1;
        end else if (started) begin
          n_hold++;
        end
        @(negedge clk);
        check(model, started, "random run");
        if (!started) n_zero++;
      end
    end

    // ---- mechanism coverage ---------------------------------------------
    foreach (cov_names[i]) begin
      checks++;
      if (cov_count(i) == 0) begin
        failures++;
        $display("FAIL mechanism never occurred: %s", cov_names[i]);
      end
    end
    $display("mechanisms: seed=%0d feedback=%0d fold=%0d pass=%0d hold=%0d zero=%0d",
             n_seed, n_feedback, n_fold, n_pass, n_hold, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string cov_names [6] = '{"seed selected", "feedback selected", "fold x>=1/2",
                           "pass x<1/2", "hold with en low", "zero before valid"};

  function automatic int cov_count(input int i);
    case (i)
      0: return n_seed;
      1: return n_feedback;
      2: return n_fold;
      3: return n_pass;
      4: return n_hold;
      default: return n_zero;
    endcase
  endfunction

endmodule

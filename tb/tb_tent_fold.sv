// tb_tent_fold: self-checking test of the tent-map fold.
//
// The expected value is worked out with 64-bit integer arithmetic:
// x itself when x < 2^31, else 2^32 - x. Corner values (0, just below and
// at one half, all ones) are checked, then random inputs from both halves.
module tb_tent_fold;

  localparam int unsigned W = 32;

  logic [W-1:0] x, y;
  int           checks = 0, failures = 0;
  int           lower = 0, upper = 0;

  tent_fold #(.WIDTH(W)) dut (.*);

  task automatic check_one(input logic [W-1:0] v);
    longint unsigned e;
    x = v;
    #1;
    if (longint'(v) < 64'h8000_0000) begin
      e = longint'(v);
      lower++;
    end else begin
      e = 64'h1_0000_0000 - longint'(v);
      upper++;
    end
    checks++;
    if ({32'h0, y} !== e) begin
      failures++;
      $display("FAIL x=%h got=%h expected=%h", v, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h0000_0000);
    check_one(32'h0000_0001);
    check_one(32'h7FFF_FFFF);
    check_one(32'h8000_0000);
    check_one(32'h8000_0001);
    check_one(32'hFFFF_FFFF);
    check_one(32'hAAAA_BBBB);   // first step of the 32-bit example
    for (int i = 0; i < 500; i++) check_one($urandom);
    checks++;
    if (lower == 0 || upper == 0) begin
      failures++;
      $display("FAIL one branch never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

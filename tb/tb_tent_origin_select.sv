// tb_tent_origin_select: self-checking test of the origin selector.
//
// Drives random seed / feedback pairs with the select low and high and
// checks that the seed passes before the generator has started and the
// feedback value afterwards. Also checks a pair of fixed patterns in
// which each bit differs between the two inputs.
module tb_tent_origin_select;

  localparam int unsigned W = 32;

  logic [W-1:0] seed, x_fb, x_sel;
  logic         started;
  int           checks = 0, failures = 0;

  tent_origin_select #(.WIDTH(W)) dut (.*);

  task automatic check_one(input logic [W-1:0] s, input logic [W-1:0] f,
                           input logic st);
    logic [W-1:0] expect_v;
    seed = s; x_fb = f; started = st;
    #1;
    expect_v = st ? f : s;
    checks++;
    if (x_sel !== expect_v) begin
      failures++;
      $display("FAIL started=%0b seed=%h fb=%h got=%h expected=%h",
               st, s, f, x_sel, expect_v);
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
    check_one(32'hAAAA_BBBB, 32'h5555_4444, 1'b0);
    check_one(32'hAAAA_BBBB, 32'h5555_4444, 1'b1);
    check_one(32'h0000_0000, 32'hFFFF_FFFF, 1'b0);
    check_one(32'h0000_0000, 32'hFFFF_FFFF, 1'b1);
    for (int i = 0; i < 200; i++)
      check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

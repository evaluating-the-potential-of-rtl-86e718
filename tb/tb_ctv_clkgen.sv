// tb_ctv_clkgen: checks that f_L starts low after reset, toggles on every
// f_H edge (half the frequency of f_H), that f_l_n is its complement and that
// exactly one of en_a / en_b is set, en_a just before each f_L rising edge.
module tb_ctv_clkgen;

  int checks = 0, failures = 0;
  logic clk_h = 0, rst_n = 0;
  logic f_l, f_l_n, en_a, en_b;

  ctv_clkgen dut (.clk_h(clk_h), .rst_n(rst_n), .f_l(f_l), .f_l_n(f_l_n), .en_a(en_a), .en_b(en_b));

  always #5 clk_h = ~clk_h;

  task automatic expect_eq(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    int rises = 0;
    repeat (3) @(negedge clk_h);
    expect_eq("f_l in reset", f_l, 1'b0);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      prev = f_l;
      expect_eq("en_a", en_a, ~prev);
      expect_eq("en_b", en_b, prev);
      expect_eq("f_l_n", f_l_n, ~f_l);
      @(negedge clk_h);
      expect_eq("toggle", f_l, ~prev);
      if (!prev && f_l) rises++;
    end
    checks++;
    if (rises != 20) begin
      failures++;
      $display("FAIL: %0d f_L rising edges in 40 f_H cycles, expected 20", rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_csla32: checks the 32-bit carry select adder against the integer sum
// A + B + Cin, on random vectors and on vectors that send a carry across each
// section boundary (bit 8, bit 16, C[32]).
module tb_csla32;

  int checks = 0, failures = 0;

  logic [31:0] a, b, s;
  logic        cin, c32;

  csla32 dut (.a(a), .b(b), .cin(cin), .s(s), .c32(c32));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    logic [32:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + 33'(tc);
    checks++;
    if ({c32, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%0d: got %h exp %h", ta, tb_, tc, {c32, s}, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'hFFFF_FFFF, 32'h0, 1'b1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check(32'h0000_00FF, 32'h1, 1'b0);
    check(32'h0000_FFFF, 32'h1, 1'b0);
    check(32'h0000_FF00, 32'h0000_0100, 1'b0);
    check(32'h0000_FFFF, 32'h0, 1'b1);
    check(32'hFFFF_0000, 32'h0001_0000, 1'b0);
    check(32'h8000_0000, 32'h8000_0000, 1'b0);
    check(32'h0, 32'h0, 1'b0);
    for (int i = 0; i < 50000; i++) check($urandom, $urandom, 1'($urandom));
    // carries that stop at random places
    for (int i = 0; i < 5000; i++) begin
      automatic int k = $urandom_range(31, 0);
      check(32'hFFFF_FFFF >> k, 32'h1, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

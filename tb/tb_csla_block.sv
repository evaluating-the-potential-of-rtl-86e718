// tb_csla_block: checks the 8-bit and 16-bit carry select sub-adders against
// the integer sum a + b + cin.  The 8-bit block is checked exhaustively over
// all operand pairs and both carry-ins, the 16-bit block on random vectors
// plus carry-propagate corner cases.
module tb_csla_block;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        c8i, c8o;
  logic [15:0] a16, b16, s16;
  logic        c16i, c16o;

  csla_block #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(c8i),  .s(s8),  .cout(c8o));
  csla_block #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(c16i), .s(s16), .cout(c16o));

  task automatic check16(input logic [15:0] a, input logic [15:0] b, input logic c);
    logic [16:0] exp;
    a16 = a; b16 = b; c16i = c;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 17'(c);
    checks++;
    if ({c16o, s16} !== exp) begin
      failures++;
      $display("FAIL 16b %h+%h+%0d: got %h exp %h", a, b, c, {c16o, s16}, exp);
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
    logic [8:0] exp8;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(a); b8 = 8'(b); c8i = 1'(c);
          #1;
          exp8 = 9'(a) + 9'(b) + 9'(c);
          checks++;
          if ({c8o, s8} !== exp8) begin
            failures++;
            if (failures < 10) $display("FAIL 8b %0d+%0d+%0d: got %h exp %h", a, b, c, {c8o, s8}, exp8);
          end
        end
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h00FF, 16'h0001, 1'b0);
    check16(16'h0FFF, 16'h0000, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < 20000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ctv_comparator: checks the "=?" box: detect only when check is set and
// the two 33-bit results differ, including single-bit differences in every
// position.
module tb_ctv_comparator;

  int checks = 0, failures = 0;
  logic        check;
  logic [32:0] m, c;
  logic        detect;

  ctv_comparator #(.W(33)) dut (.check(check), .main_res(m), .chk_res(c), .detect(detect));

  task automatic t(input logic chk, input logic [32:0] tm, input logic [32:0] tc);
    check = chk; m = tm; c = tc;
    #1;
    checks++;
    if (detect !== (chk && (tm != tc))) begin
      failures++;
      $display("FAIL check=%0d m=%h c=%h detect=%0d", chk, tm, tc, detect);
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
    logic [32:0] r;
    for (int i = 0; i < 33; i++) begin
      r = {$urandom, 1'($urandom)};
      t(1'b1, r, r ^ (33'd1 << i));
      t(1'b0, r, r ^ (33'd1 << i));
      t(1'b1, r, r);
    end
    for (int i = 0; i < 1000; i++) begin
      r = {$urandom, 1'($urandom)};
      t(1'($urandom), r, ($urandom_range(1, 0) == 1) ? r : {$urandom, 1'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

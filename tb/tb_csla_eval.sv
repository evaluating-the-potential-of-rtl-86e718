// tb_csla_eval: checks the fault-measurement circuit.  The adder under test
// is modelled here as the exact sum of the registered inputs XOR an error
// pattern chosen per vector (zero for about two thirds of the vectors).
// For each vector the test checks the registered inputs handed to the adder
// under test, that res_valid / ng appear two cycles after the vector is
// presented, and that ng is set exactly for the vectors given an error.
module tb_csla_eval;
  import ctv_pkg::*;

  localparam int N = 3000;

  int checks = 0, failures = 0, n_ng = 0, n_ok = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [31:0] a_in = 0, b_in = 0;
  logic cin_in = 0;
  logic [31:0] dut_a, dut_b;
  logic dut_cin;
  logic [32:0] dut_res, err_cur = 0;
  logic res_valid, ng;

  csla_eval dut (.clk, .rst_n, .in_valid, .a_in, .b_in, .cin_in,
                 .dut_a, .dut_b, .dut_cin, .dut_res, .res_valid, .ng);

  // adder under test
  assign dut_res = ({1'b0, dut_a} + {1'b0, dut_b} + 33'(dut_cin)) ^ err_cur;

  always #5 clk = ~clk;

  logic        v_q  [0:N+3];
  logic [31:0] a_q  [0:N+3];
  logic [32:0] e_q  [0:N+3];

  task automatic chk(input string what, input logic cond, input int idx);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s, vector %0d", what, idx);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= N + 3; i++) begin v_q[i] = 0; a_q[i] = 0; e_q[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < N + 3; e++) begin
      // vector e is presented now, registered at the next edge
      if (e < N) begin
        v_q[e] = ($urandom_range(7, 0) != 0);
        a_in = $urandom; b_in = $urandom; cin_in = 1'($urandom);
        a_q[e] = a_in;
        e_q[e] = ($urandom_range(2, 0) == 0) ? {$urandom, 1'($urandom)} | 33'd1 : 33'd0;
      end else begin
        v_q[e] = 0;
        a_q[e] = a_in;
      end
      in_valid = v_q[e];
      // vector e-1 is at the adder under test in this cycle
      err_cur = (e >= 1) ? e_q[e-1] : 33'd0;
      if (e >= 1) chk("dut_a", dut_a == a_q[e-1], e - 1);
      // verdict of vector e-2
      if (e >= 2) begin
        chk("res_valid", res_valid == v_q[e-2], e - 2);
        chk("ng", ng == (v_q[e-2] && e_q[e-2] != 0), e - 2);
        if (ng) n_ng++;
        if (res_valid && !ng) n_ok++;
      end
      @(negedge clk);
    end
    $display("OK=%0d NG=%0d", n_ok, n_ng);
    chk("some NG seen", n_ng > 0, 0);
    chk("some OK seen", n_ok > 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ctv_alu: drives the CTV ALU with one random addition per f_H cycle (with
// some idle cycles) and injects timing violations into the main ALU at
// random.  A scoreboard, computing sums with the integer adder, checks for
// every operation:
//   - the speculative result one cycle after the operands are registered
//     (correct sum XOR the injected error),
//   - the verified result one cycle later (always the correct sum),
//   - detect / detect_a / detect_b: set exactly when an error was injected,
//     on the comparator of the checker whose phase started the operation.
// The checker phases en_a / en_b are generated here, alternating every cycle.
module tb_ctv_alu;
  import ctv_pkg::*;

  localparam int N = 4000;

  int checks = 0, failures = 0;
  int n_det_a = 0, n_det_b = 0, n_ok = 0;

  logic clk_h = 0, rst_n = 0;
  logic en_a, en_b;
  logic in_valid = 0;
  logic [31:0] op1 = 0, op2 = 0;
  logic cin = 0;
  logic [32:0] inj_mask = 0;
  op_res_t spec, verif;
  logic detect_a, detect_b, detect;

  ctv_alu dut (.clk_h, .rst_n, .en_a, .en_b, .in_valid, .op1, .op2, .cin, .inj_mask,
               .spec, .verif, .detect_a, .detect_b, .detect);

  always #5 clk_h = ~clk_h;

  // operations, indexed by the edge that registers them
  logic        v_q   [0:N+4];
  logic [32:0] sum_q [0:N+4];
  logic [32:0] msk_q [0:N+4];
  logic        ph_a_q[0:N+4];

  int edge_n = 0;         // f_H edges since reset release
  logic phase = 0;        // 0: next edge is an f_L edge (checker A)
  assign en_a = ~phase;
  assign en_b = phase;
  always @(posedge clk_h) if (rst_n) begin
    edge_n <= edge_n + 1;
    phase  <= ~phase;
  end

  task automatic chk(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at edge %0d", what, edge_n);
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
    for (int i = 0; i <= N + 4; i++) begin
      v_q[i] = 0; sum_q[i] = 0; msk_q[i] = 0; ph_a_q[i] = 0;
    end
    repeat (3) @(negedge clk_h);
    rst_n = 1;
    for (int e = 0; e < N + 4; e++) begin
      // e edges seen; drive the operation registered at edge e+1
      automatic int c = e + 1;
      if (c <= N) begin
        v_q[c] = ($urandom_range(9, 0) != 0);
        op1 = $urandom; op2 = $urandom; cin = 1'($urandom);
        if ($urandom_range(3, 0) == 0) begin op1 = 32'hFFFF_FFFF; op2 = 32'h1; end
        in_valid = v_q[c];
        sum_q[c] = {1'b0, op1} + {1'b0, op2} + 33'(cin);
        msk_q[c] = ($urandom_range(2, 0) == 0) ? (33'd1 << $urandom_range(32, 0)) : 33'd0;
        ph_a_q[c] = en_a;
      end else begin
        in_valid = 0;
      end
      // the operation registered at edge e is captured by the main ALU at e+1
      inj_mask = (e >= 1 && e <= N && v_q[e]) ? msk_q[e] : 33'd0;
      // speculative result: operation registered at edge e-1
      if (e >= 2) begin
        automatic int s = e - 1;
        chk("spec.valid", spec.valid == v_q[s]);
        if (v_q[s]) chk("spec.res", spec.res == (sum_q[s] ^ msk_q[s]));
      end
      // verification: operation registered at edge e-2
      if (e >= 3) begin
        automatic int s = e - 2;
        automatic logic fault = v_q[s] && (msk_q[s] != 0);
        chk("verif.valid", verif.valid == v_q[s]);
        if (v_q[s]) chk("verif.res", verif.res == sum_q[s]);
        chk("detect", detect == fault);
        chk("detect_a", detect_a == (fault && ph_a_q[s]));
        chk("detect_b", detect_b == (fault && !ph_a_q[s]));
        if (detect_a) n_det_a++;
        if (detect_b) n_det_b++;
        if (v_q[s] && !fault) n_ok++;
      end
      @(negedge clk_h);
    end
    $display("verified ok=%0d, violations caught by checker A=%0d, by checker B=%0d", n_ok, n_det_a, n_det_b);
    chk("checker A caught a violation", n_det_a > 0);
    chk("checker B caught a violation", n_det_b > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

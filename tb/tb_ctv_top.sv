// tb_ctv_top: end-to-end test of the whole design at its default sizes.
//
// Part A, the CTV ALU.  For injected fault probabilities of 0, 10, 20, 30,
// 40 and 50 % of operations, OPS_PER_P random additions (one per f_H cycle,
// about one cycle in ten idle) are issued; a violation of the main ALU is
// injected with that probability as a random one-bit error.  A scoreboard
// checks every speculative result, every verified (corrected) result and that
// detect fires on exactly the faulty operations, on the comparator of the
// checker whose f_L / ~f_L phase started the operation.
//
// Part B, the fault-measurement circuit.  A gate-level adder model with gate
// delays (csla32_gates) is connected as the adder under test.  Its critical
// path T_CRIT is computed here by static timing over the same structure; the
// evaluation clock period is then set to T_CRIT / boost for boost ratios
// 1.0 .. 3.0 and VECTORS random vectors are run at each.  The test samples
// the adder output itself at every edge and checks that NG is reported
// exactly for the vectors whose sampled result is wrong, that no NG occurs at
// boost 1.0 and that some do at 3.0.  It prints the fault probability per
// boost ratio.
//
// Every mechanism (speculative result, verification by checker A and by
// checker B, detection by each, idle cycles, OK and NG verdicts) is counted
// and must occur at least once.
module tb_ctv_top;
  import ctv_pkg::*;

  localparam int OPS_PER_P = 4000;
  localparam int VECTORS   = 40000;
  localparam int D_SUM = 50, D_CARRY = 40, D_MUX = 30;
  localparam int NB = 9;
  localparam real BOOST [NB] = '{1.0, 1.1, 1.2, 1.3, 1.4, 1.5, 2.0, 2.5, 3.0};

  int checks = 0, failures = 0;

  // ---------------- DUT ----------------
  logic clk_h = 0, rst_n = 0;
  logic in_valid = 0;
  logic [31:0] op1 = 0, op2 = 0;
  logic cin = 0;
  logic [32:0] inj_mask = 0;
  logic f_l, f_l_n;
  op_res_t spec, verif;
  logic detect_a, detect_b, detect;

  logic eval_clk = 0, eval_rst_n = 0, eval_in_valid = 0;
  logic [31:0] eval_a = 0, eval_b = 0;
  logic eval_cin = 0;
  logic [31:0] eval_dut_a, eval_dut_b;
  logic eval_dut_cin;
  logic [32:0] eval_dut_res;
  logic eval_res_valid, eval_ng;

  ctv_top dut (.*);

  csla32_gates #(.D_SUM(D_SUM), .D_CARRY(D_CARRY), .D_MUX(D_MUX)) u_gate_adder (
    .a(eval_dut_a), .b(eval_dut_b), .cin(eval_dut_cin),
    .s(eval_dut_res[31:0]), .c32(eval_dut_res[32]));

  task automatic chk(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- Part A: CTV ALU ----------------
  always #5 clk_h = ~clk_h;

  localparam int NA = OPS_PER_P + 4;
  logic        v_q  [0:NA];
  logic [32:0] sum_q[0:NA];
  logic [32:0] msk_q[0:NA];
  logic        ph_q [0:NA];

  int n_spec = 0, n_ver_a = 0, n_ver_b = 0, n_det_a = 0, n_det_b = 0, n_idle = 0;

  task automatic run_ctv(input int pct);
    int n_faulty = 0, n_detect = 0, n_valid = 0;
    for (int i = 0; i <= NA; i++) begin v_q[i] = 0; sum_q[i] = 0; msk_q[i] = 0; ph_q[i] = 0; end
    rst_n = 0;
    in_valid = 0;
    inj_mask = 0;
    repeat (2) @(negedge clk_h);
    rst_n = 1;
    for (int e = 0; e < NA; e++) begin
      automatic int c = e + 1;   // edge that registers the operation driven now
      if (c <= OPS_PER_P) begin
        v_q[c] = ($urandom_range(9, 0) != 0);
        op1 = $urandom; op2 = $urandom; cin = 1'($urandom);
        sum_q[c] = {1'b0, op1} + {1'b0, op2} + 33'(cin);
        msk_q[c] = ($urandom_range(99, 0) < pct) ? (33'd1 << $urandom_range(32, 0)) : 33'd0;
        ph_q[c]  = !f_l;         // f_L low now: the coming edge is an f_L rising edge
      end else begin
        v_q[c] = 0;
      end
      in_valid = v_q[c];
      if (!v_q[c]) n_idle++;
      inj_mask = (e >= 1 && v_q[e]) ? msk_q[e] : 33'd0;
      if (e >= 2) begin
        automatic int s = e - 1;
        chk("spec.valid", spec.valid == v_q[s]);
        if (v_q[s]) begin
          chk("spec.res", spec.res == (sum_q[s] ^ msk_q[s]));
          n_spec++;
        end
      end
      if (e >= 3) begin
        automatic int s = e - 2;
        automatic logic fault = v_q[s] && (msk_q[s] != 0);
        chk("verif.valid", verif.valid == v_q[s]);
        if (v_q[s]) begin
          chk("verif.res", verif.res == sum_q[s]);
          n_valid++;
          if (ph_q[s]) n_ver_a++; else n_ver_b++;
        end
        chk("detect", detect == fault);
        chk("detect_a", detect_a == (fault && ph_q[s]));
        chk("detect_b", detect_b == (fault && !ph_q[s]));
        n_faulty += int'(fault);
        n_detect += int'(detect);
        n_det_a  += int'(detect_a);
        n_det_b  += int'(detect_b);
      end
      @(negedge clk_h);
    end
    $display("CTV ALU  fault probability %2d%%: %0d operations, %0d violations injected, %0d detected (%0.1f%%)",
             pct, n_valid, n_faulty, n_detect, 100.0 * n_detect / n_valid);
  endtask

  // ---------------- Part B: fault measurement ----------------
  // Static timing of csla_block_gates: returns the latest sum bit and carry
  // out arrival for a block whose operands arrive at 0 and carry-in at tc.
  function automatic void sta_block(input int width, input int tc, output int t_s, output int t_c);
    if (width <= 4) begin
      int c = tc;
      t_s = 0;
      for (int i = 0; i < width; i++) begin
        t_s = (c + D_SUM > t_s) ? c + D_SUM : t_s;
        c = ((c > 0) ? c : 0) + D_CARRY;
      end
      t_c = c;
    end else begin
      int ls, lc, hs, hc, mux_s, mux_c;
      sta_block(width / 2, tc, ls, lc);
      sta_block(width - width / 2, 0, hs, hc);
      mux_s = ((lc > hs) ? lc : hs) + D_MUX;
      mux_c = ((lc > hc) ? lc : hc) + D_MUX;
      t_s = (ls > mux_s) ? ls : mux_s;
      t_c = mux_c;
    end
  endfunction

  function automatic int sta_csla32();
    int s_lo, c8, s_m, c_m, s_h, c_h, c16, t;
    sta_block(8, 0, s_lo, c8);
    sta_block(8, 0, s_m, c_m);
    sta_block(16, 0, s_h, c_h);
    c16 = ((c8 > c_m) ? c8 : c_m) + D_MUX;
    t = s_lo;
    if (((c8 > s_m) ? c8 : s_m) + D_MUX > t) t = ((c8 > s_m) ? c8 : s_m) + D_MUX;
    if (c16 > t) t = c16;
    if (((c16 > s_h) ? c16 : s_h) + D_MUX > t) t = ((c16 > s_h) ? c16 : s_h) + D_MUX;
    if (((c16 > c_h) ? c16 : c_h) + D_MUX > t) t = ((c16 > c_h) ? c16 : c_h) + D_MUX;
    return t;
  endfunction

  int eval_half_hi = 200, eval_half_lo = 200;
  always begin
    #(eval_half_lo) eval_clk = 1'b1;
    #(eval_half_hi) eval_clk = 1'b0;
  end

  // what the adder under test delivered at each edge, and what it should have
  logic [32:0] smp_got = 0, smp_exp = 0;
  always @(posedge eval_clk) begin
    smp_got <= eval_dut_res;
    smp_exp <= {1'b0, eval_dut_a} + {1'b0, eval_dut_b} + 33'(eval_dut_cin);
  end

  int n_ok_total = 0, n_ng_total = 0;

  task automatic run_eval(input int period, input real boost, output int ng_cnt);
    int n_vec = 0, n_ng = 0, n_bad = 0;
    eval_half_hi = period / 2;
    eval_half_lo = period - period / 2;
    eval_rst_n = 0;
    eval_in_valid = 0;
    repeat (2) @(negedge eval_clk);
    eval_rst_n = 1;
    for (int e = 0; e < VECTORS + 3; e++) begin
      eval_in_valid = (e < VECTORS);
      eval_a = $urandom; eval_b = $urandom; eval_cin = 1'($urandom);
      if (eval_res_valid) begin
        n_vec++;
        n_ng  += int'(eval_ng);
        n_bad += int'(smp_got != smp_exp);
      end
      chk("OK/NG against sampled adder output", eval_ng == (eval_res_valid && (smp_got != smp_exp)));
      @(negedge eval_clk);
    end
    chk("every vector judged", n_vec == VECTORS);
    $display("CSLA     boost %0.1f (period %0d, critical path %0d): %0d vectors, NG %0d, fault probability %0.1f%%",
             boost, period, sta_csla32(), n_vec, n_ng, 100.0 * n_ng / n_vec);
    n_ok_total += n_vec - n_ng;
    n_ng_total += n_ng;
    ng_cnt = n_ng;
  endtask

  // Clock period for a boost ratio: not a multiple of the gate delays' common
  // step, so that no gate output changes exactly at a sampling edge.
  function automatic int period_for(input real boost, input int t_crit);
    int p;
    if (boost <= 1.0) return t_crit + 3;
    p = int'($floor(t_crit / boost));
    while ((p % 10) != 3 && (p % 10) != 7) p--;
    return p;
  endfunction

  initial begin
    int t_crit, ng;
    for (int pct = 0; pct <= 50; pct += 10) run_ctv(pct);

    t_crit = sta_csla32();
    $display("static critical path of the gate-level adder: %0d", t_crit);
    for (int i = 0; i < NB; i++) begin
      run_eval(period_for(BOOST[i], t_crit), BOOST[i], ng);
      if (i == 0)      chk("no NG when the clock meets the critical path", ng == 0);
      if (i == NB - 1) chk("NG at boost 3.0", ng > 0);
    end

    $display("mechanisms: speculative results %0d, verified by checker A %0d / B %0d, violations detected by A %0d / B %0d, idle cycles %0d, OK %0d, NG %0d",
             n_spec, n_ver_a, n_ver_b, n_det_a, n_det_b, n_idle, n_ok_total, n_ng_total);
    chk("speculative result", n_spec > 0);
    chk("verification by checker A", n_ver_a > 0);
    chk("verification by checker B", n_ver_b > 0);
    chk("violation detected by checker A", n_det_a > 0);
    chk("violation detected by checker B", n_det_b > 0);
    chk("idle cycle", n_idle > 0);
    chk("OK verdict", n_ok_total > 0);
    chk("NG verdict", n_ng_total > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

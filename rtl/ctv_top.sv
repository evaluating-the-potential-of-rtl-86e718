// ctv_top: the constructive-timing-violation design and its adder evaluation
// circuit, side by side.
//
// Left: the CTV ALU.  ctv_clkgen derives the checker phases f_L / ~f_L from
// the main clock clk_h (f_H = 2 f_L); ctv_alu runs the main 32-bit adder at
// f_H and verifies each result with one of two checker adders.  One operation
// per clk_h cycle; spec carries the speculative result one cycle after the
// operands are registered, verif the checked result one cycle later together
// with detect (timing violation of the main ALU).  inj_mask models a violation
// of the main ALU; tie it to zero outside simulation.
//
// Right: csla_eval, the fault-measurement circuit with its own clock.  The
// adder under test (a gate-level adder with delays) is external: eval_dut_a,
// eval_dut_b, eval_dut_cin go to it and eval_dut_res comes back.
// Both circuits follow the CTV technique's description; putting them in one
// top with separate clocks and resets is this design's arrangement.
module ctv_top
  import ctv_pkg::*;
(
  // CTV ALU
  input  logic              clk_h,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] op1,
  input  logic [WORD_W-1:0] op2,
  input  logic              cin,
  input  logic [RES_W-1:0]  inj_mask,
  output logic              f_l,
  output logic              f_l_n,
  output op_res_t           spec,
  output op_res_t           verif,
  output logic              detect_a,
  output logic              detect_b,
  output logic              detect,
  // evaluation circuit
  input  logic              eval_clk,
  input  logic              eval_rst_n,
  input  logic              eval_in_valid,
  input  logic [WORD_W-1:0] eval_a,
  input  logic [WORD_W-1:0] eval_b,
  input  logic              eval_cin,
  output logic [WORD_W-1:0] eval_dut_a,
  output logic [WORD_W-1:0] eval_dut_b,
  output logic              eval_dut_cin,
  input  logic [RES_W-1:0]  eval_dut_res,
  output logic              eval_res_valid,
  output logic              eval_ng
);

  logic en_a, en_b;

  ctv_clkgen u_clkgen (
    .clk_h(clk_h), .rst_n(rst_n), .f_l(f_l), .f_l_n(f_l_n), .en_a(en_a), .en_b(en_b));

  ctv_alu u_alu (
    .clk_h(clk_h), .rst_n(rst_n), .en_a(en_a), .en_b(en_b),
    .in_valid(in_valid), .op1(op1), .op2(op2), .cin(cin), .inj_mask(inj_mask),
    .spec(spec), .verif(verif), .detect_a(detect_a), .detect_b(detect_b), .detect(detect));

  csla_eval u_eval (
    .clk(eval_clk), .rst_n(eval_rst_n), .in_valid(eval_in_valid),
    .a_in(eval_a), .b_in(eval_b), .cin_in(eval_cin),
    .dut_a(eval_dut_a), .dut_b(eval_dut_b), .dut_cin(eval_dut_cin), .dut_res(eval_dut_res),
    .res_valid(eval_res_valid), .ng(eval_ng));

endmodule

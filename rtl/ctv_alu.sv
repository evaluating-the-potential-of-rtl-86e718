// ctv_alu: ALU with constructive timing violation (CTV).
//
// Idea: the main ALU is clocked at f_H, faster than its critical path allows
// at the lowered supply voltage, because most operations exercise far shorter
// paths.  Two checker ALUs, identical to the main one, are clocked at
// f_L = f_H / 2 on complementary phases, so each has two f_H cycles per
// operation and never violates timing.  Checker A starts the operations that
// arrive at f_L rising edges, checker B those at ~f_L rising edges; together
// they keep up with one operation per f_H cycle.  The main result is held one
// more f_H cycle in a second register and compared with the checker result;
// a difference means the main ALU violated timing, and the checker result is
// the correct value for recovery.
//
// Timing (edges of f_H, operation X presented before edge t0 with en_a = 1):
//   t0  X registered into the main ALU and into checker A
//   t1  speculative result of X in spec (main output register)
//   t2  X's main result moved to the second register; checker A's result of X
//       registered; in the cycle after t2 verif holds the correct result and
//       detect / detect_a report the comparison.
// An operation entering at an en_b edge follows the same pattern on checker B.
// The checker ALU paths are two-cycle paths of f_H.
//
// The ALU is the 32-bit carry select adder (A + B + Cin).  Because RTL has no
// gate delays, a timing violation of the main ALU is modelled by inj_mask,
// XORed into the main result as it is captured (tie it to 0 in a real design).
// The structure (three ALUs, registers, the two comparators and the clock
// phases) follows the document; the adder as ALU operation, the valid bits,
// the enable-based clocking and the reset are this design's own choices.
// The comparators see the second main register for one f_H cycle (it is
// shared by both), so detect is a single-cycle path of f_H, although the
// checker side of each comparison is stable for a whole f_L period.
module ctv_alu
  import ctv_pkg::*;
(
  input  logic             clk_h,
  input  logic             rst_n,
  input  logic             en_a,
  input  logic             en_b,
  input  logic             in_valid,
  input  logic [WORD_W-1:0] op1,
  input  logic [WORD_W-1:0] op2,
  input  logic             cin,
  input  logic [RES_W-1:0] inj_mask,
  output op_res_t          spec,
  output op_res_t          verif,
  output logic             detect_a,
  output logic             detect_b,
  output logic             detect
);

  typedef struct packed {
    logic              valid;
    logic [WORD_W-1:0] a;
    logic [WORD_W-1:0] b;
    logic              cin;
  } operands_t;

  operands_t op_in;
  assign op_in = '{valid: in_valid, a: op1, b: op2, cin: cin};

  // ---------------- main ALU (f_H) ----------------
  operands_t main_q;
  add_res_t  main_sum;
  op_res_t   main_r1, main_r2;

  csla32 u_main (.a(main_q.a), .b(main_q.b), .cin(main_q.cin),
                 .s(main_sum.s), .c32(main_sum.c));

  always_ff @(posedge clk_h or negedge rst_n) begin
    if (!rst_n) begin
      main_q  <= '0;
      main_r1 <= '0;
      main_r2 <= '0;
    end else begin
      main_q        <= op_in;
      main_r1.valid <= main_q.valid;
      main_r1.res   <= main_sum ^ inj_mask;
      main_r2       <= main_r1;
    end
  end

  // ---------------- checker A (f_L) ----------------
  operands_t chk_a_q;
  add_res_t  chk_a_sum;
  op_res_t   chk_a_r;

  csla32 u_chk_a (.a(chk_a_q.a), .b(chk_a_q.b), .cin(chk_a_q.cin),
                  .s(chk_a_sum.s), .c32(chk_a_sum.c));

  always_ff @(posedge clk_h or negedge rst_n) begin
    if (!rst_n) begin
      chk_a_q <= '0;
      chk_a_r <= '0;
    end else if (en_a) begin
      chk_a_q <= op_in;
      chk_a_r <= '{valid: chk_a_q.valid, res: chk_a_sum};
    end
  end

  // ---------------- checker B (~f_L) ----------------
  operands_t chk_b_q;
  add_res_t  chk_b_sum;
  op_res_t   chk_b_r;

  csla32 u_chk_b (.a(chk_b_q.a), .b(chk_b_q.b), .cin(chk_b_q.cin),
                  .s(chk_b_sum.s), .c32(chk_b_sum.c));

  always_ff @(posedge clk_h or negedge rst_n) begin
    if (!rst_n) begin
      chk_b_q <= '0;
      chk_b_r <= '0;
    end else if (en_b) begin
      chk_b_q <= op_in;
      chk_b_r <= '{valid: chk_b_q.valid, res: chk_b_sum};
    end
  end

  // ---------------- comparators ----------------
  // Checker A's result was registered at the last edge when en_b is now 1.
  logic check_a, check_b;
  assign check_a = en_b && chk_a_r.valid;
  assign check_b = en_a && chk_b_r.valid;

  ctv_comparator #(.W(RES_W)) u_cmp_a (
    .check(check_a), .main_res(main_r2.res), .chk_res(chk_a_r.res), .detect(detect_a));
  ctv_comparator #(.W(RES_W)) u_cmp_b (
    .check(check_b), .main_res(main_r2.res), .chk_res(chk_b_r.res), .detect(detect_b));

  assign detect = detect_a | detect_b;
  assign spec   = main_r1;
  assign verif  = en_b ? chk_a_r : chk_b_r;

  // The delayed main result and the checker result belong to the same operation.
  a_same_op_a: assert property (@(posedge clk_h) disable iff (!rst_n)
                                en_b |-> (main_r2.valid == chk_a_r.valid));
  a_same_op_b: assert property (@(posedge clk_h) disable iff (!rst_n)
                                en_a |-> (main_r2.valid == chk_b_r.valid));
  a_one_phase: assert property (@(posedge clk_h) disable iff (!rst_n) en_a != en_b);

endmodule

// csla_eval: circuit that measures timing faults of a carry select adder
// clocked faster than its critical path allows.
//
// A, B and Cin are registered and fed to two adders: the adder under test,
// which has real gate delays and sits outside this module (dut_* ports), and
// a reference csla32 without delay inside.  On the next clock edge both
// {C[32], S[31:0]} results are registered and compared: ng = 1 (NG) when they
// differ, i.e. the adder under test did not settle within one clock period.
// Raising the clock frequency and counting NG over many vectors gives the
// fault probability for that boosting ratio.
//
// Timing: a vector presented before edge t0 is registered at t0, its results
// are registered at t1 and res_valid / ng hold its verdict in the cycle after
// t1.  One vector per cycle.  The registers, the two adders and the "=?" box
// follow the document's evaluation circuit; the valid bit and reset are this
// design's own additions.
module csla_eval
  import ctv_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] a_in,
  input  logic [WORD_W-1:0] b_in,
  input  logic              cin_in,
  output logic [WORD_W-1:0] dut_a,
  output logic [WORD_W-1:0] dut_b,
  output logic              dut_cin,
  input  logic [RES_W-1:0]  dut_res,
  output logic              res_valid,
  output logic              ng
);

  logic     v_in, v_out;
  add_res_t ref_sum, ref_q, dut_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_in    <= 1'b0;
      dut_a   <= '0;
      dut_b   <= '0;
      dut_cin <= 1'b0;
      v_out   <= 1'b0;
      ref_q   <= '0;
      dut_q   <= '0;
    end else begin
      v_in    <= in_valid;
      dut_a   <= a_in;
      dut_b   <= b_in;
      dut_cin <= cin_in;
      v_out   <= v_in;
      ref_q   <= ref_sum;
      dut_q   <= dut_res;
    end
  end

  csla32 u_ref (.a(dut_a), .b(dut_b), .cin(dut_cin), .s(ref_sum.s), .c32(ref_sum.c));

  ctv_comparator #(.W(RES_W)) u_cmp (
    .check(v_out), .main_res(dut_q), .chk_res(ref_q), .detect(ng));

  assign res_valid = v_out;

endmodule

// ctv_clkgen: the two checker clock phases f_L and ~f_L, derived from the main
// clock f_H at half its frequency (f_H = 2 * f_L).
//
// A toggle flip-flop on f_H holds the level of f_L.  Rising edges of f_L fall
// on every second rising edge of f_H and rising edges of ~f_L on the f_H edges
// in between, which is the alignment of the clock diagram.  Instead of
// clocking registers with f_L and ~f_L directly, the design clocks everything
// with f_H and uses en_a / en_b as clock enables:
//   en_a = 1  -> the coming f_H edge is an f_L rising edge  (checker A edge)
//   en_b = 1  -> the coming f_H edge is a ~f_L rising edge  (checker B edge)
// Exactly one of them is 1 in every cycle.  The enable form and the reset
// state (f_L low, so the first edge after reset is an f_L edge) are this
// design's own choices; the 2:1 frequency ratio is the document's.
module ctv_clkgen (
  input  logic clk_h,
  input  logic rst_n,
  output logic f_l,
  output logic f_l_n,
  output logic en_a,
  output logic en_b
);

  always_ff @(posedge clk_h or negedge rst_n) begin
    if (!rst_n) f_l <= 1'b0;
    else        f_l <= ~f_l;
  end

  assign f_l_n = ~f_l;
  assign en_a  = ~f_l;
  assign en_b  = f_l;

endmodule

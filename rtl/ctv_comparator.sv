// ctv_comparator: the "=?" box.  Raises detect when a verification is due
// (check = 1) and the main unit's result differs from the checker's result.
// A mismatch is a timing violation of the main unit.
//
// Purely combinational; the surrounding registers give it a whole f_H cycle
// (in the CTV ALU) or a whole evaluation clock cycle (in csla_eval).  The
// check qualifier is this design's addition so that idle cycles never flag.
module ctv_comparator #(
  parameter int unsigned W = 33
) (
  input  logic         check,
  input  logic [W-1:0] main_res,
  input  logic [W-1:0] chk_res,
  output logic         detect
);

  assign detect = check && (main_res != chk_res);

endmodule

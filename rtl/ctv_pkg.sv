// ctv_pkg: types and constants shared by the constructive-timing-violation
// (CTV) ALU and the carry select adder evaluation circuit.
//
// The datapath is 32 bits wide, as in the carry select adder the design is
// built around; an adder result is the 33-bit word {C[32], S[31:0]}.
// op_res_t tags a result with a valid bit; it is how the CTV ALU reports both
// its speculative (main ALU) and its verified (checker ALU) results.
package ctv_pkg;

  localparam int unsigned WORD_W = 32;
  localparam int unsigned RES_W  = WORD_W + 1;

  typedef struct packed {
    logic              c;   // carry out, C[32]
    logic [WORD_W-1:0] s;   // sum, S[31:0]
  } add_res_t;

  typedef struct packed {
    logic     valid;
    add_res_t res;
  } op_res_t;

endpackage

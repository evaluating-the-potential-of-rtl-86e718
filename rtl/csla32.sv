// csla32: 32-bit carry select adder, {C[32], S[31:0]} = A + B + Cin.
//
// Three sections, as in the adder's block diagram:
//   bits  7:0  one 8-bit CSLA with the external carry-in;
//   bits 15:8  two 8-bit CSLAs with carry-in 0 and 1; the carry out of bits
//              7:0 selects the sum S[15:8] and the carry into bit 16;
//   bits 31:16 two 16-bit CSLAs with carry-in 0 and 1; the carry into bit 16
//              selects the sum S[31:16] and C[32].
// The partition and the multiplexers follow the document; the inside of the
// 8- and 16-bit sub-adders (csla_block) is this design's choice.
//
// Purely combinational.  It serves as the ALU of the CTV ALU (main and
// checker copies alike) and as the reference adder of the evaluation circuit.
module csla32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] s,
  output logic        c32
);

  logic       c8;                 // carry out of bits 7:0
  logic [7:0] s_m0, s_m1;         // bits 15:8 for carry-in 0 / 1
  logic       c_m0, c_m1;
  logic       c16;                // carry into bit 16
  logic [15:0] s_h0, s_h1;        // bits 31:16 for carry-in 0 / 1
  logic        c_h0, c_h1;

  csla_block #(.WIDTH(8))  u_lo   (.a(a[7:0]),   .b(b[7:0]),   .cin(cin),  .s(s[7:0]), .cout(c8));
  csla_block #(.WIDTH(8))  u_mid0 (.a(a[15:8]),  .b(b[15:8]),  .cin(1'b0), .s(s_m0),   .cout(c_m0));
  csla_block #(.WIDTH(8))  u_mid1 (.a(a[15:8]),  .b(b[15:8]),  .cin(1'b1), .s(s_m1),   .cout(c_m1));
  csla_block #(.WIDTH(16)) u_hi0  (.a(a[31:16]), .b(b[31:16]), .cin(1'b0), .s(s_h0),   .cout(c_h0));
  csla_block #(.WIDTH(16)) u_hi1  (.a(a[31:16]), .b(b[31:16]), .cin(1'b1), .s(s_h1),   .cout(c_h1));

  assign s[15:8]  = c8 ? s_m1 : s_m0;
  assign c16      = c8 ? c_m1 : c_m0;
  assign s[31:16] = c16 ? s_h1 : s_h0;
  assign c32      = c16 ? c_h1 : c_h0;

endmodule

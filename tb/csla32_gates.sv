// csla32_gates: behavioural gate-level model of the 32-bit carry select adder
// with gate delays (see csla_block_gates), the "adder with delay" of the
// fault-measurement set-up.  Same 8/8/16 partition and multiplexers as
// csla32.  For simulation only.
module csla32_gates #(
  parameter int unsigned D_SUM   = 50,
  parameter int unsigned D_CARRY = 40,
  parameter int unsigned D_MUX   = 30
) (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] s,
  output logic        c32
);

  wire        c8, c16;
  wire [7:0]  s_m0, s_m1;
  wire        c_m0, c_m1;
  wire [15:0] s_h0, s_h1;
  wire        c_h0, c_h1;

  csla_block_gates #(.WIDTH(8),  .D_SUM(D_SUM), .D_CARRY(D_CARRY), .D_MUX(D_MUX)) u_lo   (.a(a[7:0]),   .b(b[7:0]),   .cin(cin),  .s(s[7:0]), .cout(c8));
  csla_block_gates #(.WIDTH(8),  .D_SUM(D_SUM), .D_CARRY(D_CARRY), .D_MUX(D_MUX)) u_mid0 (.a(a[15:8]),  .b(b[15:8]),  .cin(1'b0), .s(s_m0),   .cout(c_m0));
  csla_block_gates #(.WIDTH(8),  .D_SUM(D_SUM), .D_CARRY(D_CARRY), .D_MUX(D_MUX)) u_mid1 (.a(a[15:8]),  .b(b[15:8]),  .cin(1'b1), .s(s_m1),   .cout(c_m1));
  csla_block_gates #(.WIDTH(16), .D_SUM(D_SUM), .D_CARRY(D_CARRY), .D_MUX(D_MUX)) u_hi0  (.a(a[31:16]), .b(b[31:16]), .cin(1'b0), .s(s_h0),   .cout(c_h0));
  csla_block_gates #(.WIDTH(16), .D_SUM(D_SUM), .D_CARRY(D_CARRY), .D_MUX(D_MUX)) u_hi1  (.a(a[31:16]), .b(b[31:16]), .cin(1'b1), .s(s_h1),   .cout(c_h1));

  assign #D_MUX s[15:8]  = c8 ? s_m1 : s_m0;
  assign #D_MUX c16      = c8 ? c_m1 : c_m0;
  assign #D_MUX s[31:16] = c16 ? s_h1 : s_h0;
  assign #D_MUX c32      = c16 ? c_h1 : c_h0;

endmodule

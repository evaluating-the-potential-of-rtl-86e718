// csla_rca: W-bit ripple-carry adder, the leaf of the carry select sub-adders.
// Written as a chain of full adders (sum = a ^ b ^ c, carry = majority of
// a, b, c), so the carry ripples bit by bit from cin to cout.
// Purely combinational.  The ripple leaf is this design's choice; the
// document does not say how its sub-adders are built.
module csla_rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[W];

endmodule

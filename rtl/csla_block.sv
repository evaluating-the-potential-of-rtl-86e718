// csla_block: WIDTH-bit carry select adder, the "8b CSLA" and "16b CSLA"
// sub-adders of the 32-bit carry select adder.
//
// The operands are cut into LEAF_WIDTH-bit groups.  The lowest group is a
// ripple-carry adder fed by the real carry-in; every other group is built
// twice, for carry-in 0 and for carry-in 1.  Groups are then merged in pairs,
// level by level: the merged block keeps both carry-in versions, and in each
// version the lower half's carry-out drives a 2:1 multiplexer that picks the
// upper half's sum and carry-out.  After log2(WIDTH / LEAF_WIDTH) levels the
// block holds the sum for the real carry-in.  An 8-bit block is thus three
// 4-bit ripple adders and one mux level; a 16-bit block has two mux levels.
// This is the carry select principle of the full adder applied inside each
// sub-adder; the document only names the sub-adders and gives their widths,
// so their inside and the 4-bit leaf are this design's own choice.
//
// WIDTH must be LEAF_WIDTH times a power of two.
// Interface: a, b, cin in; s, cout out.  Purely combinational.
module csla_block #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned LEAF_WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned G  = WIDTH / LEAF_WIDTH;  // number of leaf groups
  localparam int unsigned LV = $clog2(G);           // number of mux levels

  if (G * LEAF_WIDTH != WIDTH || (1 << LV) != G) begin : g_bad_width
    $error("csla_block: WIDTH must be LEAF_WIDTH times a power of two");
  end

  // leaf results for carry-in 0 (x0) and 1 (x1); group 0 uses the real cin
  logic [WIDTH-1:0] leaf_s0, leaf_s1;
  logic [G-1:0]     leaf_c0, leaf_c1;

  for (genvar g = 0; g < G; g++) begin : g_leaf
    if (g == 0) begin : g_first
      csla_rca #(.W(LEAF_WIDTH)) u_rca (
        .a(a[LEAF_WIDTH-1:0]), .b(b[LEAF_WIDTH-1:0]), .cin(cin),
        .s(leaf_s0[LEAF_WIDTH-1:0]), .cout(leaf_c0[0]));
      assign leaf_s1[LEAF_WIDTH-1:0] = leaf_s0[LEAF_WIDTH-1:0];
      assign leaf_c1[0]              = leaf_c0[0];
    end else begin : g_pair
      csla_rca #(.W(LEAF_WIDTH)) u_rca0 (
        .a(a[g*LEAF_WIDTH +: LEAF_WIDTH]), .b(b[g*LEAF_WIDTH +: LEAF_WIDTH]), .cin(1'b0),
        .s(leaf_s0[g*LEAF_WIDTH +: LEAF_WIDTH]), .cout(leaf_c0[g]));
      csla_rca #(.W(LEAF_WIDTH)) u_rca1 (
        .a(a[g*LEAF_WIDTH +: LEAF_WIDTH]), .b(b[g*LEAF_WIDTH +: LEAF_WIDTH]), .cin(1'b1),
        .s(leaf_s1[g*LEAF_WIDTH +: LEAF_WIDTH]), .cout(leaf_c1[g]));
    end
  end

  // select tree: at level l, block k covers groups k*2^l .. (k+1)*2^l - 1
  always_comb begin
    logic [WIDTH-1:0] s0, s1, ns0, ns1;
    logic [G-1:0]     c0, c1, nc0, nc1;
    int unsigned      span;
    s0 = leaf_s0;
    s1 = leaf_s1;
    c0 = leaf_c0;
    c1 = leaf_c1;
    for (int unsigned l = 0; l < LV; l++) begin
      span = LEAF_WIDTH << l;
      ns0 = s0;
      ns1 = s1;
      nc0 = '0;
      nc1 = '0;
      // upper half of each pair picked by the lower half's carry-out, per version
      for (int unsigned i = 0; i < WIDTH; i++) begin
        if (((i / span) % 2) == 1) begin
          ns0[i] = c0[i/span - 1] ? s1[i] : s0[i];
          ns1[i] = c1[i/span - 1] ? s1[i] : s0[i];
        end
      end
      for (int unsigned k = 0; k < (G >> (l + 1)); k++) begin
        nc0[k] = c0[2*k] ? c1[2*k+1] : c0[2*k+1];
        nc1[k] = c1[2*k] ? c1[2*k+1] : c0[2*k+1];
      end
      s0 = ns0;
      s1 = ns1;
      c0 = nc0;
      c1 = nc1;
    end
    s    = s0;
    cout = c0[0];
  end

endmodule

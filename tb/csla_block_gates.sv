// csla_block_gates: behavioural gate-level model of csla_block with gate
// delays, standing in for a synthesized netlist.  It is written recursively
// (carry select halves down to 4-bit ripple-carry leaves), which has the same
// function and the same gate paths as csla_block, whose select tree shares
// the duplicated groups instead of repeating them.  Every
// full-adder sum output switches D_SUM after its inputs, every carry output
// D_CARRY after its inputs and every 2:1 mux D_MUX after its inputs.  The
// delays are in simulator time units and are not those of any real library.
// For simulation only.
module csla_block_gates #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned LEAF_WIDTH = 4,
  parameter int unsigned D_SUM      = 50,
  parameter int unsigned D_CARRY    = 40,
  parameter int unsigned D_MUX      = 30
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  if (WIDTH <= LEAF_WIDTH) begin : g_ripple
    wire [WIDTH:0] c;
    assign c[0] = cin;
    for (genvar i = 0; i < WIDTH; i++) begin : g_fa
      assign #D_SUM   s[i]   = a[i] ^ b[i] ^ c[i];
      assign #D_CARRY c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
    end
    assign cout = c[WIDTH];
  end else begin : g_select
    localparam int unsigned LO = WIDTH / 2;
    localparam int unsigned HI = WIDTH - LO;

    wire          c_lo;
    wire [HI-1:0] s_hi0, s_hi1;
    wire          c_hi0, c_hi1;

    csla_block_gates #(.WIDTH(LO), .LEAF_WIDTH(LEAF_WIDTH), .D_SUM(D_SUM), .D_CARRY(D_CARRY), .D_MUX(D_MUX)) u_lo (
      .a(a[LO-1:0]), .b(b[LO-1:0]), .cin(cin), .s(s[LO-1:0]), .cout(c_lo));
    csla_block_gates #(.WIDTH(HI), .LEAF_WIDTH(LEAF_WIDTH), .D_SUM(D_SUM), .D_CARRY(D_CARRY), .D_MUX(D_MUX)) u_hi0 (
      .a(a[WIDTH-1:LO]), .b(b[WIDTH-1:LO]), .cin(1'b0), .s(s_hi0), .cout(c_hi0));
    csla_block_gates #(.WIDTH(HI), .LEAF_WIDTH(LEAF_WIDTH), .D_SUM(D_SUM), .D_CARRY(D_CARRY), .D_MUX(D_MUX)) u_hi1 (
      .a(a[WIDTH-1:LO]), .b(b[WIDTH-1:LO]), .cin(1'b1), .s(s_hi1), .cout(c_hi1));

    assign #D_MUX s[WIDTH-1:LO] = c_lo ? s_hi1 : s_hi0;
    assign #D_MUX cout          = c_lo ? c_hi1 : c_hi0;
  end

endmodule

// cla_adder: carry look-ahead adder used as the multiplier's final adder.
//
// The two rows left by a reduction tree are added in groups of four bits.
// Inside a group every carry is formed directly from the bit generate
// (g = a & b) and propagate (p = a ^ b) terms and the group's carry in; the
// group generate/propagate terms then pass the carry from group to group.
// The document names a carry look-ahead (or carry-select) adder for this
// stage; the 4-bit grouping is this design's choice. W need not be a multiple
// of four (the top group is padded with zeros). Purely combinational.
module cla_adder #(
  parameter int W = 32                     // operand width
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int NG = (W + 3) / 4;         // number of 4-bit groups
  localparam int WP = 4 * NG;              // padded width

  logic [WP-1:0] ap, bp, g, p, s;
  logic [NG:0]   gc;                       // carry into each group

  assign ap = WP'(a);
  assign bp = WP'(b);
  assign g  = ap & bp;
  assign p  = ap ^ bp;
  assign gc[0] = cin;

  for (genvar j = 0; j < NG; j++) begin : g_grp
    logic [3:0] gg, pp;
    logic [4:0] c;
    assign gg = g[4*j +: 4];
    assign pp = p[4*j +: 4];
    assign c[0] = gc[j];
    assign c[1] = gg[0] | (pp[0] & c[0]);
    assign c[2] = gg[1] | (pp[1] & gg[0]) | (pp[1] & pp[0] & c[0]);
    assign c[3] = gg[2] | (pp[2] & gg[1]) | (pp[2] & pp[1] & gg[0])
                | (pp[2] & pp[1] & pp[0] & c[0]);
    assign c[4] = gg[3] | (pp[3] & gg[2]) | (pp[3] & pp[2] & gg[1])
                | (pp[3] & pp[2] & pp[1] & gg[0])
                | (pp[3] & pp[2] & pp[1] & pp[0] & c[0]);
    assign s[4*j +: 4] = pp ^ c[3:0];
    assign gc[j+1] = c[4];
  end

  assign sum = s[W-1:0];
  if (WP == W) begin : g_exact
    assign cout = gc[NG];
  end else begin : g_padded
    // the carry out of bit W-1 is the sum bit W of the padded group
    assign cout = s[W];
  end

endmodule

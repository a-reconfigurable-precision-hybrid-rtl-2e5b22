// precision_control: the reconfiguration unit. For every operation it picks
// the operand precision, removes the operand bits above it and chooses which
// reduction tree is enabled.
//
// Precision: the smallest of the three modes (N/4, N/2 or N bits) that holds
// both operands' significant bits, but never more than the application's
// limit prec_max. When an operand has significant bits above the limit they
// are dropped (the product is then that of the truncated operands) and
// truncated is raised. Bits above the chosen mode are forced to zero in a_m
// and b_m, so the Booth digits and partial-product rows above it do not
// switch.
//
// Reduction tree: REQ_SPEED selects Wallace, REQ_AREA Dadda and REQ_BALANCED
// the hybrid tree. Under REQ_AUTO the unit reads the switching estimate: when
// more operand bits toggled than the chosen mode has per operand (more than
// half of the active operand bits of both operands) it selects the Dadda
// tree, which has the fewest adders to toggle; otherwise the hybrid tree.
// tree_en is one-hot (bit = tree_t value) and gates the inputs of the three
// trees so that only the chosen one switches.
//
// The document says the control unit selects the precision level, chooses
// the reduction technique and enables/disables blocks, that Wallace serves
// speed and Dadda area; the encodings, the "smallest mode that fits" rule
// and the REQ_AUTO threshold are this design's. Purely combinational.
module precision_control
  import mult_pkg::*;
#(
  parameter int N = 16,                        // operand width
  localparam int SW = $clog2(N + 1),
  localparam int AW = $clog2(2 * N + 1)
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic [SW-1:0] sig_a,                 // from input_analyzer
  input  logic [SW-1:0] sig_b,
  input  logic [AW-1:0] activity,
  input  prec_t         prec_max,              // application precision limit
  input  req_t          mode_req,              // performance requirement
  output prec_t         prec,                  // precision used
  output tree_t         tree,                  // reduction tree used
  output logic [2:0]    tree_en,               // one-hot tree enables
  output logic          truncated,             // significant bits were dropped
  output logic [N-1:0]  a_m,                   // operands limited to prec
  output logic [N-1:0]  b_m
);

  localparam int QB = N / 4;
  localparam int HB = N / 2;

  logic [SW-1:0] need;
  prec_t         fit, lim;
  logic [N-1:0]  mask;

  assign need = (sig_a > sig_b) ? sig_a : sig_b;

  always_comb begin
    if (need <= SW'(QB))      fit = PREC_QUARTER;
    else if (need <= SW'(HB)) fit = PREC_HALF;
    else                      fit = PREC_FULL;
    // PREC_FULL is the largest encoding; 2'b11 is treated as full
    lim  = (prec_max == PREC_QUARTER || prec_max == PREC_HALF) ? prec_max : PREC_FULL;
    prec = (fit > lim) ? lim : fit;
    truncated = (fit > lim);
    case (prec)
      PREC_QUARTER: mask = N'((1 << QB) - 1);
      PREC_HALF:    mask = N'((1 << HB) - 1);
      default:      mask = '1;
    endcase
  end

  assign a_m = a & mask;
  assign b_m = b & mask;

  always_comb begin
    case (mode_req)
      REQ_SPEED:    tree = TREE_WALLACE;
      REQ_AREA:     tree = TREE_DADDA;
      REQ_BALANCED: tree = TREE_HYBRID;
      default:      tree = (32'(activity) > prec_bits(N, prec)) ? TREE_DADDA : TREE_HYBRID;
    endcase
    tree_en = 3'b001 << tree;
  end

endmodule

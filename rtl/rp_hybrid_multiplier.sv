// rp_hybrid_multiplier: reconfigurable precision, Booth-encoded multiplier
// with a selectable Wallace, Dadda or hybrid reduction tree.
//
// Datapath, in the order of the operation:
//   input_analyzer    significant width of each operand, toggles since the
//                     previous operation
//   precision_control precision mode (N/4, N/2 or N bits, capped by
//                     prec_max), operand masking, choice of reduction tree
//   booth_encoder     radix-4 Booth digits of the (masked) operand b
//   pp_generator      partial-product bit matrix from a and the digits
//   wallace_tree, dadda_tree, hybrid_tree
//                     three reduction trees side by side; only the chosen one
//                     receives the matrix, the others see zeros
//   cla_adder         adds the chosen tree's two rows
// The product is registered: an operation presented with in_valid high is
// answered one clock later with out_valid high, together with the precision
// and tree that were used. A new operation can be presented every clock.
//
// Operands are unsigned, the product is the full 2N bits. When prec_max
// forces a precision below the operands' significant bits, the product is
// that of the operands truncated to prec_max bits and truncated is set.
//
// The chain of blocks follows the document's block diagram and module list;
// the output register, the handshake (in_valid/out_valid), the port
// encodings and the unsigned operands are this design's choices.
module rp_hybrid_multiplier
  import mult_pkg::*;
#(
  parameter int N = 16,                        // operand width (multiple of 4)
  localparam int W  = 2 * N,
  localparam int D  = N / 2 + 1,
  localparam int R  = D + 2,
  localparam int SW = $clog2(N + 1),
  localparam int AW = $clog2(2 * N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,                 // asynchronous, active low
  input  logic          in_valid,
  input  logic [N-1:0]  a,                     // multiplicand
  input  logic [N-1:0]  b,                     // multiplier
  input  prec_t         prec_max,              // application precision limit
  input  req_t          mode_req,              // speed / area / balanced / auto
  output logic          out_valid,
  output logic [W-1:0]  product,
  output prec_t         prec_used,
  output tree_t         tree_used,
  output logic          truncated,
  output logic [AW-1:0] activity               // toggles that operation caused
);

  if (N % 4 != 0 || N < 4) begin : g_bad_n
    $error("rp_hybrid_multiplier: N must be a positive multiple of 4");
  end

  logic [SW-1:0] sig_a, sig_b;
  logic [AW-1:0] act;
  prec_t         prec;
  tree_t         tree;
  logic [2:0]    tree_en;
  logic          trunc;
  logic [N-1:0]  a_m, b_m;
  logic [D-1:0]  one, two, neg;
  logic [W-1:0]  pp [R];
  logic [W-1:0]  wa, wb, da, db, ha, hb;
  logic [W-1:0]  ra, rb, sum;

  input_analyzer #(.N(N)) u_analyzer (
    .clk, .rst_n, .in_valid, .a, .b,
    .sig_a, .sig_b, .activity(act)
  );

  precision_control #(.N(N)) u_control (
    .a, .b, .sig_a, .sig_b, .activity(act), .prec_max, .mode_req,
    .prec, .tree, .tree_en, .truncated(trunc), .a_m, .b_m
  );

  booth_encoder #(.N(N)) u_booth (.b(b_m), .one, .two, .neg);

  pp_generator #(.N(N)) u_ppgen (.a(a_m), .one, .two, .neg, .pp);

  wallace_tree #(.N(N)) u_wallace (.en(tree_en[TREE_WALLACE]), .pp, .row_a(wa), .row_b(wb));
  dadda_tree   #(.N(N)) u_dadda   (.en(tree_en[TREE_DADDA]),   .pp, .row_a(da), .row_b(db));
  hybrid_tree  #(.N(N)) u_hybrid  (.en(tree_en[TREE_HYBRID]),  .pp, .row_a(ha), .row_b(hb));

  // the disabled trees output zeros, so the rows can be OR-combined
  assign ra = wa | da | ha;
  assign rb = wb | db | hb;

  // The matrix is summed modulo 2^(2N) (the sign-extension constant wraps),
  // so the final adder's carry out carries no information and is left open.
  cla_adder #(.W(W)) u_final (.a(ra), .b(rb), .cin(1'b0), .sum, .cout());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      product   <= '0;
      prec_used <= PREC_FULL;
      tree_used <= TREE_HYBRID;
      truncated <= 1'b0;
      activity  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        product   <= sum;
        prec_used <= prec;
        tree_used <= tree;
        truncated <= trunc;
        activity  <= act;
      end
    end
  end

  // exactly one reduction tree is enabled for every operation
  always_comb begin
    if (rst_n && in_valid) begin
      assert (tree_en == 3'b001 || tree_en == 3'b010 || tree_en == 3'b100)
        else $error("rp_hybrid_multiplier: tree enables not one-hot");
    end
  end

endmodule

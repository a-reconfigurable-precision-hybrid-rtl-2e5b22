// tb_rp_hybrid_multiplier: end-to-end test of the multiplier at its default
// size (16-bit operands, 32-bit product).
//
// 1. The six 4-bit operand pairs of the reference waveform (2*e, 8*5, c*d,
//    d*5, 3*a, 0*0) are run through each of the three reduction trees and the
//    products are compared with the printed results 1c, 28, 9c, 41, 1e, 00.
// 2. Random operations follow, with operand widths, precision limits and tree
//    requests drawn at random and in_valid sometimes low. A reference model
//    in this file predicts the product (of the operands truncated to the
//    chosen precision), the precision, the tree, the truncation flag and the
//    toggle count; every result must appear exactly one clock after its
//    operation was presented.
// The test counts how often each mechanism happened (each precision mode,
// each tree, truncation, automatic choice of Dadda and of hybrid, back-to-back
// operations, idle cycles) and fails if one never did.
module tb_rp_hybrid_multiplier;
  import mult_pkg::*;
  localparam int N  = 16;
  localparam int W  = 2 * N;
  localparam int AW = $clog2(2 * N + 1);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] a = '0, b = '0;
  prec_t prec_max = PREC_FULL;
  req_t  mode_req = REQ_AUTO;
  logic out_valid, truncated;
  logic [W-1:0] product;
  prec_t prec_used;
  tree_t tree_used;
  logic [AW-1:0] activity;

  rp_hybrid_multiplier dut (
    .clk, .rst_n, .in_valid, .a, .b, .prec_max, .mode_req,
    .out_valid, .product, .prec_used, .tree_used, .truncated, .activity
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_prec [3];
  int n_tree [3];
  int n_trunc = 0, n_auto_dadda = 0, n_auto_hybrid = 0, n_b2b = 0, n_idle = 0;

  // reference state
  logic [N-1:0] pa = '0, pb = '0;     // last accepted operands
  logic         exp_valid = 0;
  logic [W-1:0] exp_prod;
  int           exp_prec, exp_tree, exp_act;
  logic         exp_trunc;
  logic         last_valid = 0;

  function automatic int msb1(logic [N-1:0] v);
    int p;
    p = 0;
    for (int i = 0; i < N; i++) if (v[i]) p = i + 1;
    return p;
  endfunction

  // present one operation (or an idle cycle) and check the previous one
  task automatic cycle(input logic v, input logic [N-1:0] va, input logic [N-1:0] vb,
                       input int lim, input int req);
    int need, fit, cap, bits;
    logic [N-1:0] mask;
    @(negedge clk);
    in_valid = v;
    a        = va;
    b        = vb;
    prec_max = prec_t'(lim);
    mode_req = req_t'(req);
    @(posedge clk);
    #1;
    // the operation presented before this edge must now be at the output
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("FAIL out_valid=%b expected %b", out_valid, v);
    end
    if (v) begin
      need = (msb1(va) > msb1(vb)) ? msb1(va) : msb1(vb);
      fit  = (need <= N / 4) ? 0 : (need <= N / 2) ? 1 : 2;
      cap  = (lim > 2) ? 2 : lim;
      exp_prec  = (fit > cap) ? cap : fit;
      exp_trunc = fit > cap;
      bits = (exp_prec == 0) ? N / 4 : (exp_prec == 1) ? N / 2 : N;
      mask = (bits == N) ? '1 : N'((1 << bits) - 1);
      exp_act = $countones(va ^ pa) + $countones(vb ^ pb);
      case (req)
        1: exp_tree = 0;
        2: exp_tree = 1;
        3: exp_tree = 2;
        default: exp_tree = (exp_act > bits) ? 1 : 2;
      endcase
      exp_prod = W'(va & mask) * W'(vb & mask);
      pa = va;
      pb = vb;
      checks += 5;
      if (product != exp_prod) begin
        failures++;
        $display("FAIL %h * %h (prec %0d, tree %0d) = %h expected %h", va, vb, exp_prec, exp_tree, product, exp_prod);
      end
      if (int'(prec_used) != exp_prec) begin failures++; $display("FAIL prec_used %0d expected %0d", prec_used, exp_prec); end
      if (int'(tree_used) != exp_tree) begin failures++; $display("FAIL tree_used %0d expected %0d", tree_used, exp_tree); end
      if (truncated != exp_trunc) begin failures++; $display("FAIL truncated %b", truncated); end
      if (int'(activity) != exp_act) begin failures++; $display("FAIL activity %0d expected %0d", activity, exp_act); end
      n_prec[exp_prec]++;
      n_tree[exp_tree]++;
      if (exp_trunc) n_trunc++;
      if (req == 0 && exp_tree == 1) n_auto_dadda++;
      if (req == 0 && exp_tree == 2) n_auto_hybrid++;
      if (last_valid) n_b2b++;
    end else begin
      n_idle++;
    end
    last_valid = v;
  endtask

  logic [3:0] fig_a [6] = '{4'h2, 4'h8, 4'hc, 4'hd, 4'h3, 4'h0};
  logic [3:0] fig_b [6] = '{4'he, 4'h5, 4'hd, 4'h5, 4'ha, 4'h0};
  logic [7:0] fig_p [6] = '{8'h1c, 8'h28, 8'h9c, 8'h41, 8'h1e, 8'h00};

  initial begin
    for (int i = 0; i < 3; i++) begin
      n_prec[i] = 0;
      n_tree[i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // reference waveform vectors through every tree
    for (int t = 1; t <= 3; t++)
      for (int i = 0; i < 6; i++) begin
        cycle(1, N'(fig_a[i]), N'(fig_b[i]), 2, t);
        checks++;
        if (product != W'(fig_p[i])) begin
          failures++;
          $display("FAIL waveform vector %h*%h tree req %0d: %h, printed %h", fig_a[i], fig_b[i], t, product, fig_p[i]);
        end
      end

    // random operations
    for (int k = 0; k < 3000; k++) begin
      logic [N-1:0] ra, rb;
      int wa, wb;
      wa = 1 + $urandom % N;
      wb = 1 + $urandom % N;
      ra = N'($urandom) & N'((33'(1) << wa) - 1);
      rb = N'($urandom) & N'((33'(1) << wb) - 1);
      cycle(1'($urandom % 5 != 0), ra, rb, $urandom % 4, $urandom % 4);
    end
    // all-ones corner at full precision
    cycle(1, '1, '1, 2, 1);
    cycle(1, '1, '1, 2, 2);
    cycle(1, '1, '1, 2, 3);
    cycle(0, '0, '0, 2, 0);

    $display("mechanisms: prec quarter/half/full %0d/%0d/%0d, tree wallace/dadda/hybrid %0d/%0d/%0d, truncated %0d, auto->dadda %0d, auto->hybrid %0d, back-to-back %0d, idle %0d",
             n_prec[0], n_prec[1], n_prec[2], n_tree[0], n_tree[1], n_tree[2],
             n_trunc, n_auto_dadda, n_auto_hybrid, n_b2b, n_idle);
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (n_prec[i] == 0) begin failures++; $display("FAIL precision mode %0d never used", i); end
      if (n_tree[i] == 0) begin failures++; $display("FAIL tree %0d never used", i); end
    end
    checks += 5;
    if (n_trunc == 0)       begin failures++; $display("FAIL truncation never happened"); end
    if (n_auto_dadda == 0)  begin failures++; $display("FAIL automatic Dadda choice never happened"); end
    if (n_auto_hybrid == 0) begin failures++; $display("FAIL automatic hybrid choice never happened"); end
    if (n_b2b == 0)         begin failures++; $display("FAIL no back-to-back operations"); end
    if (n_idle == 0)        begin failures++; $display("FAIL no idle cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

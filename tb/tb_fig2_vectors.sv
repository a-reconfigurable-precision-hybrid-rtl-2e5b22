// tb_fig2_vectors: the multiplier built at 4-bit operands, the size of the
// reference simulation waveform (A[3:0], B[3:0], P[7:0]).
//
// The six printed operand pairs are run first through each reduction tree and
// compared with the printed products (1c, 28, 9c, 41, 1e, 00). Then all 256
// operand pairs are run through each tree at full precision and compared with
// a * b, so that the Wallace, Dadda and hybrid outputs are shown to agree on
// every input, as the expected column of the waveform does.
module tb_fig2_vectors;
  import mult_pkg::*;
  localparam int N  = 4;
  localparam int W  = 2 * N;
  localparam int AW = $clog2(2 * N + 1);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] a = '0, b = '0;
  prec_t prec_max = PREC_FULL;
  req_t  mode_req = REQ_SPEED;
  logic out_valid, truncated;
  logic [W-1:0] product;
  prec_t prec_used;
  tree_t tree_used;
  logic [AW-1:0] activity;

  rp_hybrid_multiplier #(.N(N)) dut (
    .clk, .rst_n, .in_valid, .a, .b, .prec_max, .mode_req,
    .out_valid, .product, .prec_used, .tree_used, .truncated, .activity
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] fig_a [6] = '{4'h2, 4'h8, 4'hc, 4'hd, 4'h3, 4'h0};
  logic [3:0] fig_b [6] = '{4'he, 4'h5, 4'hd, 4'h5, 4'ha, 4'h0};
  logic [7:0] fig_p [6] = '{8'h1c, 8'h28, 8'h9c, 8'h41, 8'h1e, 8'h00};

  task automatic op(input logic [N-1:0] va, input logic [N-1:0] vb, input int req,
                    input logic [W-1:0] expv);
    @(negedge clk);
    in_valid = 1;
    a = va;
    b = vb;
    mode_req = req_t'(req);
    @(posedge clk);
    #1;
    checks += 2;
    if (!out_valid || product != expv) begin
      failures++;
      $display("FAIL %h * %h request %0d: valid=%b product=%h expected %h", va, vb, req, out_valid, product, expv);
    end
    if (int'(tree_used) != req - 1) begin
      failures++;
      $display("FAIL tree_used %0d for request %0d", tree_used, req);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 1; t <= 3; t++)
      for (int i = 0; i < 6; i++) op(fig_a[i], fig_b[i], t, fig_p[i]);
    for (int t = 1; t <= 3; t++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) op(N'(x), N'(y), t, W'(x * y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wallace_tree: fills every valid slot of the Booth matrix shape with random bits
// (and every slot above a column's height with random garbage, which the tree
// must ignore) and checks that the two output rows sum to the matrix value
// modulo 2^(2N). With en low both rows must be zero. It also prints the
// tree's stage and adder counts from the elaboration-time schedule.
module tb_wallace_tree;
  import mult_pkg::*;
  localparam int N = 16;
  localparam int D = N / 2 + 1;
  localparam int W = 2 * N;
  localparam int R = D + 2;

  logic         en;
  logic [W-1:0] pp [R];
  logic [W-1:0] row_a, row_b;
  int checks = 0, failures = 0;

  wallace_tree dut (.en, .pp, .row_a, .row_b);

  task automatic run(input int fill);   // fill: 0 random, 1 all ones, 2 ones in valid slots only
    logic [W-1:0] expv;
    expv = '0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < W; c++) begin
        logic bitv;
        bitv = (fill == 0) ? 1'($urandom) : 1'b1;
        if (fill == 2 && r >= col_height(N, c)) bitv = 1'b0;
        pp[r][c] = bitv;
        if (r < col_height(N, c) && bitv) expv += W'(1) << c;
      end
    en = 1'b1;
    #1;
    checks++;
    if (row_a + row_b != expv) begin
      failures++;
      $display("FAIL rows %h + %h != %h", row_a, row_b, expv);
    end
    en = 1'b0;
    #1;
    checks++;
    if (row_a != '0 || row_b != '0) begin
      failures++;
      $display("FAIL disabled tree outputs %h %h", row_a, row_b);
    end
  endtask

  initial begin
    $display("wallace_tree: %0d stages, %0d full adders, %0d half adders",
             tree_stages(TREE_WALLACE, N), tree_adders(TREE_WALLACE, N, 1), tree_adders(TREE_WALLACE, N, 2));
    run(1);
    run(2);
    for (int k = 0; k < 2000; k++) run(0);
    // the Wallace tree is never deeper than the Dadda tree and spends the most adders
    checks += 2;
    if (tree_stages(TREE_WALLACE, N) > tree_stages(TREE_DADDA, N)) begin failures++; $display("FAIL Wallace deeper than Dadda"); end
    if (tree_adders(TREE_WALLACE, N, 1) + tree_adders(TREE_WALLACE, N, 2) < tree_adders(TREE_HYBRID, N, 1) + tree_adders(TREE_HYBRID, N, 2)) begin failures++; $display("FAIL Wallace uses fewer adders than hybrid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

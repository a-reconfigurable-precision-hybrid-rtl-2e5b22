// tb_precision_control: random operands, precision limits, requests and
// switching estimates; the chosen precision, truncation flag, masked operands,
// tree and one-hot enables are compared with a reference model of the rules:
// smallest of N/4, N/2, N bits that holds both operands, capped by the limit;
// SPEED -> Wallace, AREA -> Dadda, BALANCED -> hybrid, AUTO -> Dadda when the
// toggle count exceeds the chosen precision's bit count, else hybrid.
module tb_precision_control;
  import mult_pkg::*;
  localparam int N  = 16;
  localparam int SW = $clog2(N + 1);
  localparam int AW = $clog2(2 * N + 1);

  logic [N-1:0]  a, b, a_m, b_m;
  logic [SW-1:0] sig_a, sig_b;
  logic [AW-1:0] activity;
  prec_t prec_max, prec;
  req_t  mode_req;
  tree_t tree;
  logic [2:0] tree_en;
  logic truncated;
  int checks = 0, failures = 0;
  int seen_trunc = 0, seen_auto_dadda = 0, seen_auto_hybrid = 0;

  precision_control dut (.a, .b, .sig_a, .sig_b, .activity, .prec_max, .mode_req,
                                  .prec, .tree, .tree_en, .truncated, .a_m, .b_m);

  function automatic int msb1(logic [N-1:0] v);
    int p;
    p = 0;
    for (int i = 0; i < N; i++) if (v[i]) p = i + 1;
    return p;
  endfunction

  task automatic run(input logic [N-1:0] va, input logic [N-1:0] vb, input int lim,
                     input int req, input int act);
    int need, fit, use_bits, exp_p, exp_t;
    logic [N-1:0] mask;
    a = va; b = vb;
    sig_a = SW'(msb1(va));
    sig_b = SW'(msb1(vb));
    prec_max = prec_t'(lim);
    mode_req = req_t'(req);
    activity = AW'(act);
    #1;
    need = (msb1(va) > msb1(vb)) ? msb1(va) : msb1(vb);
    fit  = (need <= N / 4) ? 0 : (need <= N / 2) ? 1 : 2;
    exp_p = (fit > ((lim > 2) ? 2 : lim)) ? ((lim > 2) ? 2 : lim) : fit;
    use_bits = (exp_p == 0) ? N / 4 : (exp_p == 1) ? N / 2 : N;
    mask = (use_bits == N) ? '1 : N'((1 << use_bits) - 1);
    case (req)
      1: exp_t = 0;
      2: exp_t = 1;
      3: exp_t = 2;
      default: exp_t = (act > use_bits) ? 1 : 2;
    endcase
    checks += 5;
    if (int'(prec) != exp_p) begin failures++; $display("FAIL prec %0d expected %0d (a=%h b=%h lim=%0d)", prec, exp_p, va, vb, lim); end
    if (truncated != (fit > exp_p)) begin failures++; $display("FAIL truncated=%b", truncated); end
    if (a_m != (va & mask) || b_m != (vb & mask)) begin failures++; $display("FAIL masking %h %h", a_m, b_m); end
    if (int'(tree) != exp_t) begin failures++; $display("FAIL tree %0d expected %0d (req %0d act %0d)", tree, exp_t, req, act); end
    if (tree_en != 3'(1 << exp_t)) begin failures++; $display("FAIL tree_en %b", tree_en); end
    if (truncated) seen_trunc++;
    if (req == 0 && exp_t == 1) seen_auto_dadda++;
    if (req == 0 && exp_t == 2) seen_auto_hybrid++;
  endtask

  initial begin
    run(16'h0008, 16'h0005, 2, 0, 0);
    run(16'h00FF, 16'h0003, 2, 0, 9);
    run(16'hFFFF, 16'hFFFF, 0, 1, 32);
    for (int k = 0; k < 4000; k++)
      run(N'($urandom) >> ($urandom % N), N'($urandom) >> ($urandom % N),
          $urandom % 4, $urandom % 4, $urandom % (2 * N + 1));
    checks++;
    if (seen_trunc == 0 || seen_auto_dadda == 0 || seen_auto_hybrid == 0) begin
      failures++;
      $display("FAIL coverage trunc=%0d auto_dadda=%0d auto_hybrid=%0d", seen_trunc, seen_auto_dadda, seen_auto_hybrid);
    end
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

// tb_pp_generator: drives the generator with Booth digits worked out here
// from random multipliers and checks that the column-packed matrix sums to
// a * b (mod 2^(2N)), and that every slot above a column's height is zero.
module tb_pp_generator;
  import mult_pkg::*;
  localparam int N = 16;
  localparam int D = N / 2 + 1;
  localparam int W = 2 * N;
  localparam int R = D + 2;

  logic [N-1:0] a, b;
  logic [D-1:0] one, two, neg;
  logic [W-1:0] pp [R];
  int checks = 0, failures = 0;

  pp_generator dut (.a, .one, .two, .neg, .pp);

  task automatic run(input logic [N-1:0] va, input logic [N-1:0] vb);
    logic [N+2:0] bx;
    logic [W-1:0] acc;
    bit bad;
    a  = va;
    b  = vb;
    bx = {2'b00, vb, 1'b0};
    for (int i = 0; i < D; i++) begin
      case (bx[2*i +: 3])
        3'b001, 3'b010: begin one[i] = 1; two[i] = 0; neg[i] = 0; end
        3'b011:         begin one[i] = 0; two[i] = 1; neg[i] = 0; end
        3'b100:         begin one[i] = 0; two[i] = 1; neg[i] = 1; end
        3'b101, 3'b110: begin one[i] = 1; two[i] = 0; neg[i] = 1; end
        default:        begin one[i] = 0; two[i] = 0; neg[i] = 0; end
      endcase
    end
    #1;
    acc = '0;
    bad = 0;
    for (int c = 0; c < W; c++)
      for (int r = 0; r < R; r++)
        if (r < col_height(N, c)) acc += W'(pp[r][c]) << c;
        else if (pp[r][c]) bad = 1;
    checks += 2;
    if (acc != W'(va) * W'(vb)) begin
      failures++;
      $display("FAIL a=%h b=%h matrix sum %h expected %h", va, vb, acc, W'(va) * W'(vb));
    end
    if (bad) begin
      failures++;
      $display("FAIL a=%h b=%h bit set outside column heights", va, vb);
    end
  endtask

  initial begin
    run('0, '0);
    run('1, '1);
    run('1, 16'h8000);
    run(16'hFFFF, 16'h5555);
    run(16'h1234, 16'hAAAA);
    for (int k = 0; k < 2000; k++) run(N'($urandom), N'($urandom));
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

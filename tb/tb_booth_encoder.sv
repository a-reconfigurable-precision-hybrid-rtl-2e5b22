// tb_booth_encoder: checks the radix-4 Booth recoding. For random and corner
// operands the digits are rebuilt as signed values and their weighted sum
// sum_i d_i * 4^i must equal the operand; every digit must be a legal select
// combination (one and two never together, no negated zero).
module tb_booth_encoder;
  localparam int N = 16;
  localparam int D = N / 2 + 1;

  logic [N-1:0] b;
  logic [D-1:0] one, two, neg;
  int checks = 0, failures = 0;

  booth_encoder dut (.b, .one, .two, .neg);

  task automatic check(input logic [N-1:0] v);
    longint acc;
    int d;
    b = v;
    #1;
    acc = 0;
    for (int i = 0; i < D; i++) begin
      d = one[i] ? 1 : (two[i] ? 2 : 0);
      if (neg[i]) d = -d;
      acc += longint'(d) <<< (2 * i);
      checks++;
      if ((one[i] && two[i]) || (neg[i] && !one[i] && !two[i])) begin
        failures++;
        $display("FAIL b=%h digit %0d illegal one=%b two=%b neg=%b", v, i, one[i], two[i], neg[i]);
      end
      // digit i from the operand bits directly
      begin
        int lo, mid, hi, ref_d;
        lo  = (i == 0) ? 0 : ((2 * i - 1 < N) ? int'(v[2*i-1]) : 0);
        mid = (2 * i < N) ? int'(v[2*i]) : 0;
        hi  = (2 * i + 1 < N) ? int'(v[2*i+1]) : 0;
        ref_d = -2 * hi + mid + lo;
        checks++;
        if (ref_d != d) begin
          failures++;
          $display("FAIL b=%h digit %0d = %0d expected %0d", v, i, d, ref_d);
        end
      end
    end
    checks++;
    if (acc != longint'(v)) begin
      failures++;
      $display("FAIL b=%h digits sum to %0d", v, acc);
    end
  endtask

  initial begin
    check('0);
    check('1);
    check(16'h8000);
    check(16'h5555);
    check(16'hAAAA);
    check(16'h7FFF);
    for (int k = 0; k < 2000; k++) check(N'($urandom));
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

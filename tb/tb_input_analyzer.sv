// tb_input_analyzer: feeds random operand pairs, some with in_valid low, and
// checks the significant-bit counts and the toggle count against a reference
// that tracks the last accepted pair itself. Also checks that reset clears
// the stored pair.
module tb_input_analyzer;
  localparam int N  = 16;
  localparam int SW = $clog2(N + 1);
  localparam int AW = $clog2(2 * N + 1);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] a = '0, b = '0;
  logic [SW-1:0] sig_a, sig_b;
  logic [AW-1:0] activity;
  logic [N-1:0] ref_pa, ref_pb;
  int checks = 0, failures = 0;

  input_analyzer dut (.clk, .rst_n, .in_valid, .a, .b, .sig_a, .sig_b, .activity);

  always #5 clk = ~clk;

  function automatic int msb1(logic [N-1:0] v);
    int p;
    p = 0;
    for (int i = N - 1; i >= 0; i--) if (v[i] && p == 0) p = i + 1;
    return p;
  endfunction

  task automatic step(input logic [N-1:0] va, input logic [N-1:0] vb, input logic v);
    @(negedge clk);
    a = va;
    b = vb;
    in_valid = v;
    #1;
    checks += 3;
    if (int'(sig_a) != msb1(va)) begin failures++; $display("FAIL sig_a(%h)=%0d", va, sig_a); end
    if (int'(sig_b) != msb1(vb)) begin failures++; $display("FAIL sig_b(%h)=%0d", vb, sig_b); end
    if (int'(activity) != $countones(va ^ ref_pa) + $countones(vb ^ ref_pb)) begin
      failures++;
      $display("FAIL activity %0d for %h %h after %h %h", activity, va, vb, ref_pa, ref_pb);
    end
    @(posedge clk);
    if (v) begin
      ref_pa = va;
      ref_pb = vb;
    end
  endtask

  initial begin
    ref_pa = '0;
    ref_pb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    step(16'h0000, 16'h0000, 1);
    step(16'hFFFF, 16'h0001, 1);
    step(16'h8000, 16'h0F00, 0);
    step(16'h0008, 16'h0005, 1);
    for (int k = 0; k < 1000; k++) begin
      logic [N-1:0] ra, rb;
      ra = N'($urandom) >> ($urandom % N);
      rb = N'($urandom) >> ($urandom % N);
      step(ra, rb, 1'($urandom % 4 != 0));
    end
    // reset clears the stored pair
    @(negedge clk);
    in_valid = 0;
    rst_n = 0;
    #1;
    rst_n = 1;
    ref_pa = '0;
    ref_pb = '0;
    step(16'h00FF, 16'h0003, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

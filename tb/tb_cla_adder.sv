// tb_cla_adder: random and carry-chain corner cases for the look-ahead adder
// at the multiplier's width (32) and at a width that is not a multiple of
// four (30), checked against plain integer addition.
module tb_cla_adder;
  localparam int W0 = 32;
  localparam int W1 = 30;

  logic [W0-1:0] a0, b0, s0;
  logic [W1-1:0] a1, b1, s1;
  logic cin, c0, c1;
  int checks = 0, failures = 0;

  cla_adder #(.W(W0)) dut0 (.a(a0), .b(b0), .cin, .sum(s0), .cout(c0));
  cla_adder #(.W(W1)) dut1 (.a(a1), .b(b1), .cin, .sum(s1), .cout(c1));

  task automatic run(input logic [W0-1:0] x, input logic [W0-1:0] y, input logic ci);
    logic [W0:0] e0;
    logic [W1:0] e1;
    a0 = x; b0 = y; a1 = W1'(x); b1 = W1'(y); cin = ci;
    #1;
    e0 = {1'b0, x} + {1'b0, y} + (W0+1)'(ci);
    e1 = {1'b0, W1'(x)} + {1'b0, W1'(y)} + (W1+1)'(ci);
    checks += 2;
    if ({c0, s0} != e0) begin
      failures++;
      $display("FAIL W=%0d %h + %h + %b = %b_%h expected %h", W0, x, y, ci, c0, s0, e0);
    end
    if ({c1, s1} != e1) begin
      failures++;
      $display("FAIL W=%0d %h + %h + %b = %b_%h expected %h", W1, W1'(x), W1'(y), ci, c1, s1, e1);
    end
  endtask

  initial begin
    run('0, '0, 0);
    run('1, '0, 1);
    run('1, '1, 1);
    run(32'h0FFF_FFFF, 32'h0000_0001, 0);
    run(32'h3FFF_FFFF, 32'h0, 1);
    run(32'hAAAA_AAAA, 32'h5555_5555, 1);
    for (int k = 0; k < 3000; k++) run($urandom, $urandom, 1'($urandom));
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

// input_analyzer: first stage of the multiplier's control path. It looks at
// each new operand pair and reports how many of its bits are significant and
// how much switching it causes.
//
// sig_a / sig_b are the number of bits up to and including the most
// significant one (0 for a zero operand). The multiplier uses them to choose
// the smallest precision mode that loses nothing. activity is the number of
// operand bits (of a and b together) that differ from the previous accepted
// pair: an estimate of the switching the new operation causes in the
// datapath. The previous pair is stored when in_valid is high and cleared by
// reset.
//
// The document lists "operand bit-width significance" and "switching
// activity estimation" as what the control unit evaluates but not how; the
// leading-one count and the Hamming distance to the previous operands are
// this design's choices.
//
// Timing: the outputs are combinational in a, b and the stored pair; the
// stored pair updates on the rising clock edge when in_valid is high.
module input_analyzer #(
  parameter int N = 16,                        // operand width
  localparam int SW = $clog2(N + 1),           // width of a bit count up to N
  localparam int AW = $clog2(2 * N + 1)        // width of a bit count up to 2N
) (
  input  logic          clk,
  input  logic          rst_n,                 // asynchronous, active low
  input  logic          in_valid,              // a, b hold a new operation
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [SW-1:0] sig_a,                 // significant bits of a
  output logic [SW-1:0] sig_b,                 // significant bits of b
  output logic [AW-1:0] activity               // bits toggled since last pair
);

  logic [N-1:0] prev_a, prev_b;
  logic [2*N-1:0] toggles;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_a <= '0;
      prev_b <= '0;
    end else if (in_valid) begin
      prev_a <= a;
      prev_b <= b;
    end
  end

  // position of the leading one, plus one
  always_comb begin
    sig_a = '0;
    sig_b = '0;
    for (int i = 0; i < N; i++) begin
      if (a[i]) sig_a = SW'(i + 1);
      if (b[i]) sig_b = SW'(i + 1);
    end
  end

  assign toggles = {a ^ prev_a, b ^ prev_b};

  always_comb begin
    activity = '0;
    for (int i = 0; i < 2 * N; i++) activity = activity + AW'(toggles[i]);
  end

endmodule

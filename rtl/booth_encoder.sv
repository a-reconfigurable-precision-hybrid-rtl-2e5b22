// booth_encoder: radix-4 (modified Booth) recoding of an unsigned multiplier
// operand.
//
// The operand b is read in overlapping 3-bit groups {b[2i+1], b[2i], b[2i-1]}
// with b[-1] = 0 and zeros above the MSB, giving D = N/2+1 digits in
// {-2, -1, 0, +1, +2}; their weighted sum sum_i digit_i * 4^i equals b. Each
// digit is output as three select lines for the partial-product generator:
// one (|digit| = 1), two (|digit| = 2) and neg (digit negative). A group
// 111 is encoded as +0 (neg = 0), so a zero digit never asks for a negation.
// Halving the number of rows is the document's reason for Booth recoding; the
// select-line form and the unsigned (zero-extended) operand are this design's
// choices, the latter matching the document's unsigned simulation results.
// Purely combinational.
module booth_encoder #(
  parameter int N = 16,                    // operand width
  localparam int D = N / 2 + 1             // number of Booth digits
) (
  input  logic [N-1:0] b,                  // multiplier operand (unsigned)
  output logic [D-1:0] one,                // |digit| == 1
  output logic [D-1:0] two,                // |digit| == 2
  output logic [D-1:0] neg                 // digit < 0
);

  // b with one zero below the LSB and two zeros above the MSB
  logic [N+2:0] bx;
  assign bx = {2'b00, b, 1'b0};

  always_comb begin
    for (int i = 0; i < D; i++) begin
      logic lo, mid, hi;
      lo  = bx[2*i];
      mid = bx[2*i+1];
      hi  = bx[2*i+2];
      one[i] = mid ^ lo;
      two[i] = (hi & ~mid & ~lo) | (~hi & mid & lo);
      neg[i] = hi & ~(mid & lo);
    end
  end

endmodule

// pp_generator: builds the partial-product bit matrix of a radix-4 Booth
// multiplication.
//
// For Booth digit i the row magnitude is A (one) or 2A (two), N+1 bits wide,
// inverted when the digit is negative. Row i is placed at column 2i. Its
// two's-complement sign is handled without sign extension: the inverted sign
// bit ~neg sits at column 2i+N+1, the "+1" that completes the negation (the
// neg bit itself) is added at column 2i, and the constant -sum_i 2^(2i+N+1)
// (mod 2^(2N)) is added as one more row. All of this is summed modulo 2^(2N),
// which holds the full unsigned product.
//
// The output is column-packed: pp[r][c] is the r-th bit of column c, for
// r < mult_pkg::col_height(N, c); the remaining slots are zero. Within a
// column the order is: row bits by increasing row, then the negate bit, then
// the constant bit. The reduction trees rely on the heights, not on the order.
// The document says only that the generator weights the rows by position; the
// sign handling and packing are this design's. Purely combinational.
module pp_generator
  import mult_pkg::*;
#(
  parameter int N = 16,                    // operand width
  localparam int D = N / 2 + 1,            // Booth digits = partial-product rows
  localparam int W = 2 * N,                // product / matrix width
  localparam int R = D + 2                 // matrix rows (tallest column)
) (
  input  logic [N-1:0] a,                  // multiplicand
  input  logic [D-1:0] one,                // Booth select lines per digit
  input  logic [D-1:0] two,
  input  logic [D-1:0] neg,
  output logic [W-1:0] pp [R]              // column-packed bit matrix
);

  // Row i before placement: N+2 bits, bit N+1 is the inverted sign.
  logic [N+1:0] row [D];

  always_comb begin
    for (int i = 0; i < D; i++) begin
      logic [N:0] mag;
      mag = ({(N+1){one[i]}} & {1'b0, a}) | ({(N+1){two[i]}} & {a, 1'b0});
      row[i] = {~neg[i], mag ^ {(N+1){neg[i]}}};
    end
  end

  always_comb begin
    int k;
    for (int r = 0; r < R; r++) pp[r] = '0;
    for (int c = 0; c < W; c++) begin
      k = 0;
      for (int i = 0; i < D; i++) begin
        if (c >= 2 * i && c <= 2 * i + N + 1) begin
          pp[k][c] = row[i][c-2*i];
          k++;
        end
      end
      if (c % 2 == 0 && c / 2 < D) begin
        pp[k][c] = neg[c/2];
        k++;
      end
      if (sign_const_bit(N, c)) begin
        pp[k][c] = 1'b1;
        k++;
      end
    end
  end

endmodule

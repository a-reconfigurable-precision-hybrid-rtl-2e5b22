// mult_pkg: types and elaboration-time helpers shared by the reconfigurable
// precision Booth multiplier.
//
// The multiplier recodes the N-bit unsigned multiplier operand into N/2+1
// radix-4 (modified Booth) digits. Each digit selects 0, +-A or +-2A, giving
// one partial-product row. The rows, a "negate" bit per row and a constant
// row that replaces the rows' sign extensions form a bit matrix of 2N columns.
// col_height() gives the number of bits in each column of that matrix; the
// partial-product generator fills the columns in the same order, and the
// three reduction trees read exactly that many bits per column.
//
// tree_schedule() works out, at elaboration time, how many full and half
// adders each reduction tree places in every column of every stage; the
// trees are generated from it, and tree_stages() / tree_adders() report the
// depth and adder count of each strategy.
//
// The three precision modes (N/4, N/2 and N bits, i.e. 4/8/16 for N = 16),
// the request encoding and the hybrid schedule (one Wallace stage, then Dadda
// stages) are choices of this design; the document names 8- and 16-bit modes
// and the three reduction strategies without fixing encodings.
package mult_pkg;

  // Operand precision actually used for one multiplication.
  typedef enum logic [1:0] {
    PREC_QUARTER = 2'd0,   // N/4 low bits of each operand (4 bits for N = 16)
    PREC_HALF    = 2'd1,   // N/2 low bits                  (8 bits)
    PREC_FULL    = 2'd2    // all N bits                    (16 bits)
  } prec_t;

  // Reduction tree that sums the partial products.
  typedef enum logic [1:0] {
    TREE_WALLACE = 2'd0,   // fastest: greedy 3:2 / 2:2 compression every stage
    TREE_DADDA   = 2'd1,   // fewest adders: compress only to the Dadda heights
    TREE_HYBRID  = 2'd2    // one Wallace stage, then Dadda stages
  } tree_t;

  // Performance requirement given by the application for the reduction.
  typedef enum logic [1:0] {
    REQ_AUTO     = 2'd0,   // the control unit decides from switching activity
    REQ_SPEED    = 2'd1,   // Wallace
    REQ_AREA     = 2'd2,   // Dadda
    REQ_BALANCED = 2'd3    // hybrid
  } req_t;

  // Operand bits kept in a precision mode.
  function automatic int prec_bits(int n, prec_t p);
    case (p)
      PREC_QUARTER: return n / 4;
      PREC_HALF:    return n / 2;
      default:      return n;
    endcase
  endfunction

  // Radix-4 Booth digits of an unsigned n-bit operand (one extra digit takes
  // the zero bits above the MSB).
  function automatic int booth_digits(int n);
    return n / 2 + 1;
  endfunction

  // Rows the matrix port must hold: the tallest column has one bit of every
  // partial product, a negate bit and a constant bit.
  function automatic int pp_rows(int n);
    return booth_digits(n) + 2;
  endfunction

  // Bit c of the sign-extension constant -sum_i 2^(2i+n+1) mod 2^(2n).
  function automatic bit sign_const_bit(int n, int c);
    longint unsigned acc;
    acc = 0;
    for (int i = 0; i < booth_digits(n); i++)
      if (2 * i + n + 1 < 2 * n) acc = acc + (64'd1 << (2 * i + n + 1));
    acc = (~acc) + 64'd1;
    return ((acc >> c) & 64'd1) != 64'd0;
  endfunction

  // Number of matrix bits in column c: partial-product rows covering c
  // (each row spans columns 2i .. 2i+n+1), the negate bit of row c/2 on even
  // columns, and the constant bit.
  function automatic int col_height(int n, int c);
    int h;
    h = 0;
    for (int i = 0; i < booth_digits(n); i++)
      if (c >= 2 * i && c <= 2 * i + n + 1) h++;
    if (c % 2 == 0 && c / 2 < booth_digits(n)) h++;
    if (sign_const_bit(n, c)) h++;
    return h;
  endfunction

  // Largest height of the Dadda sequence 2, 3, 4, 6, 9, 13, ... below h.
  function automatic int dadda_target(int h);
    int d, nd;
    d = 2;
    for (int k = 0; k < 16; k++) begin
      nd = (d * 3) / 2;
      if (nd < h) d = nd;
    end
    return d;
  endfunction

  // Limits of the schedule tables below: 2N <= SCHED_W, stages <= SCHED_S.
  localparam int SCHED_W = 64;
  localparam int SCHED_S = 10;

  // A per-stage, per-column count of a reduction schedule, flattened:
  // entry [s*SCHED_W + c] is stage s, column c.
  typedef int sched_t [(SCHED_S+1)*SCHED_W];

  // Reduction schedule of a tree on the n-bit Booth matrix.
  //   what = 0: height of column c at the input of stage s (s = stages: the
  //             final two rows)
  //   what = 1: full adders in column c at stage s
  //   what = 2: half adders in column c at stage s
  // Wiring convention shared by the trees: FA j of a column takes input bits
  // 3j..3j+2, the half adder the next two, the rest pass on. A column's next
  // height is: carries from the column below, then its own sums, then its
  // passed bits, in that order.
  //   Wallace: every stage, FA = h/3, one HA when h mod 3 = 2.
  //   Dadda:   target d = largest of 2,3,4,6,9,... below the tallest column;
  //            just enough FAs (and at most one HA) to bring the column,
  //            carries from below included, down to d.
  //   Hybrid:  stage 0 Wallace, later stages Dadda.
  function automatic sched_t tree_schedule(tree_t t, int n, int what);
    sched_t h, f, a;
    int w, mh, d, e, nf, nha, rem;
    h  = '{default: 0};
    f  = '{default: 0};
    a  = '{default: 0};
    w  = 2 * n;
    for (int c = 0; c < w; c++) h[c] = col_height(n, c);
    for (int s = 0; s < SCHED_S; s++) begin
      mh = 0;
      for (int c = 0; c < w; c++) if (h[s*SCHED_W + c] > mh) mh = h[s*SCHED_W + c];
      if (mh > 2) begin
        d  = dadda_target(mh);
        for (int c = 0; c < w; c++) begin
          if (t == TREE_WALLACE || (t == TREE_HYBRID && s == 0)) begin
            nf  = h[s*SCHED_W + c] / 3;
            rem = h[s*SCHED_W + c] % 3;
            nha = (rem == 2) ? 1 : 0;
          end else begin
            // h[(s+1)*SCHED_W + c] so far holds the carries from column c-1
            e   = h[s*SCHED_W + c] + h[(s+1)*SCHED_W + c] - d;
            nf  = 0;
            nha = 0;
            if (e > 0) begin
              nf  = e / 2;
              nha = e % 2;
            end
            if (3 * nf + 2 * nha > h[s*SCHED_W + c]) begin
              nf  = h[s*SCHED_W + c] / 3;
              nha = (h[s*SCHED_W + c] % 3 == 2) ? 1 : 0;
            end
          end
          f[s*SCHED_W + c] = nf;
          a[s*SCHED_W + c] = nha;
          h[(s+1)*SCHED_W + c] += h[s*SCHED_W + c] - 2 * nf - nha;
          if (c + 1 < w) h[(s+1)*SCHED_W + c+1] += nf + nha;
        end
      end
    end
    case (what)
      1:       return f;
      2:       return a;
      default: return h;
    endcase
  endfunction

  // Number of reduction stages of a tree.
  function automatic int tree_stages(tree_t t, int n);
    sched_t h;
    int ns;
    h  = tree_schedule(t, n, 0);
    ns = 0;
    for (int s = 0; s < SCHED_S; s++)
      for (int c = 0; c < SCHED_W; c++)
        if (h[s*SCHED_W + c] > 2) ns = s + 1;
    return ns;
  endfunction

  // Total full adders (what = 1) or half adders (what = 2) of a tree.
  function automatic int tree_adders(tree_t t, int n, int what);
    sched_t x;
    int sum;
    x   = tree_schedule(t, n, what);
    sum = 0;
    for (int s = 0; s < SCHED_S; s++)
      for (int c = 0; c < SCHED_W; c++) sum += x[s*SCHED_W + c];
    return sum;
  endfunction

endpackage

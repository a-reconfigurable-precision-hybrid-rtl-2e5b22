// dadda_tree: Dadda reduction of the Booth partial-product matrix to two rows.
//
// Each stage has a target height taken from the Dadda sequence 2, 3, 4, 6, 9,
// 13, ... (the largest value below the current tallest column). Columns are
// processed from the LSB up; a column uses only as many full adders (each
// removes two bits) and at most one half adder (removes one bit) as it needs
// to reach the target once the carries from the column below are counted.
// Uncompressed bits pass on unchanged. This uses the fewest adders of the
// three trees. The document gives the strategy ("fewer hardware resources");
// the stage rule is the classic Dadda one. A carry out of the top column is
// dropped (result modulo 2^(2N)).
//
// Interface and timing as wallace_tree: pp column-packed, en low forces the
// inputs to zero, row_a + row_b equals the matrix sum. Combinational.
//
// Structure: the tree is generated from mult_pkg::tree_schedule(), which
// fixes at elaboration time how many full and half adders sit in each column
// of each stage; g_lvl[s] holds the bits entering stage s. The carry outputs
// of adders in the top column are deliberately left unconnected (their
// weight is 2^(2N)), which lint reports as empty pin connections.
module dadda_tree
  import mult_pkg::*;
#(
  parameter int N = 16,                    // operand width
  localparam int W = 2 * N,                // matrix width
  localparam int R = N / 2 + 3,            // matrix rows
  localparam tree_t KIND = TREE_DADDA
) (
  input  logic         en,                 // operand isolation enable
  input  logic [W-1:0] pp [R],             // column-packed matrix
  output logic [W-1:0] row_a,              // two reduced rows
  output logic [W-1:0] row_b
);


  localparam sched_t H  = tree_schedule(KIND, N, 0);    // column heights
  localparam sched_t F  = tree_schedule(KIND, N, 1);    // full adders
  localparam sched_t A  = tree_schedule(KIND, N, 2);    // half adders
  localparam int     S  = tree_stages(KIND, N);         // reduction stages

  if (W > SCHED_W || S >= SCHED_S) begin : g_too_big
    $error("dadda_tree: N too large for the schedule tables of mult_pkg");
  end

  // g_lvl[s].v[c][r]: bit r of column c at the input of stage s;
  // g_lvl[S] holds the two result rows
  for (genvar s = 0; s <= S; s++) begin : g_lvl
    wire [R-1:0] v [W];
  end

  for (genvar c = 0; c < W; c++) begin : g_in
    for (genvar r = 0; r < R; r++) begin : g_bit
      if (r < H[c]) begin : g_used
        assign g_lvl[0].v[c][r] = pp[r][c] & en;
      end else begin : g_empty
        assign g_lvl[0].v[c][r] = 1'b0;
      end
    end
  end

  for (genvar s = 0; s < S; s++) begin : g_stage
    for (genvar c = 0; c < W; c++) begin : g_col
      // carries arriving from column c-1 come first in the next level
      localparam int CI = (c > 0) ? F[s*SCHED_W + c-1] + A[s*SCHED_W + c-1] : 0;
      localparam int NF = F[s*SCHED_W + c];
      localparam int NA = A[s*SCHED_W + c];
      localparam int NP = H[s*SCHED_W + c] - 3 * NF - 2 * NA;   // bits passed on
      localparam int HO = CI + NF + NA + NP;                    // next height
      // carries go to the bottom of column c+1; a carry out of the top
      // column is dropped (result modulo 2^(2N))
      for (genvar j = 0; j < NF; j++) begin : g_fa
        if (c + 1 < W) begin : g_c
          full_adder u_fa (
            .x(g_lvl[s].v[c][3*j]), .y(g_lvl[s].v[c][3*j+1]), .z(g_lvl[s].v[c][3*j+2]),
            .s(g_lvl[s+1].v[c][CI+j]), .co(g_lvl[s+1].v[c+1][j])
          );
        end else begin : g_top
          full_adder u_fa (
            .x(g_lvl[s].v[c][3*j]), .y(g_lvl[s].v[c][3*j+1]), .z(g_lvl[s].v[c][3*j+2]),
            .s(g_lvl[s+1].v[c][CI+j]), .co()
          );
        end
      end
      if (NA > 0) begin : g_ha
        if (c + 1 < W) begin : g_c
          half_adder u_ha (
            .x(g_lvl[s].v[c][3*NF]), .y(g_lvl[s].v[c][3*NF+1]),
            .s(g_lvl[s+1].v[c][CI+NF]), .co(g_lvl[s+1].v[c+1][NF])
          );
        end else begin : g_top
          half_adder u_ha (
            .x(g_lvl[s].v[c][3*NF]), .y(g_lvl[s].v[c][3*NF+1]),
            .s(g_lvl[s+1].v[c][CI+NF]), .co()
          );
        end
      end
      for (genvar p = 0; p < NP; p++) begin : g_pass
        assign g_lvl[s+1].v[c][CI+NF+NA+p] = g_lvl[s].v[c][3*NF+2*NA+p];
      end
      for (genvar r = HO; r < R; r++) begin : g_empty
        assign g_lvl[s+1].v[c][r] = 1'b0;
      end
    end
  end

  for (genvar c = 0; c < W; c++) begin : g_out
    assign row_a[c] = g_lvl[S].v[c][0];
    assign row_b[c] = g_lvl[S].v[c][1];
  end

endmodule

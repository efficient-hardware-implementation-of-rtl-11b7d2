// dct_stage - one multiplierless 1D 8-point transform applied to all eight
// columns of an 8x8 block at once, giving 64 results per clock cycle.
//
// Forward (INVERSE = 0): Z[k][j] = sum_n C[k][n] * X[n][j]
// Inverse (INVERSE = 1): Z[n][j] = sum_k C[k][n] * X[k][j]
// with C the integer DCT matrix of dct_pkg. Every element X[m][j] goes through
// one const_mult (shift-and-add, no multipliers); each result is then a signed
// sum of eight of those products, selected by the matrix entry's magnitude
// and sign, rounded, shifted right and saturated to 16 bits.
//
// The block is written out transposed (out[j][i] = Z[i][j]): the transform
// register that follows then already holds the operand of the second pass,
// so the same stage computes C*X*C^T (or C^T*Y*C) in two passes. The right
// shift is SHIFT1 in the first pass and SHIFT2 in the second, chosen by
// pass_i. Purely combinational; sat_o flags that at least one result was
// saturated.
//
// The direct matrix form and the 64-in-parallel organisation follow the
// published DCT/IDCT modules; the shift amounts, rounding and 16-bit
// saturation are this design's own choices (the VVC conventions).
module dct_stage
  import dct_pkg::*;
#(
  parameter bit          INVERSE = 1'b0,
  parameter int unsigned SHIFT1  = FWD_SHIFT1,
  parameter int unsigned SHIFT2  = FWD_SHIFT2
) (
  input  coef_blk_t blk_i,   // X, row-major
  input  logic      pass_i,  // 0: first pass, 1: second pass
  output coef_blk_t blk_o,   // Z transposed, row-major
  output logic      sat_o
);

  localparam int unsigned PW = COEF_W + 7;   // product width
  localparam int unsigned AW = PW + 3;       // sum of eight products

  logic signed [PW-1:0] prod [NN][NUM_MAGS];

  for (genvar e = 0; e < NN; e++) begin : g_mcm
    const_mult #(.IN_W(COEF_W)) u_mult (
      .x    (blk_i[e]),
      .prod (prod[e])
    );
  end

  localparam logic signed [AW-1:0] RND1 = AW'(1) <<< (SHIFT1 - 1);
  localparam logic signed [AW-1:0] RND2 = AW'(1) <<< (SHIFT2 - 1);
  localparam logic signed [AW-1:0] OMAX = AW'(2**(COEF_W-1) - 1);
  localparam logic signed [AW-1:0] OMIN = -AW'(2**(COEF_W-1));

  logic [NN-1:0] sat;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic signed [AW-1:0] term [N];
      logic signed [AW-1:0] acc, sh;

      // Signed product of matrix entry (i, m) with operand element (m, j).
      for (genvar m = 0; m < N; m++) begin : g_term
        localparam int C  = INVERSE ? cmat(m, i) : cmat(i, m);
        localparam int MI = mag_idx(C);
        if (C < 0) begin : g_neg
          assign term[m] = -AW'(prod[m*N+j][MI]);
        end else begin : g_pos
          assign term[m] = AW'(prod[m*N+j][MI]);
        end
      end

      always_comb begin
        acc = '0;
        for (int m = 0; m < N; m++) acc = acc + term[m];
        sh = pass_i ? ((acc + RND2) >>> SHIFT2) : ((acc + RND1) >>> SHIFT1);
        sat[j*N+i] = 1'b1;
        if (sh > OMAX)      blk_o[j*N+i] = OMAX[COEF_W-1:0];
        else if (sh < OMIN) blk_o[j*N+i] = OMIN[COEF_W-1:0];
        else begin
          blk_o[j*N+i] = sh[COEF_W-1:0];
          sat[j*N+i]   = 1'b0;
        end
      end
    end
  end

  assign sat_o = |sat;

endmodule

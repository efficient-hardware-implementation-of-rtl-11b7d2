// dct_pkg - shared types and constants of the 8x8 DCT / IDCT datapath.
//
// The transform matrix is the 8-point integer DCT-II used by VVC (and HEVC):
// every entry is one of +-64, +-89, +-83, +-75, +-50, +-36, +-18, i.e. the
// rounded value of 64*sqrt(2)*sqrt(2/8)*cos(pi*(2n+1)k/16) scaled to 7 bits
// (row 0 is 64 everywhere). The rows are nearly orthogonal with squared norm
// 2^15, so C * C^T ~= 2^15 * I; a forward 2D transform followed by an
// inverse one therefore needs a total right shift of 30 bits, split over the
// four 1D passes (2, 9, 7, 12 for 8-bit pixels, the same split VVC uses).
//
// A block is held as a packed array of 64 elements in row-major order:
// element [r*8+c] is row r, column c of the 8x8 block.
package dct_pkg;

  localparam int unsigned N        = 8;       // transform size
  localparam int unsigned NN       = N * N;   // elements per block
  localparam int unsigned PIX_W    = 8;       // pixel width
  localparam int unsigned COEF_W   = 16;      // coefficient / intermediate width
  localparam int unsigned NUM_MAGS = 7;       // distinct coefficient magnitudes

  // Right shifts of the four 1D passes (with rounding).
  localparam int unsigned FWD_SHIFT1 = 2;
  localparam int unsigned FWD_SHIFT2 = 9;
  localparam int unsigned INV_SHIFT1 = 7;
  localparam int unsigned INV_SHIFT2 = 12;

  typedef logic        [PIX_W-1:0]  pixel_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef pixel_t [NN-1:0] pix_blk_t;    // 64 pixels = 512 bits
  typedef coef_t  [NN-1:0] coef_blk_t;   // 64 coefficients

  // Coefficient magnitude for an angle of q*pi/16, q = 1..7 (q = 0, the DC
  // row, is 64 like q = 4). Index order of the products of const_mult:
  // 0:64 1:89 2:83 3:75 4:50 5:36 6:18.
  function automatic int mag_of_idx(input int i);
    case (i)
      0:       return 64;
      1:       return 89;
      2:       return 83;
      3:       return 75;
      4:       return 50;
      5:       return 36;
      default: return 18;
    endcase
  endfunction

  // Transform matrix entry C[k][n] = round(64*sqrt(2)*cos(pi*(2n+1)k/16))
  // for k > 0, and 64 for k = 0 (k = frequency, n = sample).
  function automatic int cmat(input int k, input int n);
    int q;
    int sgn;
    if (k == 0) return 64;
    q   = ((2 * n + 1) * k) % 32;   // angle q*pi/16, cosine has period 32
    if (q > 16) q = 32 - q;         // cos(2pi - t) = cos(t)
    sgn = 1;
    if (q > 8) begin                // cos(pi - t) = -cos(t)
      q   = 16 - q;
      sgn = -1;
    end
    case (q)
      1:       return sgn * 89;
      2:       return sgn * 83;
      3:       return sgn * 75;
      4:       return sgn * 64;
      5:       return sgn * 50;
      6:       return sgn * 36;
      default: return sgn * 18;
    endcase
  endfunction

  // Index of |c| in the product order of const_mult.
  function automatic int mag_idx(input int c);
    case ((c < 0) ? -c : c)
      64:      return 0;
      89:      return 1;
      83:      return 2;
      75:      return 3;
      50:      return 4;
      36:      return 5;
      default: return 6;
    endcase
  endfunction

endpackage

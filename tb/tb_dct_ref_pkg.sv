// tb_dct_ref_pkg - reference model of the integer 8x8 DCT/IDCT for the
// testbenches. It uses ordinary multiplication with a transform matrix
// typed in here, independently of the shift-and-add datapath and of the
// matrix functions of dct_pkg, plus the same rounding, shift and
// saturation rules the design specifies:
//   pass result = sat16((sum + 2^(s-1)) >>> s), written transposed.
package tb_dct_ref_pkg;

  typedef int blk_t [64];

  localparam int REF_C [8][8] = '{
    '{ 64,  64,  64,  64,  64,  64,  64,  64},
    '{ 89,  75,  50,  18, -18, -50, -75, -89},
    '{ 83,  36, -36, -83, -83, -36,  36,  83},
    '{ 75, -18, -89, -50,  50,  89,  18, -75},
    '{ 64, -64, -64,  64,  64, -64, -64,  64},
    '{ 50, -89,  18,  75, -75, -18,  89, -50},
    '{ 36, -83,  83, -36, -36,  83, -83,  36},
    '{ 18, -50,  75, -89,  89, -75,  50, -18}
  };

  function automatic int sat16(input longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic bit would_sat(input longint v);
    return (v > 32767) || (v < -32768);
  endfunction

  // One pass; returns the transposed result and flags saturation.
  function automatic void ref_pass(input blk_t x, input bit inverse, input int s,
                                   output blk_t y, output bit sat);
    longint acc, sh;
    sat = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        acc = 0;
        for (int m = 0; m < 8; m++)
          acc += longint'(inverse ? REF_C[m][i] : REF_C[i][m]) * longint'(x[m*8+j]);
        sh = (acc + (longint'(1) << (s - 1))) >>> s;
        if (would_sat(sh)) sat = 1;
        y[j*8+i] = sat16(sh);
      end
  endfunction

  function automatic void ref_dct2d(input blk_t x, output blk_t y, output bit sat);
    blk_t t;
    bit s1, s2;
    ref_pass(x, 0, 2, t, s1);
    ref_pass(t, 0, 9, y, s2);
    sat = s1 | s2;
  endfunction

  // Inverse; the result is clipped to 0..255, clip reports a clipped pixel.
  function automatic void ref_idct2d(input blk_t x, output blk_t y, output bit sat,
                                     output bit clip);
    blk_t t;
    bit s1, s2;
    ref_pass(x, 1, 7, t, s1);
    ref_pass(t, 1, 12, y, s2);
    sat  = s1 | s2;
    clip = 0;
    for (int e = 0; e < 64; e++) begin
      if (y[e] < 0)   begin y[e] = 0;   clip = 1; end
      if (y[e] > 255) begin y[e] = 255; clip = 1; end
    end
  endfunction

endpackage

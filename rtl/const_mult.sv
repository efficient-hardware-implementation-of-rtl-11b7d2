// const_mult - multiplierless constant multiplication of one sample.
//
// Produces x*64, x*89, x*83, x*75, x*50, x*36 and x*18 (the seven
// magnitudes of the 8-point DCT matrix, in the index order of dct_pkg::mag_idx)
// using only shifts, additions and subtractions, in the spirit of the
// shift-and-add transform that replaces every multiplier of the design.
// Partial terms are shared between the constants:
//   18x = 16x + 2x          36x = 18x << 1        50x = 32x + 18x
//   83x = 64x + 18x + x     75x = 83x - 8x        89x = 83x + 4x + 2x
// The sharing scheme is this design's own choice; the published architecture only states
// constant products are formed by adding and shifting.
//
// Purely combinational. Interface: signed input x (IN_W bits), seven signed
// products of IN_W+7 bits.
module const_mult #(
  parameter int unsigned IN_W = 16
) (
  input  logic signed [IN_W-1:0]   x,
  output logic signed [IN_W+6:0]   prod [dct_pkg::NUM_MAGS]
);

  localparam int unsigned PW = IN_W + 7;

  logic signed [PW-1:0] xe, p18, p36, p50, p64, p75, p83, p89;

  always_comb begin
    xe  = PW'(x);
    p64 = xe <<< 6;
    p18 = (xe <<< 4) + (xe <<< 1);
    p36 = p18 <<< 1;
    p50 = (xe <<< 5) + p18;
    p83 = p64 + p18 + xe;
    p75 = p83 - (xe <<< 3);
    p89 = p83 + (xe <<< 2) + (xe <<< 1);
    prod[0] = p64;
    prod[1] = p89;
    prod[2] = p83;
    prod[3] = p75;
    prod[4] = p50;
    prod[5] = p36;
    prod[6] = p18;
  end

endmodule

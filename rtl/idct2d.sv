// idct2d - 8x8 inverse 2D DCT with one shared multiplierless 1D stage.
//
// A block of 64 signed 16-bit coefficients is taken on the input handshake.
// The first cycle runs the inverse stage on the input (shift 7) and stores
// the transposed result in the transpose register; the second cycle runs the
// same stage on that register (shift 12), giving X = C^T*Y*C, which is
// clipped to 0..255 and stored in the 64 8-bit output registers. Sharing
// the stage over both dimensions through a multiplexer follows the published
// design; control, handshake, scaling and the final clip are this design's
// own choices.
//
// Timing: one block every two cycles; out_valid_o rises two cycles after a
// block is accepted. clip_o pulses when an output pixel was clipped, sat_o
// when a pass saturated to 16 bits.
module idct2d
  import dct_pkg::*;
#(
  parameter int unsigned TAG_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid_i,
  output logic             in_ready_o,
  input  coef_blk_t        in_blk_i,
  input  logic [TAG_W-1:0] in_tag_i,
  output logic             out_valid_o,
  input  logic             out_ready_i,
  output pix_blk_t         out_blk_o,
  output logic [TAG_W-1:0] out_tag_o,
  output logic             stall_o,
  output logic             sat_o,
  output logic             clip_o
);

  logic      pass, load_t, load_out, stage_sat, any_clip;
  coef_blk_t stage_in, stage_out, t_q;
  pix_blk_t  pix_clip;

  two_pass_ctrl #(.TAG_W(TAG_W)) u_ctrl (
    .clk, .rst_n,
    .in_valid_i, .in_ready_o, .in_tag_i,
    .out_valid_o, .out_ready_i, .out_tag_o,
    .pass_o     (pass),
    .load_t_o   (load_t),
    .load_out_o (load_out),
    .stall_o
  );

  assign stage_in = pass ? t_q : in_blk_i;

  dct_stage #(.INVERSE(1'b1), .SHIFT1(INV_SHIFT1), .SHIFT2(INV_SHIFT2)) u_stage (
    .blk_i  (stage_in),
    .pass_i (pass),
    .blk_o  (stage_out),
    .sat_o  (stage_sat)
  );

  // Clip the reconstructed samples to the 8-bit pixel range.
  always_comb begin
    any_clip = 1'b0;
    for (int e = 0; e < NN; e++) begin
      if (stage_out[e] < 0) begin
        pix_clip[e] = '0;
        any_clip    = 1'b1;
      end else if (stage_out[e] > 255) begin
        pix_clip[e] = '1;
        any_clip    = 1'b1;
      end else begin
        pix_clip[e] = stage_out[e][PIX_W-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q       <= '0;
      out_blk_o <= '0;
    end else begin
      if (load_t)   t_q       <= stage_out;
      if (load_out) out_blk_o <= pix_clip;
    end
  end

  assign sat_o  = stage_sat && (load_t || load_out);
  assign clip_o = any_clip && load_out;

endmodule

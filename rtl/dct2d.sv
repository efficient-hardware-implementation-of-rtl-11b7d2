// dct2d - 8x8 forward 2D DCT with one shared multiplierless 1D stage.
//
// A block of 64 unsigned 8-bit pixels is taken on the input handshake. In
// the first cycle the input multiplexer feeds the pixels to dct_stage, whose
// transposed column transform (shift 2) is stored in the 64-entry transpose
// register. In the second cycle the multiplexer feeds that register back
// through the same stage (shift 9), and the 64 signed 16-bit coefficients
// Y = C*X*C^T are stored in the output register. Reusing one stage for both
// dimensions (two of the four transform stages of a DCT/IDCT pair, instead
// of four) follows the published architecture; the stage control, handshake and
// scaling are this design's own (see two_pass_ctrl, dct_stage).
//
// Timing: one block every two cycles; out_valid_o rises two cycles after a
// block is accepted. sat_o pulses when a pass saturated a result.
module dct2d
  import dct_pkg::*;
#(
  parameter int unsigned TAG_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid_i,
  output logic             in_ready_o,
  input  pix_blk_t         in_blk_i,
  input  logic [TAG_W-1:0] in_tag_i,
  output logic             out_valid_o,
  input  logic             out_ready_i,
  output coef_blk_t        out_blk_o,
  output logic [TAG_W-1:0] out_tag_o,
  output logic             stall_o,
  output logic             sat_o
);

  logic      pass, load_t, load_out, stage_sat;
  coef_blk_t stage_in, stage_out, t_q;

  two_pass_ctrl #(.TAG_W(TAG_W)) u_ctrl (
    .clk, .rst_n,
    .in_valid_i, .in_ready_o, .in_tag_i,
    .out_valid_o, .out_ready_i, .out_tag_o,
    .pass_o     (pass),
    .load_t_o   (load_t),
    .load_out_o (load_out),
    .stall_o
  );

  // Input multiplexer: pixels (pass 0) or transposed intermediate (pass 1).
  always_comb begin
    for (int e = 0; e < NN; e++)
      stage_in[e] = pass ? t_q[e] : coef_t'({1'b0, in_blk_i[e]});
  end

  dct_stage #(.INVERSE(1'b0), .SHIFT1(FWD_SHIFT1), .SHIFT2(FWD_SHIFT2)) u_stage (
    .blk_i  (stage_in),
    .pass_i (pass),
    .blk_o  (stage_out),
    .sat_o  (stage_sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q       <= '0;
      out_blk_o <= '0;
    end else begin
      if (load_t)   t_q       <= stage_out;
      if (load_out) out_blk_o <= stage_out;
    end
  end

  assign sat_o = stage_sat && (load_t || load_out);

endmodule

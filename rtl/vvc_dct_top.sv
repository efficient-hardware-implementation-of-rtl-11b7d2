// vvc_dct_top - image memory, block fetch, 8x8 forward DCT and 8x8 inverse
// DCT of a VVC-style transform path, wired as one stream.
//
// The image (512x512 8-bit pixels by default) is first written into
// image_ram one pixel per cycle through the load port; pixel address p is
// pixel (p % 8) of row (p / 8) % 8 of 8x8 block p / 64. A pulse on start_i
// then makes block_reader fetch every block in order, 512 bits at a time,
// into 64 input registers. dct2d turns each block into 64 coefficients,
// which are both offered on the coef_* observation port (they are what a
// codec would quantise and send) and passed to idct2d, which rebuilds the
// 64 pixels and presents them, with the block number, on the pix_* port.
// Both transforms use one shared multiplierless 1D stage over two passes.
//
// Timing: one block every two cycles in steady state; a block appears on
// pix_* six cycles after its read is issued. pix_ready_i may stall the
// whole stream. done_o pulses when the last block has been taken on pix_*.
// stall/sat/clip outputs report internal events for monitoring.
module vvc_dct_top
  import dct_pkg::*;
#(
  parameter int unsigned NUM_PIXELS = 262144,
  localparam int unsigned NUM_BLOCKS = NUM_PIXELS / NN,
  localparam int unsigned WA_W       = $clog2(NUM_PIXELS),
  localparam int unsigned BA_W       = $clog2(NUM_BLOCKS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // image load port
  input  logic            wr_en_i,
  input  logic [WA_W-1:0] wr_addr_i,
  input  pixel_t          wr_data_i,
  // control
  input  logic            start_i,
  output logic            busy_o,
  output logic            done_o,
  output logic            fetch_done_o,  // last block handed to the DCT
  // transform coefficients (observation only)
  output logic            coef_valid_o,
  output coef_blk_t       coef_blk_o,
  output logic [BA_W-1:0] coef_tag_o,
  // reconstructed blocks
  output logic            pix_valid_o,
  input  logic            pix_ready_i,
  output pix_blk_t        pix_blk_o,
  output logic [BA_W-1:0] pix_tag_o,
  // events
  output logic            dct_stall_o,
  output logic            idct_stall_o,
  output logic            sat_o,
  output logic            clip_o
);

  logic            rd_en;
  logic [BA_W-1:0] rd_addr;
  pix_blk_t        rd_data;

  logic            rdr_valid, rdr_ready;
  pix_blk_t        rdr_blk;
  logic [BA_W-1:0] rdr_tag;

  logic            dct_valid, dct_ready;
  logic            dct_sat, idct_sat;

  image_ram #(.NUM_PIXELS(NUM_PIXELS), .PIX_W(PIX_W), .RD_W(NN * PIX_W)) u_ram (
    .clk,
    .wr_en_i, .wr_addr_i, .wr_data_i,
    .rd_en_i   (rd_en),
    .rd_addr_i (rd_addr),
    .rd_data_o (rd_data)
  );

  block_reader #(.NUM_BLOCKS(NUM_BLOCKS)) u_reader (
    .clk, .rst_n, .start_i,
    .busy_o      (),
    .done_o      (fetch_done_o),
    .rd_en_o     (rd_en),
    .rd_addr_o   (rd_addr),
    .rd_data_i   (rd_data),
    .out_valid_o (rdr_valid),
    .out_ready_i (rdr_ready),
    .out_blk_o   (rdr_blk),
    .out_tag_o   (rdr_tag)
  );

  dct2d #(.TAG_W(BA_W)) u_dct (
    .clk, .rst_n,
    .in_valid_i  (rdr_valid),
    .in_ready_o  (rdr_ready),
    .in_blk_i    (rdr_blk),
    .in_tag_i    (rdr_tag),
    .out_valid_o (dct_valid),
    .out_ready_i (dct_ready),
    .out_blk_o   (coef_blk_o),
    .out_tag_o   (coef_tag_o),
    .stall_o     (dct_stall_o),
    .sat_o       (dct_sat)
  );

  assign coef_valid_o = dct_valid && dct_ready;

  idct2d #(.TAG_W(BA_W)) u_idct (
    .clk, .rst_n,
    .in_valid_i  (dct_valid),
    .in_ready_o  (dct_ready),
    .in_blk_i    (coef_blk_o),
    .in_tag_i    (coef_tag_o),
    .out_valid_o (pix_valid_o),
    .out_ready_i (pix_ready_i),
    .out_blk_o   (pix_blk_o),
    .out_tag_o   (pix_tag_o),
    .stall_o     (idct_stall_o),
    .sat_o       (idct_sat),
    .clip_o
  );

  assign sat_o = dct_sat || idct_sat;

  // Busy from start until the last reconstructed block has been taken.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_o <= 1'b0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_o) busy_o <= 1'b1;
      if (pix_valid_o && pix_ready_i && pix_tag_o == BA_W'(NUM_BLOCKS - 1)) begin
        busy_o <= 1'b0;
        done_o <= 1'b1;
      end
    end
  end

endmodule

// tb_vvc_dct_top - end-to-end test of the whole transform path at its
// default size: a synthetic 512x512 image (gradients, noise, flat white and
// a 0/255 checkerboard) is written into the image memory pixel by pixel,
// then processed twice.
//   Run 1: the consumer of reconstructed blocks stalls at random. Every
//          coefficient block and every reconstructed block is compared with
//          the multiplication-based reference, and every reconstructed
//          block with the original pixels (lossy: small error allowed).
//          Block 1397 is also reported explicitly.
//   Run 2: consumer always ready; the run must take two cycles per block
//          plus the pipeline latency.
// Each mechanism of the design must occur: back-pressure stalls in the DCT
// and in the IDCT, and pixel clipping. The two-pass reuse of each stage is
// what produces every coefficient and pixel block, and the timed run checks
// its rate of one block per two cycles.
module tb_vvc_dct_top;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;
  localparam int W = 512, H = 512;
  localparam int NB = W * H / 64;
  localparam int MAX_ERR = 6;      // allowed |reconstructed - original|

  logic clk = 0, rst_n = 0;
  logic wr_en, start, busy, done, fetch_done, coef_valid, pix_valid, pix_ready;
  logic [17:0] wr_addr;
  pixel_t wr_data;
  coef_blk_t coef_blk;
  pix_blk_t pix_blk;
  logic [11:0] coef_tag, pix_tag;
  logic dct_stall, idct_stall, sat, clip;

  int checks = 0, failures = 0, cycle = 0;
  int n_dct_stall = 0, n_idct_stall = 0, n_sat = 0, n_clip = 0;
  int n_coef = 0, n_pix = 0, n_done = 0, max_err = 0;
  byte unsigned img [W*H];

  vvc_dct_top dut (
    .clk, .rst_n,
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .start_i(start), .busy_o(busy), .done_o(done), .fetch_done_o(fetch_done),
    .coef_valid_o(coef_valid), .coef_blk_o(coef_blk), .coef_tag_o(coef_tag),
    .pix_valid_o(pix_valid), .pix_ready_i(pix_ready), .pix_blk_o(pix_blk), .pix_tag_o(pix_tag),
    .dct_stall_o(dct_stall), .idct_stall_o(idct_stall), .sat_o(sat), .clip_o(clip));

  always #5 clk = ~clk;

  function automatic int pix_addr(input int x, input int y);
    return ((y / 8) * (W / 8) + x / 8) * 64 + (y % 8) * 8 + x % 8;
  endfunction

  function automatic blk_t orig_block(input int b);
    blk_t o;
    int bx, by;
    bx = b % (W / 8);
    by = b / (W / 8);
    for (int e = 0; e < 64; e++) o[e] = int'(img[(by * 8 + e / 8) * W + bx * 8 + e % 8]);
    return o;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (dct_stall) n_dct_stall++;
      if (idct_stall) n_idct_stall++;
      if (sat) n_sat++;
      if (clip) n_clip++;
      if (done) n_done++;
      if (coef_valid) begin
        blk_t y;
        bit s;
        int bad;
        ref_dct2d(orig_block(int'(coef_tag)), y, s);
        bad = 0;
        for (int e = 0; e < 64; e++) if (int'(coef_blk[e]) != y[e]) bad++;
        checks++;
        if (bad != 0 || int'(coef_tag) != n_coef % NB) begin
          failures++;
          if (failures < 10) $display("FAIL coefficients of block %0d (%0d wrong)", coef_tag, bad);
        end
        n_coef++;
      end
      if (pix_valid && pix_ready) begin
        blk_t o, y, r;
        bit s, c;
        int bad, err;
        o = orig_block(int'(pix_tag));
        ref_dct2d(o, y, s);
        ref_idct2d(y, r, s, c);
        bad = 0;
        for (int e = 0; e < 64; e++) begin
          if (int'(pix_blk[e]) != r[e]) bad++;
          err = int'(pix_blk[e]) - o[e];
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
        end
        checks += 2;
        if (bad != 0 || int'(pix_tag) != n_pix % NB) begin
          failures++;
          if (failures < 10) $display("FAIL reconstruction of block %0d (%0d wrong)", pix_tag, bad);
        end
        if (max_err > MAX_ERR) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d differs from the original by %0d", pix_tag, max_err);
        end
        if (pix_tag == 12'd1397 && n_pix < NB) begin
          $write("block 1397 in :");
          for (int e = 56; e < 64; e++) $write(" %0d", o[e]);
          $write("\nblock 1397 out:");
          for (int e = 56; e < 64; e++) $write(" %0d", pix_blk[e]);
          $write("  (last row)\n");
        end
        n_pix++;
      end
    end
  end

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    // synthetic image
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        if (y < 128)      v = (x + y) / 3;                                  // smooth ramp
        else if (y < 256) v = 128 + int'($urandom_range(40)) - 20 + (x % 64); // texture
        else if (y < 320) v = 255;                                          // flat white
        else if (y < 384) v = (((x + y) % 2) != 0) ? 255 : 0;               // checkerboard
        else              v = 60 + ((x / 16 + y / 16) % 2) * 120;           // large squares
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[y * W + x] = 8'(v);
      end
    wr_en = 0; wr_addr = 0; wr_data = 0; start = 0; pix_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load through the pixel write port
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 18'(pix_addr(x, y)); wr_data = img[y * W + x];
      end
    @(negedge clk);
    wr_en = 0;
    // run 1: random back-pressure
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      pix_ready = ($urandom_range(3) != 0);
      @(negedge clk);
    end
    pix_ready = 1;
    repeat (10) @(negedge clk);
    // run 2: no back-pressure, timed
    start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t1 = cycle;
    repeat (5) @(negedge clk);

    checks += 4;
    if (n_pix != 2 * NB || n_coef != 2 * NB || n_done != 2) begin
      failures++;
      $display("FAIL counts: pix=%0d coef=%0d done=%0d", n_pix, n_coef, n_done);
    end
    if (t1 - t0 != 2 * NB + 6) begin
      failures++;
      $display("FAIL unstalled run took %0d cycles, expected %0d", t1 - t0, 2 * NB + 6);
    end
    if (n_dct_stall == 0 || n_idct_stall == 0) begin
      failures++;
      $display("FAIL a stall never happened");
    end
    if (n_clip == 0) begin
      failures++;
      $display("FAIL clipping never happened");
    end
    $display("blocks=%0d run2_cycles=%0d max_err=%0d dct_stalls=%0d idct_stalls=%0d clips=%0d sats=%0d",
             n_pix, t1 - t0, max_err, n_dct_stall, n_idct_stall, n_clip, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

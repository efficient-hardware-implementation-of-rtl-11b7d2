// tb_idct2d - streams coefficient blocks through the inverse 2D DCT with
// random input valid and output ready, and compares every reconstructed
// pixel block, in order, with the multiplication-based reference. The
// blocks are forward transforms of random pixels (the normal case), random
// mid-range coefficients (which drive pixels out of 0..255 and so exercise
// the clip) and full-range coefficients (which saturate the first pass). With no back-pressure it also checks the rate (one block per
// two cycles) and the latency (out_valid two cycles after acceptance).
module tb_idct2d;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;
  localparam int TAG_W = 10;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, stall, sat, clip;
  int sat_n = 0, clip_n = 0;
  coef_blk_t in_blk;
  pix_blk_t out_blk;
  logic [TAG_W-1:0] in_tag, out_tag;
  int checks = 0, failures = 0, stalls = 0, cycle = 0;
  blk_t exp_q [$];
  int   acc_cycle [int];
  int   n_in = 0, n_out = 0;
  bit   free_run = 0;

  idct2d #(.TAG_W(TAG_W)) dut (
    .clk, .rst_n,
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_blk_i(in_blk), .in_tag_i(in_tag),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_blk_o(out_blk), .out_tag_o(out_tag),
    .stall_o(stall), .sat_o(sat), .clip_o(clip));

  always #5 clk = ~clk;

  task automatic new_block(input int kind);
    blk_t x, y;
    bit s;
    for (int e = 0; e < 64; e++) x[e] = int'($urandom_range(255));
    ref_dct2d(x, y, s);
    for (int e = 0; e < 64; e++)
      case (kind)
        0: in_blk[e] = 16'(y[e]);
        1: in_blk[e] = 16'(int'($urandom_range(800)) - 400);
        default: in_blk[e] = 16'($urandom);
      endcase
    in_tag = TAG_W'(n_in);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink and checker
  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (stall) stalls++;
    if (sat) sat_n++;
    if (clip) clip_n++;
    if (in_valid && in_ready) begin
      blk_t x, y;
      bit s, c;
      for (int e = 0; e < 64; e++) x[e] = int'(in_blk[e]);
      ref_idct2d(x, y, s, c);
      exp_q.push_back(y);
      acc_cycle[n_in] = cycle;
      n_in <= n_in + 1;
    end
    if (out_valid && out_ready) begin
      blk_t y;
      int bad;
      y = exp_q[0];
      exp_q.delete(0);
      bad = 0;
      for (int e = 0; e < 64; e++) if (int'(out_blk[e]) != y[e]) bad++;
      checks++;
      if (bad != 0 || int'(out_tag) != n_out % (1 << TAG_W)) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d: %0d coefficients differ (e.g. got %0d exp %0d)", n_out, bad, int'(out_blk[0]), y[0]);
      end
      if (free_run) begin
        checks++;
        if (cycle - acc_cycle[n_out] != 2) begin
          failures++;
          $display("FAIL latency %0d", cycle - acc_cycle[n_out]);
        end
      end
      n_out <= n_out + 1;
    end
  end

  bit fired = 0;

  // One driver step: present a new block after each accepted one (pattern
  // kinds cycle so that all-white and checkerboard blocks occur).
  task automatic drive(input bit rand_valid, input bit rand_ready);
    @(negedge clk);
    if (fired) begin
      new_block((n_in % 8 < 5) ? 0 : (n_in % 8 < 7) ? 1 : 2);
      in_valid = rand_valid ? ($urandom_range(3) != 0) : 1'b1;
    end else if (!in_valid) begin
      in_valid = rand_valid ? ($urandom_range(2) != 0) : 1'b1;
    end
    out_ready = rand_ready ? ($urandom_range(2) != 0) : 1'b1;
    #1 fired = in_valid && in_ready;
  endtask

  initial begin
    int n0;
    in_valid = 0; out_ready = 0; in_blk = '0; in_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    new_block(0);
    for (int cyc = 0; cyc < 2000; cyc++) drive(1, 1);
    // drain: stop offering, then let everything out
    @(negedge clk);
    if (!fired) begin
      while (!(in_valid && in_ready)) begin out_ready = 1; @(negedge clk); end
      @(negedge clk);
    end
    in_valid = 0; fired = 0; out_ready = 1;
    repeat (6) @(posedge clk);
    // free-running phase: always valid and ready
    free_run = 1;
    n0 = n_in;
    new_block(0);
    repeat (400) drive(0, 0);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (n_in - n0 < 199 || n_in - n0 > 201) begin
      failures++;
      $display("FAIL rate: %0d blocks in 400 cycles", n_in - n0);
    end
    repeat (6) @(posedge clk);
    checks++;
    if (n_out != n_in || stalls == 0 || sat_n == 0 || clip_n == 0) begin
      failures++;
      $display("FAIL in=%0d out=%0d stalls=%0d sat=%0d clip=%0d", n_in, n_out, stalls, sat_n, clip_n);
    end
    $display("blocks=%0d stalls=%0d sat=%0d clip=%0d", n_out, stalls, sat_n, clip_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dct_stage - checks the forward and the inverse 1D stage, in both
// passes (shift selections), against the multiplication-based reference:
// small-range blocks (no saturation) and full-range blocks (saturation).
module tb_dct_stage;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;

  coef_blk_t blk, out_f, out_i;
  logic      pass, sat_f, sat_i;
  int checks = 0, failures = 0, sat_seen = 0;

  dct_stage #(.INVERSE(1'b0), .SHIFT1(2), .SHIFT2(9)) dut_f (
    .blk_i(blk), .pass_i(pass), .blk_o(out_f), .sat_o(sat_f));
  dct_stage #(.INVERSE(1'b1), .SHIFT1(7), .SHIFT2(12)) dut_i (
    .blk_i(blk), .pass_i(pass), .blk_o(out_i), .sat_o(sat_i));

  task automatic run_one(input int range);
    blk_t x, yf, yi;
    bit   sf, si;
    for (int e = 0; e < 64; e++) begin
      x[e]   = int'($urandom_range(2 * range)) - range;
      blk[e] = 16'(x[e]);
    end
    for (int p = 0; p < 2; p++) begin
      pass = p[0];
      #1;
      ref_pass(x, 0, p ? 9 : 2, yf, sf);
      ref_pass(x, 1, p ? 12 : 7, yi, si);
      for (int e = 0; e < 64; e++) begin
        checks += 2;
        if (int'(out_f[e]) != yf[e]) begin
          failures++;
          if (failures < 10) $display("FAIL fwd pass%0d e=%0d got=%0d exp=%0d", p, e, out_f[e], yf[e]);
        end
        if (int'(out_i[e]) != yi[e]) begin
          failures++;
          if (failures < 10) $display("FAIL inv pass%0d e=%0d got=%0d exp=%0d", p, e, out_i[e], yi[e]);
        end
      end
      checks += 2;
      if (sat_f != sf) failures++;
      if (sat_i != si) failures++;
      sat_seen += int'(sf) + int'(si);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) run_one(255);
    for (int n = 0; n < 100; n++) run_one(4000);
    for (int n = 0; n < 100; n++) run_one(32767);
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("saturating passes: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

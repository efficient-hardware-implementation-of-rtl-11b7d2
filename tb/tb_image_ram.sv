// tb_image_ram - fills the whole 512x512 image memory one pixel per cycle
// with an address-derived pattern, reads every 512-bit word back and checks
// all 64 lanes, the one-cycle read latency, that a word holds while the
// read port is idle, and that a rewritten pixel changes only its own lane.
module tb_image_ram;
  localparam int NUM_PIXELS = 262144;
  localparam int LANES = 64;
  localparam int DEPTH = NUM_PIXELS / LANES;

  logic clk = 0;
  logic wr_en, rd_en;
  logic [17:0] wr_addr;
  logic [7:0]  wr_data;
  logic [11:0] rd_addr;
  logic [LANES-1:0][7:0] rd_data;
  int checks = 0, failures = 0;

  image_ram dut (.clk, .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
                 .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data));

  always #5 clk = ~clk;

  function automatic logic [7:0] pat(input int p);
    return 8'((p * 37) ^ (p >> 7) ^ (p >> 13));
  endfunction

  task automatic check_word(input int w, input int changed_lane, input logic [7:0] changed_val);
    int bad = 0;
    for (int l = 0; l < LANES; l++) begin
      logic [7:0] e;
      e = (l == changed_lane) ? changed_val : pat(w * LANES + l);
      if (rd_data[l] != e) bad++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      if (failures < 10) $display("FAIL word %0d: %0d lanes wrong", w, bad);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    @(negedge clk);
    for (int p = 0; p < NUM_PIXELS; p++) begin
      wr_en = 1; wr_addr = 18'(p); wr_data = pat(p);
      @(negedge clk);
    end
    wr_en = 0;
    for (int w = 0; w < DEPTH; w++) begin
      rd_en = 1; rd_addr = 12'(w);
      @(negedge clk);
      check_word(w, -1, 0);      // data present one edge after the request
    end
    // idle read port holds the last word
    rd_en = 0; rd_addr = 12'd5;
    repeat (3) @(negedge clk);
    check_word(DEPTH - 1, -1, 0);
    // single-lane rewrite in word 1397
    wr_en = 1; wr_addr = 18'(1397 * LANES + 21); wr_data = ~pat(1397 * LANES + 21);
    @(negedge clk);
    wr_en = 0; rd_en = 1; rd_addr = 12'd1397;
    @(negedge clk);
    check_word(1397, 21, ~pat(1397 * LANES + 21));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

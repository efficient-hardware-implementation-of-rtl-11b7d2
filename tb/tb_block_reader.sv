// tb_block_reader - runs the block fetch over all 4096 blocks twice against
// a one-cycle-latency memory model whose word w holds a pattern derived
// from w: once with a randomly stalling consumer, once with a consumer that
// is always ready. Checks that every block arrives once, in order, with its
// own data and tag, that done_o pulses once at the end, and that the
// unstalled run takes two cycles per block.
module tb_block_reader;
  import dct_pkg::*;
  localparam int NUM_BLOCKS = 4096;

  logic clk = 0, rst_n = 0;
  logic start, busy, done, rd_en, out_valid, out_ready;
  logic [11:0] rd_addr, out_tag;
  pix_blk_t rd_data, out_blk;
  int checks = 0, failures = 0, stalls = 0, dones = 0, got = 0, cycle = 0;

  block_reader #(.NUM_BLOCKS(NUM_BLOCKS)) dut (
    .clk, .rst_n, .start_i(start), .busy_o(busy), .done_o(done),
    .rd_en_o(rd_en), .rd_addr_o(rd_addr), .rd_data_i(rd_data),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_blk_o(out_blk), .out_tag_o(out_tag));

  always #5 clk = ~clk;

  function automatic pix_blk_t word_of(input int w);
    pix_blk_t b;
    for (int l = 0; l < 64; l++) b[l] = 8'(w * 7 + l * 13 + (w >> 8));
    return b;
  endfunction

  // memory model: registered read, data scrambled when not enabled
  always @(posedge clk) begin
    if (rd_en) rd_data <= word_of(int'(rd_addr));
    cycle <= cycle + 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (done) dones++;
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      checks++;
      if (int'(out_tag) != got || out_blk != word_of(got)) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d: tag %0d", got, out_tag);
      end
      got++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit random_ready, output int cycles);
    int t0;
    got = 0; dones = 0;
    @(negedge clk);
    start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) begin
      out_ready = random_ready ? ($urandom_range(2) != 0) : 1'b1;
      @(negedge clk);
    end
    cycles = cycle - t0;
    repeat (5) @(negedge clk);
    checks += 3;
    if (got != NUM_BLOCKS) begin failures++; $display("FAIL got %0d blocks", got); end
    if (dones != 1) begin failures++; $display("FAIL %0d done pulses", dones); end
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    int c1, c2;
    start = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, c1);
    run(0, c2);
    checks += 2;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    if (c2 != 2 * NUM_BLOCKS + 2) begin
      failures++;
      $display("FAIL unstalled run took %0d cycles", c2);
    end
    $display("cycles random=%0d unstalled=%0d stalls=%0d", c1, c2, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_two_pass_ctrl - drives the two-pass controller with random input
// valid and output ready and compares every output, every cycle, with a
// cycle model of the intended behaviour: accept in pass 0, produce in pass
// 1, wait in pass 1 while the output register is held. Also checks that
// tags leave in order and that with no back-pressure a block is accepted
// every second cycle.
module tb_two_pass_ctrl;
  localparam int TAG_W = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, pass, load_t, load_out, stall;
  logic [TAG_W-1:0] in_tag, out_tag;
  int checks = 0, failures = 0, stalls = 0, accepted = 0, produced = 0;

  // model state
  bit m_full, m_ovalid;
  logic [TAG_W-1:0] m_ttag, m_otag, next_tag, exp_tag;

  two_pass_ctrl #(.TAG_W(TAG_W)) dut (
    .clk, .rst_n,
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_tag_i(in_tag),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_tag_o(out_tag),
    .pass_o(pass), .load_t_o(load_t), .load_out_o(load_out), .stall_o(stall));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit v, input bit r);
    bit e_free, e_ready, e_loadt, e_loadout;
    @(negedge clk);
    in_valid  = v;
    out_ready = r;
    in_tag    = next_tag;
    #1;
    e_free    = !m_ovalid || out_ready;
    e_ready   = !m_full;
    e_loadt   = !m_full && in_valid;
    e_loadout = m_full && e_free;
    chk(in_ready == e_ready, "in_ready");
    chk(pass == m_full, "pass");
    chk(load_t == e_loadt, "load_t");
    chk(load_out == e_loadout, "load_out");
    chk(stall == (m_full && !e_free), "stall");
    chk(out_valid == m_ovalid, "out_valid");
    if (m_ovalid) chk(out_tag == m_otag, "out_tag model");
    if (out_valid && out_ready) begin
      chk(out_tag == exp_tag, "tag order");
      exp_tag++;
      produced++;
    end
    if (stall) stalls++;
    @(posedge clk);
    if (e_loadt) begin m_full = 1; m_ttag = in_tag; next_tag++; accepted++; end
    if (e_loadout) begin m_full = 0; m_otag = m_ttag; m_ovalid = 1; end
    else if (out_ready) m_ovalid = 0;
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_tag = 0; next_tag = 0; exp_tag = 0;
    m_full = 0; m_ovalid = 0; m_ttag = 0; m_otag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++)
      step($urandom_range(3) != 0, $urandom_range(2) != 0);
    repeat (4) step(0, 1);
    accepted = 0;
    for (int cyc = 0; cyc < 3000; cyc++) step(1, 1);
    // phase 1: 3000 cycles, always valid and ready -> 1500 blocks
    checks++;
    if (accepted != 1500) begin
      failures++;
      $display("FAIL rate: %0d blocks in 3000 cycles", accepted);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("stalls=%0d produced=%0d", stalls, produced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

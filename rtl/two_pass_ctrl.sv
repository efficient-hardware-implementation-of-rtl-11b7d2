// two_pass_ctrl - counter/controller that time-shares one 1D transform stage
// over the two passes of a 2D transform.
//
// A block accepted on the input (in_valid_i && in_ready_o) goes through the
// stage in pass 0 and its transposed result is captured in the transpose
// register (load_t_o). In the next cycle the multiplexer in front of the
// stage selects that register (pass_o = 1) and the pass-1 result is captured
// in the output register (load_out_o), which then shows out_valid_o until
// out_ready_i takes it. If the output register is still occupied, pass 1
// waits (stall_o) and no new block is accepted. Throughput is one 8x8 block
// per two cycles, latency two cycles from acceptance to out_valid_o.
//
// A tag (the block number) travels with each block. The valid/ready
// handshake and the tag are this design's own choices; the published architecture only says
// the operation is controlled with counters and that a multiplexer feeds
// the transposed intermediate results back.
module two_pass_ctrl #(
  parameter int unsigned TAG_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid_i,
  output logic             in_ready_o,
  input  logic [TAG_W-1:0] in_tag_i,
  output logic             out_valid_o,
  input  logic             out_ready_i,
  output logic [TAG_W-1:0] out_tag_o,
  output logic             pass_o,
  output logic             load_t_o,
  output logic             load_out_o,
  output logic             stall_o
);

  typedef enum logic {S_PASS0, S_PASS1} state_e;

  state_e           state_q;
  logic [TAG_W-1:0] tag_t_q;
  logic             out_free;

  assign out_free   = !out_valid_o || out_ready_i;
  assign pass_o     = (state_q == S_PASS1);
  assign in_ready_o = (state_q == S_PASS0);
  assign load_t_o   = (state_q == S_PASS0) && in_valid_i;
  assign load_out_o = (state_q == S_PASS1) && out_free;
  assign stall_o    = (state_q == S_PASS1) && !out_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_PASS0;
      tag_t_q     <= '0;
      out_tag_o   <= '0;
      out_valid_o <= 1'b0;
    end else begin
      if (load_t_o) begin
        state_q <= S_PASS1;
        tag_t_q <= in_tag_i;
      end
      if (load_out_o) begin
        state_q     <= S_PASS0;
        out_tag_o   <= tag_t_q;
        out_valid_o <= 1'b1;
      end else if (out_ready_i) begin
        out_valid_o <= 1'b0;
      end
    end
  end

  // Handshake rules: an offered output holds until taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid_o && !out_ready_i |=> out_valid_o && $stable(out_tag_o));
  a_no_accept_busy: assert property (@(posedge clk) disable iff (!rst_n)
    pass_o |-> !in_ready_o);

endmodule

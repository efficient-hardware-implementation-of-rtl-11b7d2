// block_reader - counter-driven fetch of 8x8 blocks from the image memory
// into the 64 input registers of the DCT.
//
// After start_i, a block counter walks the read port of image_ram from word
// 0 to NUM_BLOCKS-1. Each 512-bit word returned is split into 64 8-bit
// pixel registers, which are offered to the DCT with the block number as
// tag (valid/ready handshake). A read is issued only when the registers
// will be free by the time its data returns, so no data is lost under
// back-pressure. done_o pulses when the last block has been handed over.
//
// Timing: a read is issued in the cycle the previous block is taken; the
// data is in the registers two cycles later, so one block per two cycles
// at most, which matches the rate of dct2d. Walking the memory with a
// counter and splitting the word into 64 registers follows the published
// design; the handshake and issue rule are this design's own.
module block_reader
  import dct_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 4096,
  localparam int unsigned BA_W      = $clog2(NUM_BLOCKS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start_i,
  output logic            busy_o,
  output logic            done_o,
  // image_ram read port
  output logic            rd_en_o,
  output logic [BA_W-1:0] rd_addr_o,
  input  pix_blk_t        rd_data_i,
  // towards the DCT
  output logic            out_valid_o,
  input  logic            out_ready_i,
  output pix_blk_t        out_blk_o,
  output logic [BA_W-1:0] out_tag_o
);

  logic [BA_W:0]   issued_q;    // blocks whose read was issued
  logic [BA_W:0]   handed_q;    // blocks taken by the DCT
  logic            pend_q;      // read data arrives this cycle
  logic [BA_W-1:0] pend_tag_q;
  logic            fire;

  assign fire      = out_valid_o && out_ready_i;
  assign rd_en_o   = busy_o && (issued_q != (BA_W+1)'(NUM_BLOCKS)) && !pend_q
                     && (!out_valid_o || fire);
  assign rd_addr_o = issued_q[BA_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_o      <= 1'b0;
      done_o      <= 1'b0;
      issued_q    <= '0;
      handed_q    <= '0;
      pend_q      <= 1'b0;
      pend_tag_q  <= '0;
      out_valid_o <= 1'b0;
      out_blk_o   <= '0;
      out_tag_o   <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_o) begin
        busy_o   <= 1'b1;
        issued_q <= '0;
        handed_q <= '0;
      end
      if (rd_en_o) begin
        issued_q   <= issued_q + 1'b1;
        pend_tag_q <= rd_addr_o;
      end
      pend_q <= rd_en_o;
      if (fire) begin
        out_valid_o <= 1'b0;
        handed_q    <= handed_q + 1'b1;
        if (handed_q == (BA_W+1)'(NUM_BLOCKS - 1)) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
        end
      end
      if (pend_q) begin
        out_blk_o   <= rd_data_i;
        out_tag_o   <= pend_tag_q;
        out_valid_o <= 1'b1;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid_o && !out_ready_i |=> out_valid_o && $stable(out_blk_o));
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    pend_q |-> !out_valid_o || fire);

endmodule

// image_ram - simple dual-port image memory with a narrow write port and a
// wide read port.
//
// It holds NUM_PIXELS pixels of PIX_W bits (a 512x512 8-bit image by
// default: 262,144 locations, 2,097,152 bits). Port A writes one pixel per
// cycle at a pixel address; port B reads RD_W bits (64 pixels, one 8x8
// block) per cycle at a word address. Pixel address p lives in word
// p / 64, byte lane p % 64 (lane l occupies bits [8l+7:8l]).
//
// Both ports are synchronous to clk; a read returns its data on the clock
// edge after rd_en_i (one cycle of latency, like a block RAM with no output
// register). The RAM has no reset and its initial contents are undefined:
// the image must be written through port A before it is read. The sizes and
// the dual-port, 8-bit-in / 512-bit-out organisation follow the published
// memory; the latency and the byte-lane mapping are this design's choice.
module image_ram #(
  parameter int unsigned NUM_PIXELS = 262144,
  parameter int unsigned PIX_W      = 8,
  parameter int unsigned RD_W       = 512,
  localparam int unsigned LANES     = RD_W / PIX_W,
  localparam int unsigned DEPTH     = NUM_PIXELS / LANES,
  localparam int unsigned WA_W      = $clog2(NUM_PIXELS),
  localparam int unsigned RA_W      = $clog2(DEPTH)
) (
  input  logic                       clk,
  // port A: pixel write
  input  logic                       wr_en_i,
  input  logic [WA_W-1:0]            wr_addr_i,
  input  logic [PIX_W-1:0]           wr_data_i,
  // port B: block read
  input  logic                       rd_en_i,
  input  logic [RA_W-1:0]            rd_addr_i,
  output logic [LANES-1:0][PIX_W-1:0] rd_data_o
);

  localparam int unsigned LANE_W = $clog2(LANES);

  logic [LANES-1:0][PIX_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en_i)
      mem[wr_addr_i[WA_W-1:LANE_W]][wr_addr_i[LANE_W-1:0]] <= wr_data_i;
  end

  always_ff @(posedge clk) begin
    if (rd_en_i)
      rd_data_o <= mem[rd_addr_i];
  end

endmodule

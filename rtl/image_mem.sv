// image_mem: one stereo image (left or right), IMG_W x IMG_H pixels.
//
// The design keeps each input image in an on-chip memory with two read
// ports: port A feeds the SAD blocks' FIFO sets, port B serves a display so
// the image can be shown while the disparity map is computed. For an offline
// run the memory would be a ROM; here it has a write port so that images
// (or camera frames) can be loaded, which is this design's choice.
//
// Interface: we/waddr/wdata write one pixel; raddr_a/raddr_b are read
// addresses (y*IMG_W + x) and rdata_a/rdata_b follow one clock later
// (synchronous read, as in a block RAM). A read of the address being written
// in the same cycle returns the old pixel.
module image_mem #(
  parameter int unsigned IMG_W = stereo_pkg::IMG_W_DEF,
  parameter int unsigned IMG_H = stereo_pkg::IMG_H_DEF,
  parameter int unsigned PIX_W = stereo_pkg::PIX_W_DEF,
  localparam int unsigned DEPTH = IMG_W * IMG_H,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [PIX_W-1:0] wdata,
  input  logic [AW-1:0]    raddr_a,
  output logic [PIX_W-1:0] rdata_a,
  input  logic [AW-1:0]    raddr_b,
  output logic [PIX_W-1:0] rdata_b
);
  logic [PIX_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata_a <= mem[raddr_a];
    rdata_b <= mem[raddr_b];
  end
endmodule

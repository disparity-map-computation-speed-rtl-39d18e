// disp_ram: dual-port memory for disparity values.
//
// One port writes the disparity of each finished reference pixel, the other
// reads the map at the same time (for a display). The top uses one bank per
// SAD block so that all blocks can store a result in the same clock.
//
// Interface: we/waddr/wdata write; rdata shows mem[raddr] one clock after
// raddr (synchronous read). Contents are not reset; the top masks locations
// that were never written (outside the valid region) on the read side.
module disp_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned DW    = $clog2(stereo_pkg::MAX_DISP_DEF),
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

// min_select: minimum block and disparity register of a SAD block.
//
// SAD values of one reference pixel arrive one per clock, each with the
// disparity offset that produced it. The first value of a pixel (first = 1)
// is taken as the running minimum; every later value replaces it when it is
// smaller or equal, and the offset is stored with it. When the value marked
// last has been compared, the stored offset is the pixel's disparity and is
// presented for one clock on res_valid together with its SAD.
//
// The SAD block visits disparities from the largest down to 0, so taking
// "smaller or equal" makes a tie go to the smaller disparity, the same
// result as scanning upward and keeping only strictly smaller values.
//
// Interface: all inputs qualified by valid; res_* are registered and valid
// one clock after the last SAD of a pixel. px_in is passed through to px_out.
module min_select #(
  parameter int unsigned SAD_W = stereo_pkg::sad_width(stereo_pkg::PIX_W_DEF, stereo_pkg::WIN_DEF),
  parameter int unsigned DW    = $clog2(stereo_pkg::MAX_DISP_DEF),
  parameter int unsigned PX_W  = $clog2(stereo_pkg::IMG_W_DEF)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic             first,
  input  logic             last,
  input  logic [SAD_W-1:0] sad,
  input  logic [DW-1:0]    disp,
  input  logic [PX_W-1:0]  px_in,
  output logic             res_valid,
  output logic [DW-1:0]    res_disp,
  output logic [SAD_W-1:0] res_sad,
  output logic [PX_W-1:0]  px_out
);
  logic [SAD_W-1:0] min_sad;
  logic [DW-1:0]    min_disp;
  logic             take;
  logic [SAD_W-1:0] nxt_sad;
  logic [DW-1:0]    nxt_disp;

  always_comb begin
    take     = first || (sad <= min_sad);
    nxt_sad  = take ? sad  : min_sad;
    nxt_disp = take ? disp : min_disp;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      min_sad   <= '1;
      min_disp  <= '0;
      res_valid <= 1'b0;
      res_disp  <= '0;
      res_sad   <= '0;
      px_out    <= '0;
    end else begin
      res_valid <= valid && last;
      if (valid) begin
        min_sad  <= nxt_sad;
        min_disp <= nxt_disp;
        if (last) begin
          res_disp <= nxt_disp;
          res_sad  <= nxt_sad;
          px_out   <= px_in;
        end
      end
    end
  end
endmodule

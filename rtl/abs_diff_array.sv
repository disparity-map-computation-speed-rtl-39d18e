// abs_diff_array: N absolute differences |left[i] - right[i]| in parallel.
//
// First pipeline stage of the SAD computation: all WIN*WIN differences of a
// window pair are formed in the same clock and registered. A side-band tag
// and a valid bit travel with the data so that downstream stages know which
// reference pixel and disparity the values belong to.
//
// Interface: inputs are sampled at the clock edge; ad, tag_out and
// valid_out appear one clock later (latency 1, one window per clock).
module abs_diff_array #(
  parameter int unsigned PIX_W = stereo_pkg::PIX_W_DEF,
  parameter int unsigned N     = stereo_pkg::WIN_DEF * stereo_pkg::WIN_DEF,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_in,
  input  logic [TAG_W-1:0] tag_in,
  input  logic [PIX_W-1:0] left  [N],
  input  logic [PIX_W-1:0] right [N],
  output logic             valid_out,
  output logic [TAG_W-1:0] tag_out,
  output logic [PIX_W-1:0] ad [N]
);
  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++)
      ad[i] <= (left[i] > right[i]) ? left[i] - right[i] : right[i] - left[i];
    tag_out <= tag_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid_out <= 1'b0;
    else        valid_out <= valid_in;
  end
endmodule

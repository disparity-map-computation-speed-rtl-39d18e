// fifo_set: on-chip buffer of the WIN image rows that one SAD block needs.
//
// Image rows are copied once from the (slow) image memory into this set, so
// that window columns can then be fetched every clock without touching the
// image memory again. Each of the WIN row buffers is written in column order
// during the fill; reading returns one whole window column (the same column
// of all WIN rows) per clock. Reading is addressed by a column pointer kept
// by the SAD block's sequencer: stepping it by one per clock gives the FIFO
// order, and setting it back gives the "reload" the right set needs for each
// new reference pixel. Addressing the column directly is this design's way of
// making the set re-readable; the row-buffer organisation follows the paper.
//
// Interface: wr_en writes wr_data into row slot wr_slot at column wr_col.
// rd_column[r] = row r at column rd_col, combinationally (distributed RAM).
module fifo_set #(
  parameter int unsigned IMG_W = stereo_pkg::IMG_W_DEF,
  parameter int unsigned PIX_W = stereo_pkg::PIX_W_DEF,
  parameter int unsigned WIN   = stereo_pkg::WIN_DEF,
  localparam int unsigned CW = $clog2(IMG_W),
  localparam int unsigned SW = (WIN > 1) ? $clog2(WIN) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [SW-1:0]    wr_slot,
  input  logic [CW-1:0]    wr_col,
  input  logic [PIX_W-1:0] wr_data,
  input  logic [CW-1:0]    rd_col,
  output logic [PIX_W-1:0] rd_column [WIN]
);
  logic [PIX_W-1:0] rows [WIN][IMG_W];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_slot) < WIN)) rows[wr_slot][wr_col] <= wr_data;
  end

  always_comb begin
    for (int r = 0; r < WIN; r++) rd_column[r] = rows[r][rd_col];
  end
endmodule

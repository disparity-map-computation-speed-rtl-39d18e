// adder_tree: pipelined sum of N unsigned values, one result per clock.
//
// The N inputs are padded with zeros to the next power of two P and added
// pairwise over LEVELS = log2(P) register stages, so after LEVELS clocks of
// latency a new sum leaves the tree every clock. For the 7x7 window (N = 49)
// this is 6 stages. The paper states only that the differences are "summed in
// a pipeline manner"; the binary tree with one register per level is this
// design's choice. A tag and valid bit are delayed to match.
//
// Interface: in/tag_in/valid_in sampled each clock; sum/tag_out/valid_out
// appear LEVELS clocks later.
module adder_tree #(
  parameter int unsigned N     = stereo_pkg::WIN_DEF * stereo_pkg::WIN_DEF,
  parameter int unsigned IW    = stereo_pkg::PIX_W_DEF,
  parameter int unsigned TAG_W = 8,
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned P  = 1 << LEVELS,
  localparam int unsigned OW = IW + LEVELS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_in,
  input  logic [TAG_W-1:0] tag_in,
  input  logic [IW-1:0]    in [N],
  output logic             valid_out,
  output logic [TAG_W-1:0] tag_out,
  output logic [OW-1:0]    sum
);
  logic [OW-1:0]    lvl0  [P];           // padded inputs
  logic [OW-1:0]    lvl   [LEVELS][P];   // lvl[l]: sums after stage l+1
  logic [TAG_W-1:0] tag_d [LEVELS];
  logic             vld_d [LEVELS];

  always_comb begin
    for (int i = 0; i < P; i++) lvl0[i] = (i < N) ? OW'(in[i]) : '0;
  end

  // Stage l leaves P >> (l+1) partial sums; the unused upper entries are 0.
  always_ff @(posedge clk) begin
    for (int i = 0; i < P / 2; i++) lvl[0][i] <= lvl0[2*i] + lvl0[2*i+1];
    for (int l = 1; l < LEVELS; l++)
      for (int i = 0; i < P / 2; i++)
        lvl[l][i] <= (i < (P >> (l + 1))) ? lvl[l-1][2*i] + lvl[l-1][2*i+1] : '0;
    for (int l = 0; l < LEVELS; l++)
      for (int i = P / 2; i < P; i++) lvl[l][i] <= '0;
    tag_d[0] <= tag_in;
    for (int l = 1; l < LEVELS; l++) tag_d[l] <= tag_d[l-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < LEVELS; l++) vld_d[l] <= 1'b0;
    end else begin
      vld_d[0] <= valid_in;
      for (int l = 1; l < LEVELS; l++) vld_d[l] <= vld_d[l-1];
    end
  end

  assign sum       = lvl[LEVELS-1][0];
  assign tag_out   = tag_d[LEVELS-1];
  assign valid_out = vld_d[LEVELS-1];
endmodule

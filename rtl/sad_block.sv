// sad_block: one SAD block-matching engine; computes the disparities of one
// image line.
//
// Before a line is computed, the WIN image rows centred on it are written
// into two FIFO sets (fill_* port), left rows and right rows side by side.
// On start the sequencer sweeps the reference pixels x = XMIN..XMAX. For each
// of them the right window register is reloaded with WIN columns starting at
// the window of the largest disparity (MAX_DISP-1), and is then shifted one
// column per clock, so that the right window walks from disparity MAX_DISP-1
// down to 0. The left window register is loaded with WIN columns for the
// first pixel and afterwards shifted by one column per pixel, while the right
// set is being reloaded. One reference pixel therefore takes
// STEPS = WIN - 1 + MAX_DISP clocks (22 for 7x7 and 16 levels), of which the
// last MAX_DISP each present one window pair.
//
// Each window pair goes through abs_diff_array (1 clock), adder_tree
// (log2 stages, 6 for 49 pixels) and min_select (1 clock); one SAD is
// produced per clock and the disparity of a pixel leaves res_* one clock
// after its last SAD. The whole line takes (XMAX-XMIN+1)*STEPS clocks plus
// the pipeline latency. done pulses with the result of x = XMAX.
//
// From the paper: FIFO sets, window registers filled column by column, the
// right set reloaded per reference pixel, 49 parallel differences, pipelined
// sum, minimum block. This design's choices: the sweep direction (largest
// disparity first), the start/done handshake and the fill port.
//
// Interface: fill_we writes fill_left/fill_right to row slot fill_slot
// (0 = top row of the window) at column fill_col. start (one clock, only
// when !busy) begins a line; busy stays high until done.
module sad_block #(
  parameter int unsigned IMG_W    = stereo_pkg::IMG_W_DEF,
  parameter int unsigned PIX_W    = stereo_pkg::PIX_W_DEF,
  parameter int unsigned WIN      = stereo_pkg::WIN_DEF,
  parameter int unsigned MAX_DISP = stereo_pkg::MAX_DISP_DEF,
  localparam int unsigned CW    = $clog2(IMG_W),
  localparam int unsigned SW    = (WIN > 1) ? $clog2(WIN) : 1,
  localparam int unsigned DW    = (MAX_DISP > 1) ? $clog2(MAX_DISP) : 1,
  localparam int unsigned NPIX  = WIN * WIN,
  localparam int unsigned SAD_W = PIX_W + ((NPIX > 1) ? $clog2(NPIX) : 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fill_we,
  input  logic [SW-1:0]    fill_slot,
  input  logic [CW-1:0]    fill_col,
  input  logic [PIX_W-1:0] fill_left,
  input  logic [PIX_W-1:0] fill_right,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             res_valid,
  output logic [CW-1:0]    res_x,
  output logic [DW-1:0]    res_disp,
  output logic [SAD_W-1:0] res_sad
);
  localparam int unsigned HALF  = WIN / 2;
  localparam int unsigned XMIN  = MAX_DISP + HALF - 1;
  localparam int unsigned XMAX  = IMG_W - HALF - 1;
  localparam int unsigned STEPS = WIN - 1 + MAX_DISP;
  localparam int unsigned STW   = $clog2(STEPS + 1);
  localparam int unsigned TAG_W = 2 + DW + CW;

  // ---------------- sequencer ----------------
  logic           running, first_px;
  logic [CW-1:0]  x;
  logic [STW-1:0] s;
  logic [CW-1:0]  lcol, rcol;
  logic           shift_l, shift_r;

  always_comb begin
    lcol    = CW'(x - CW'(HALF) + CW'(s));
    rcol    = CW'(x - CW'(MAX_DISP - 1 + HALF) + CW'(s));
    shift_r = running;
    shift_l = running && (first_px ? (32'(s) < WIN) : (32'(s) == WIN - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running  <= 1'b0;
      first_px <= 1'b0;
      x        <= '0;
      s        <= '0;
    end else if (!running) begin
      if (start && !busy) begin
        running  <= 1'b1;
        first_px <= 1'b1;
        x        <= CW'(XMIN);
        s        <= '0;
      end
    end else if (32'(s) == STEPS - 1) begin
      s        <= '0;
      first_px <= 1'b0;
      if (32'(x) == XMAX) running <= 1'b0;
      else                x <= x + 1'b1;
    end else begin
      s <= s + 1'b1;
    end
  end

  // ---------------- FIFO sets and window registers ----------------
  logic [PIX_W-1:0] lcolumn [WIN];
  logic [PIX_W-1:0] rcolumn [WIN];
  logic [PIX_W-1:0] lwin [NPIX];
  logic [PIX_W-1:0] rwin [NPIX];

  fifo_set #(.IMG_W(IMG_W), .PIX_W(PIX_W), .WIN(WIN)) u_left_fifo (
    .clk, .wr_en(fill_we), .wr_slot(fill_slot), .wr_col(fill_col),
    .wr_data(fill_left), .rd_col(lcol), .rd_column(lcolumn));
  fifo_set #(.IMG_W(IMG_W), .PIX_W(PIX_W), .WIN(WIN)) u_right_fifo (
    .clk, .wr_en(fill_we), .wr_slot(fill_slot), .wr_col(fill_col),
    .wr_data(fill_right), .rd_col(rcol), .rd_column(rcolumn));

  window_reg #(.PIX_W(PIX_W), .WIN(WIN)) u_left_win (
    .clk, .shift(shift_l), .col_in(lcolumn), .win(lwin));
  window_reg #(.PIX_W(PIX_W), .WIN(WIN)) u_right_win (
    .clk, .shift(shift_r), .col_in(rcolumn), .win(rwin));

  // Tag of the window pair present in the registers in the next clock:
  // {first, last, disparity, x}.
  logic             win_vld;
  logic [TAG_W-1:0] win_tag;
  always_ff @(posedge clk) begin
    if (!rst_n) win_vld <= 1'b0;
    else        win_vld <= running && (32'(s) >= WIN - 1);
    win_tag <= {32'(s) == WIN - 1, 32'(s) == STEPS - 1,
                DW'(MAX_DISP - 1 + WIN - 1 - 32'(s)), x};
  end

  // ---------------- SAD datapath ----------------
  logic             ad_vld;
  logic [TAG_W-1:0] ad_tag;
  logic [PIX_W-1:0] ad [NPIX];
  logic             sum_vld;
  logic [TAG_W-1:0] sum_tag;
  logic [PIX_W + $clog2(NPIX) - 1:0] sum;

  abs_diff_array #(.PIX_W(PIX_W), .N(NPIX), .TAG_W(TAG_W)) u_ad (
    .clk, .rst_n, .valid_in(win_vld), .tag_in(win_tag), .left(lwin), .right(rwin),
    .valid_out(ad_vld), .tag_out(ad_tag), .ad(ad));

  adder_tree #(.N(NPIX), .IW(PIX_W), .TAG_W(TAG_W)) u_tree (
    .clk, .rst_n, .valid_in(ad_vld), .tag_in(ad_tag), .in(ad),
    .valid_out(sum_vld), .tag_out(sum_tag), .sum(sum));

  min_select #(.SAD_W(SAD_W), .DW(DW), .PX_W(CW)) u_min (
    .clk, .rst_n, .valid(sum_vld),
    .first(sum_tag[TAG_W-1]), .last(sum_tag[TAG_W-2]),
    .sad(SAD_W'(sum)), .disp(sum_tag[CW +: DW]), .px_in(sum_tag[CW-1:0]),
    .res_valid(res_valid), .res_disp(res_disp), .res_sad(res_sad), .px_out(res_x));

  // ---------------- status ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) busy <= 1'b1;
      else if (res_valid && (32'(res_x) == XMAX)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // A new line may only be started when the block is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("sad_block: start while busy");
endmodule

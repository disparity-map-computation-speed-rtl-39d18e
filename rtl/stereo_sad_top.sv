// stereo_sad_top: SAD block-matching disparity engine for a rectified
// stereo pair (defaults: 128x128 8-bit images, 7x7 window, 16 disparity
// levels, 8 SAD blocks).
//
// The left and right images sit in two image memories. The frame sequencer
// processes the valid image lines YMIN..YMAX in groups of NUM_SAD
// consecutive lines, one line per SAD block. For a group it streams every
// image row that any block of the group needs (first line - WIN/2 to last
// line + WIN/2) once out of the image memories, one pixel pair per clock,
// and each block captures the rows of its own window band into its FIFO
// sets. Sharing one read of each row among all blocks keeps the single image
// memory port from becoming the bottleneck. Then all blocks of the group are
// started together and their disparities go to one disparity RAM bank per
// block, so the blocks never compete for a write port. The next group starts
// when every block of the group is done. Groups therefore do not overlap
// (fill, then compute); a frame of the default size takes 16 groups.
//
// Pixels outside the valid region (the black frame the window and the
// disparity range leave around the map) read back as disparity 0; they are
// never written.
//
// From the paper: image sizes, window, disparity range, 8 parallel SAD
// blocks on 8 image lines, dual-port image and disparity memories so a
// display can read while the map is computed, FIFO-set filling. This
// design's choices: the row broadcast, the per-block disparity banks, the
// load port and the frame_cycles counter (the clock count used to turn cycles
// into frame rates).
//
// Interface:
//   ld_we/ld_addr/ld_left/ld_right: write a pixel pair (address y*IMG_W+x);
//     only while !busy.
//   start: begin a frame (ignored while busy); busy goes high the next clock
//     and stays high until the clock before the one-clock done pulse;
//     frame_cycles then holds the number of clocks busy was high.
//   dsp_addr: display read address y*IMG_W+x; dsp_left, dsp_right and
//     dsp_disp follow one clock later.
module stereo_sad_top #(
  parameter int unsigned IMG_W    = stereo_pkg::IMG_W_DEF,
  parameter int unsigned IMG_H    = stereo_pkg::IMG_H_DEF,
  parameter int unsigned PIX_W    = stereo_pkg::PIX_W_DEF,
  parameter int unsigned WIN      = stereo_pkg::WIN_DEF,
  parameter int unsigned MAX_DISP = stereo_pkg::MAX_DISP_DEF,
  parameter int unsigned NUM_SAD  = stereo_pkg::NUM_SAD_DEF,
  localparam int unsigned AW = $clog2(IMG_W * IMG_H),
  localparam int unsigned DW = (MAX_DISP > 1) ? $clog2(MAX_DISP) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld_we,
  input  logic [AW-1:0]    ld_addr,
  input  logic [PIX_W-1:0] ld_left,
  input  logic [PIX_W-1:0] ld_right,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [31:0]      frame_cycles,
  input  logic [AW-1:0]    dsp_addr,
  output logic [PIX_W-1:0] dsp_left,
  output logic [PIX_W-1:0] dsp_right,
  output logic [DW-1:0]    dsp_disp
);
  localparam int unsigned HALF    = WIN / 2;
  localparam int unsigned XMIN    = MAX_DISP + HALF - 1;
  localparam int unsigned XMAX    = IMG_W - HALF - 1;
  localparam int unsigned YMIN    = HALF;
  localparam int unsigned YMAX    = IMG_H - HALF - 1;
  localparam int unsigned NROWS   = YMAX - YMIN + 1;
  localparam int unsigned NGROUPS = (NROWS + NUM_SAD - 1) / NUM_SAD;
  localparam int unsigned CW      = $clog2(IMG_W);
  localparam int unsigned RW      = $clog2(IMG_H + NUM_SAD + WIN) + 1;
  localparam int unsigned SW      = (WIN > 1) ? $clog2(WIN) : 1;
  localparam int unsigned GW      = (NGROUPS > 1) ? $clog2(NGROUPS) : 1;
  localparam int unsigned BDEPTH  = NGROUPS * IMG_W;
  localparam int unsigned BAW     = $clog2(BDEPTH);
  localparam int unsigned KW      = (NUM_SAD > 1) ? $clog2(NUM_SAD) : 1;
  localparam int unsigned NPIX    = WIN * WIN;
  localparam int unsigned SAD_W   = PIX_W + ((NPIX > 1) ? $clog2(NPIX) : 1);

  typedef enum logic [2:0] {S_IDLE, S_FILL, S_DRAIN, S_START, S_RUN} state_t;
  state_t state;

  // ---------------- image memories ----------------
  logic [AW-1:0]    fill_raddr;
  logic [PIX_W-1:0] fill_lpix, fill_rpix;

  image_mem #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) u_left_img (
    .clk, .we(ld_we), .waddr(ld_addr), .wdata(ld_left),
    .raddr_a(fill_raddr), .rdata_a(fill_lpix), .raddr_b(dsp_addr), .rdata_b(dsp_left));
  image_mem #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) u_right_img (
    .clk, .we(ld_we), .waddr(ld_addr), .wdata(ld_right),
    .raddr_a(fill_raddr), .rdata_a(fill_rpix), .raddr_b(dsp_addr), .rdata_b(dsp_right));

  // ---------------- frame sequencer ----------------
  logic [RW-1:0]      y0;          // first line of the current group
  logic [GW-1:0]      grp;         // group index
  logic [NUM_SAD-1:0] act;         // blocks that own a valid line
  logic [NUM_SAD-1:0] fin;         // blocks of the group that are done
  logic [RW-1:0]      frow, frow_end, frow_d;
  logic [CW-1:0]      fcol, fcol_d;
  logic               frd, frd_d;  // fill read issued / data returned

  logic [NUM_SAD-1:0] eng_start, eng_busy, eng_done, eng_we, res_valid;
  logic [CW-1:0]      res_x    [NUM_SAD];
  logic [DW-1:0]      res_disp [NUM_SAD];
  logic [SAD_W-1:0]   res_sad  [NUM_SAD];
  logic [SW-1:0]      eng_slot [NUM_SAD];

  // Blocks whose line y0+k lies inside the valid region.
  function automatic logic [NUM_SAD-1:0] active_mask(logic [RW-1:0] first_line);
    for (int k = 0; k < NUM_SAD; k++)
      active_mask[k] = (32'(first_line) + k <= YMAX);
  endfunction

  function automatic logic [RW-1:0] last_fill_row(logic [RW-1:0] first_line);
    int unsigned last_line;
    last_line = 32'(first_line) + NUM_SAD - 1;
    if (last_line > YMAX) last_line = YMAX;
    return RW'(last_line + HALF);
  endfunction

  assign fill_raddr = AW'(32'(frow) * IMG_W + 32'(fcol));
  assign frd        = (state == S_FILL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      y0       <= '0;
      grp      <= '0;
      act      <= '0;
      fin      <= '0;
      frow     <= '0;
      frow_end <= '0;
      fcol     <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          busy     <= 1'b1;
          y0       <= RW'(YMIN);
          grp      <= '0;
          act      <= active_mask(RW'(YMIN));
          frow     <= RW'(YMIN - HALF);
          frow_end <= last_fill_row(RW'(YMIN));
          fcol     <= '0;
          state    <= S_FILL;
        end
        S_FILL: begin
          if (32'(fcol) == IMG_W - 1) begin
            fcol <= '0;
            frow <= frow + 1'b1;
            if (frow == frow_end) state <= S_DRAIN;
          end else begin
            fcol <= fcol + 1'b1;
          end
        end
        S_DRAIN: state <= S_START;
        S_START: begin
          fin   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          fin <= fin | eng_done;
          if (((fin | eng_done) & act) == act) begin
            if (32'(y0) + NUM_SAD > YMAX) begin
              busy  <= 1'b0;
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              y0       <= y0 + RW'(NUM_SAD);
              grp      <= grp + 1'b1;
              act      <= active_mask(y0 + RW'(NUM_SAD));
              frow     <= y0 + RW'(NUM_SAD) - RW'(HALF);
              frow_end <= last_fill_row(y0 + RW'(NUM_SAD));
              fcol     <= '0;
              state    <= S_FILL;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Image memory data return one clock after the read.
  always_ff @(posedge clk) begin
    if (!rst_n) frd_d <= 1'b0;
    else        frd_d <= frd;
    frow_d <= frow;
    fcol_d <= fcol;
  end

  // Row frow_d goes to block k at slot frow_d - (y0 + k) + HALF when that
  // slot is inside the block's WIN-row band.
  always_comb begin
    for (int k = 0; k < NUM_SAD; k++) begin
      int signed rel;
      rel         = int'(frow_d) - int'(y0) - k + int'(HALF);
      eng_we[k]   = frd_d && act[k] && (rel >= 0) && (rel < int'(WIN));
      eng_slot[k] = SW'(rel);
      eng_start[k] = (state == S_START) && act[k];
    end
  end

  // ---------------- SAD blocks and disparity banks ----------------
  logic [BAW-1:0] dsp_baddr;
  logic [DW-1:0]  bank_rdata [NUM_SAD];

  for (genvar k = 0; k < NUM_SAD; k++) begin : g_sad
    sad_block #(.IMG_W(IMG_W), .PIX_W(PIX_W), .WIN(WIN), .MAX_DISP(MAX_DISP)) u_sad (
      .clk, .rst_n,
      .fill_we(eng_we[k]), .fill_slot(eng_slot[k]), .fill_col(fcol_d),
      .fill_left(fill_lpix), .fill_right(fill_rpix),
      .start(eng_start[k]), .busy(eng_busy[k]), .done(eng_done[k]),
      .res_valid(res_valid[k]), .res_x(res_x[k]), .res_disp(res_disp[k]),
      .res_sad(res_sad[k]));

    disp_ram #(.DEPTH(BDEPTH), .DW(DW)) u_bank (
      .clk, .we(res_valid[k]),
      .waddr(BAW'(32'(grp) * IMG_W + 32'(res_x[k]))), .wdata(res_disp[k]),
      .raddr(dsp_baddr), .rdata(bank_rdata[k]));
  end

  // ---------------- display read path ----------------
  logic          dsp_in, dsp_in_d;
  logic [KW-1:0] dsp_bank, dsp_bank_d;
  always_comb begin
    int unsigned yy, xx, ly;
    yy        = 32'(dsp_addr) / IMG_W;
    xx        = 32'(dsp_addr) % IMG_W;
    dsp_in    = (yy >= YMIN) && (yy <= YMAX) && (xx >= XMIN) && (xx <= XMAX);
    ly        = dsp_in ? yy - YMIN : 0;
    dsp_bank  = KW'(ly % NUM_SAD);
    dsp_baddr = BAW'((ly / NUM_SAD) * IMG_W + xx);
  end

  always_ff @(posedge clk) begin
    dsp_in_d   <= dsp_in;
    dsp_bank_d <= dsp_bank;
  end
  assign dsp_disp = dsp_in_d ? bank_rdata[dsp_bank_d] : '0;

  // ---------------- frame clock counter ----------------
  logic [31:0] cyc;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc          <= '0;
      frame_cycles <= '0;
    end else if (state == S_IDLE && start) begin
      cyc <= '0;
    end else if (busy) begin
      cyc <= cyc + 1'b1;
    end else if (done) begin
      frame_cycles <= cyc;
    end
  end

  // No SAD block may still be working once the frame has ended.
  a_blocks_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state == S_IDLE) |-> (eng_busy == '0))
    else $error("stereo_sad_top: SAD block busy while the frame is idle");

  // Image memories must not be rewritten while a frame is computed.
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) ld_we |-> !busy)
    else $error("stereo_sad_top: image load during a frame");
endmodule

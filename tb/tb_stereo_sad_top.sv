// tb_stereo_sad_top: end-to-end test of the disparity engine at its default
// size (128x128 images, 7x7 window, 16 levels, 8 SAD blocks).
//
// The testbench builds a stereo pair whose right image is the left image
// shifted by a disparity that varies over the image, with a flat patch
// (ties) and noise, loads it through the load port, runs one frame, and then
// reads the whole map through the display port. Every valid pixel is compared
// with a direct SAD search done here (smallest SAD, smallest disparity on a
// tie); every pixel of the border must read 0, and the image ports must
// return the loaded pixels. The frame must take exactly the number of clocks
// worked out from the schedule: per group of lines, (lines + WIN - 1) * IMG_W
// fill clocks plus 107 * 22 pixel clocks plus 12 clocks of hand-over and
// pipeline. A second frame with another pair checks that the engine restarts.
//
// Mechanisms counted (each must occur): line groups, a last group with idle
// blocks, rows shared by several blocks in one fill, right-window reloads,
// display reads while busy, border reads, SAD ties. Watchdog: 400000 clocks.
module tb_stereo_sad_top;
  localparam int unsigned W = 128, H = 128, PW = 8, WIN = 7, MD = 16, NS = 8;
  localparam int unsigned HALF = WIN / 2, XMIN = MD + HALF - 1, XMAX = W - HALF - 1;
  localparam int unsigned YMIN = HALF, YMAX = H - HALF - 1;
  localparam int unsigned STEPS = WIN - 1 + MD, AW = $clog2(W * H), DW = $clog2(MD);

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, ld_we, start, busy, done;
  logic [AW-1:0] ld_addr, dsp_addr; logic [PW-1:0] ld_left, ld_right, dsp_left, dsp_right;
  logic [DW-1:0] dsp_disp; logic [31:0] frame_cycles;

  stereo_sad_top dut (.clk, .rst_n, .ld_we, .ld_addr, .ld_left, .ld_right, .start, .busy, .done,
    .frame_cycles, .dsp_addr, .dsp_left, .dsp_right, .dsp_disp);

  int checks = 0, failures = 0;
  int limg [H][W]; int rimg [H][W]; int gold [H][W];
  int n_groups = 0, n_partial = 0, n_shared = 0, n_reload = 0, n_busy_reads = 0, n_border = 0, n_ties = 0;
  int busy_clocks = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism monitors ----
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_clocks++;
    if (dut.state == dut.S_START) begin
      n_groups++;
      if (dut.act != '1) n_partial++;
    end
    if ($countones(dut.eng_we) > 1) n_shared++;
    if (dut.g_sad[0].u_sad.running && dut.g_sad[0].u_sad.s == 0) n_reload++;
  end

  function automatic int sad_at(int y, int x, int d);
    int s = 0;
    for (int r = -int'(HALF); r <= int'(HALF); r++)
      for (int c = -int'(HALF); c <= int'(HALF); c++) begin
        int a, b;
        a = limg[y + r][x + c]; b = rimg[y + r][x - d + c];
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  task automatic make_pair(int seed);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        limg[y][x] = int'($urandom % 256);
        if (y >= 40 && y < 56 && x >= 50 && x < 80) limg[y][x] = 77;   // flat patch
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int dt, src;
        dt = (x / 16 + y / 16 + seed) % MD;
        src = x + dt;
        rimg[y][x] = (src < W) ? limg[y][src] : int'($urandom % 256);
        if ($urandom % 10 == 0) rimg[y][x] = (rimg[y][x] + 5) % 256;
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        gold[y][x] = 0;
        if (y >= YMIN && y <= YMAX && x >= XMIN && x <= XMAX) begin
          int best = 1 << 30, bd = 0, nmin = 0;
          for (int d = 0; d < MD; d++) begin
            int s;
            s = sad_at(y, x, d);
            if (s < best) begin best = s; bd = d; nmin = 1; end
            else if (s == best) nmin++;
          end
          gold[y][x] = bd;
          if (nmin > 1) n_ties++;
        end
      end
  endtask

  function automatic int expected_frame_clocks();
    int t = 0;
    for (int y0 = YMIN; y0 <= YMAX; y0 += NS) begin
      int n;
      n = (y0 + NS - 1 <= YMAX) ? NS : YMAX - y0 + 1;
      t += (n + WIN - 1) * W + (XMAX - XMIN + 1) * STEPS + 12;
    end
    return t;
  endfunction

  task automatic run_frame(int seed);
    int t_exp;
    make_pair(seed);
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = AW'(i); ld_left = PW'(limg[i / W][i % W]); ld_right = PW'(rimg[i / W][i % W]);
    end
    @(negedge clk);
    ld_we = 0; start = 1;
    busy_clocks = 0;
    @(negedge clk);
    start = 0;
    // display reads of the images while the map is being computed
    while (!done) begin
      int a;
      a = int'($urandom % (W * H));
      dsp_addr = AW'(a);
      @(negedge clk);
      if (busy) begin
        n_busy_reads++;
        checks++;
        if (int'(dsp_left) != limg[a / W][a % W] || int'(dsp_right) != rimg[a / W][a % W]) begin
          failures++; $display("image read at %0d wrong during frame", a);
        end
      end
    end
    t_exp = expected_frame_clocks();
    @(negedge clk);
    checks += 2;
    if (int'(frame_cycles) != t_exp) begin failures++; $display("frame_cycles %0d, expected %0d", frame_cycles, t_exp); end
    if (busy_clocks != t_exp) begin failures++; $display("busy for %0d clocks, expected %0d", busy_clocks, t_exp); end
    $display("frame %0d: %0d clocks (%.1f frames/s at 125 MHz, %.1f at 25.175 MHz)", seed, frame_cycles,
             125.0e6 / real'(frame_cycles), 25.175e6 / real'(frame_cycles));
    for (int i = 0; i < W * H; i++) begin
      int y, x;
      y = i / W; x = i % W;
      dsp_addr = AW'(i);
      @(negedge clk);
      checks++;
      if (int'(dsp_disp) != gold[y][x]) begin
        failures++;
        if (failures < 20) $display("(%0d,%0d): disparity %0d, expected %0d", x, y, dsp_disp, gold[y][x]);
      end
      if (!(y >= YMIN && y <= YMAX && x >= XMIN && x <= XMAX)) n_border++;
      checks++;
      if (int'(dsp_left) != limg[y][x] || int'(dsp_right) != rimg[y][x]) begin failures++; $display("image read at %0d wrong", i); end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("%-28s %0d", what, n);
  endtask

  initial begin
    rst_n = 0; ld_we = 0; ld_addr = 0; ld_left = 0; ld_right = 0; start = 0; dsp_addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(7);
    need("line groups", n_groups);
    need("groups with idle blocks", n_partial);
    need("rows shared by blocks", n_shared);
    need("right reloads (block 0)", n_reload);
    need("display reads while busy", n_busy_reads);
    need("border reads", n_border);
    need("SAD ties", n_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sad_block: self-checking test of one SAD block at its default size
// (128-pixel lines, 7x7 window, 16 disparity levels).
//
// For each of three lines the testbench makes 7 random left rows and right
// rows that are the left rows shifted by a disparity that changes along the
// line, with a flat stretch (all-equal SADs, so ties) and noise. It fills the
// FIFO sets, starts the block and compares every result (x, disparity, SAD)
// with a direct SAD search done here. Timing checks: one result every
// WIN-1+MAX_DISP = 22 clocks, the first one 22 + 8 clocks after start, done
// right after the result for x = XMAX. Watchdog: 40000 clocks.
module tb_sad_block;
  localparam int unsigned W = 128, PW = 8, WIN = 7, MD = 16;
  localparam int unsigned HALF = WIN / 2, XMIN = MD + HALF - 1, XMAX = W - HALF - 1;
  localparam int unsigned STEPS = WIN - 1 + MD, LAT = 6;
  localparam int unsigned CW = $clog2(W), SW = $clog2(WIN), DW = $clog2(MD), SAD_W = PW + 6;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, fill_we, start, busy, done, res_valid;
  logic [SW-1:0] fill_slot; logic [CW-1:0] fill_col, res_x;
  logic [PW-1:0] fill_left, fill_right; logic [DW-1:0] res_disp; logic [SAD_W-1:0] res_sad;

  sad_block dut (.clk, .rst_n, .fill_we, .fill_slot, .fill_col, .fill_left, .fill_right,
    .start, .busy, .done, .res_valid, .res_x, .res_disp, .res_sad);

  int checks = 0, failures = 0, cycle = 0, ties = 0;
  int lrow [WIN][W]; int rrow [WIN][W];
  int exp_d [W]; int exp_s [W];
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sad_at(int x, int d);
    int s = 0;
    for (int r = 0; r < WIN; r++)
      for (int c = -int'(HALF); c <= int'(HALF); c++) begin
        int a, b;
        a = lrow[r][x + c]; b = rrow[r][x - d + c];
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  task automatic make_line(int seed);
    for (int r = 0; r < WIN; r++) begin
      for (int c = 0; c < W; c++) lrow[r][c] = int'($urandom % 256);
      for (int c = 60; c < 80; c++) lrow[r][c] = 90;       // flat stretch
      for (int c = 0; c < W; c++) begin
        int dt, src;
        dt = ((c / 20) * 3 + seed) % MD;                     // true disparity
        src = c + dt;
        rrow[r][c] = (src < W) ? lrow[r][src] : int'($urandom % 256);
        if ($urandom % 8 == 0) rrow[r][c] = (rrow[r][c] + 3) % 256;   // noise
      end
    end
    for (int x = XMIN; x <= XMAX; x++) begin
      int best = 1 << 30, bd = 0, nmin = 0;
      for (int d = 0; d < MD; d++) begin
        int s;
        s = sad_at(x, d);
        if (s < best) begin best = s; bd = d; nmin = 1; end
        else if (s == best) nmin++;
      end
      exp_d[x] = bd; exp_s[x] = best;
      if (nmin > 1) ties++;
    end
  endtask

  task automatic run_line(int seed);
    int t_start, nres, last_res;
    make_line(seed);
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        fill_we = 1; fill_slot = SW'(r); fill_col = CW'(c);
        fill_left = PW'(lrow[r][c]); fill_right = PW'(rrow[r][c]);
      end
    @(negedge clk);
    fill_we = 0; start = 1;
    @(posedge clk); #1;
    t_start = cycle;   // edge that samples start
    @(negedge clk);
    start = 0;
    nres = 0; last_res = -1;
    while (!done) begin
      @(posedge clk); #1;
      if (res_valid) begin
        int x;
        x = int'(res_x);
        checks++;
        if (x != XMIN + nres) begin failures++; $display("result %0d for x=%0d", nres, x); end
        else if (int'(res_disp) != exp_d[x] || int'(res_sad) != exp_s[x]) begin
          failures++; $display("x=%0d: d=%0d sad=%0d, expected d=%0d sad=%0d", x, res_disp, res_sad, exp_d[x], exp_s[x]);
        end
        checks++;
        if (nres == 0 && cycle - t_start != STEPS + LAT + 2) begin
          failures++; $display("first result after %0d clocks, expected %0d", cycle - t_start, STEPS + LAT + 2);
        end
        if (nres > 0 && cycle - last_res != STEPS) begin
          failures++; $display("result interval %0d, expected %0d", cycle - last_res, STEPS);
        end
        last_res = cycle; nres++;
      end
    end
    checks++;
    if (nres != XMAX - XMIN + 1) begin failures++; $display("%0d results, expected %0d", nres, XMAX - XMIN + 1); end
    checks++;
    if (cycle - t_start != (XMAX - XMIN + 1) * STEPS + LAT + 3) begin
      failures++; $display("line took %0d clocks, expected %0d", cycle - t_start, (XMAX - XMIN + 1) * STEPS + LAT + 3);
    end
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("busy after done"); end
  endtask

  initial begin
    rst_n = 0; fill_we = 0; start = 0; fill_slot = 0; fill_col = 0; fill_left = 0; fill_right = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_line(0);
    run_line(5);
    run_line(11);
    checks++;
    if (ties == 0) begin failures++; $display("no tie was exercised"); end
    $display("ties exercised: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_min_select: self-checking test of the minimum block.
// Sends sequences of 16 SAD values per reference pixel, disparity counting
// down from 15 as the SAD block does, with random gaps in valid, forced ties
// and minima at the first and last position. The reported disparity and SAD
// are compared with an independent search (smallest SAD, smallest disparity
// on a tie). Watchdog ends the run after 50000 clocks.
module tb_min_select;
  localparam int unsigned SAD_W = 14, DW = 4, PX_W = 7, ND = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, valid, first, last, res_valid;
  logic [SAD_W-1:0] sad, res_sad; logic [DW-1:0] disp, res_disp; logic [PX_W-1:0] px_in, px_out;
  int checks = 0, failures = 0, ties = 0;
  int q_d[$], q_s[$], q_px[$];

  min_select #(.SAD_W(SAD_W), .DW(DW), .PX_W(PX_W)) dut (.clk, .rst_n, .valid, .first, .last, .sad, .disp, .px_in,
    .res_valid, .res_disp, .res_sad, .px_out);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && res_valid) begin
    int ed, es, ep;
    checks++;
    if (q_d.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      ed = q_d.pop_front(); es = q_s.pop_front(); ep = q_px.pop_front();
      if (int'(res_disp) != ed || int'(res_sad) != es || int'(px_out) != ep) begin
        failures++; $display("px %0d: got d=%0d s=%0d, expected d=%0d s=%0d", ep, res_disp, res_sad, ed, es);
      end
    end
  end

  initial begin
    int sads [ND];
    rst_n = 0; valid = 0; first = 0; last = 0; sad = 0; disp = 0; px_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      int best_s, best_d, mode;
      mode = p % 5;
      for (int d = 0; d < ND; d++) sads[d] = 100 + int'($urandom % 5000);
      if (mode == 1) sads[ND-1] = 3;              // minimum at the first value sent
      if (mode == 2) sads[0] = 3;                 // minimum at the last value sent
      if (mode == 3) begin sads[4] = 7; sads[11] = 7; end   // tie
      if (mode == 4) for (int d = 0; d < ND; d++) sads[d] = 500;   // all equal
      best_s = 1 << 30; best_d = 0;
      for (int d = 0; d < ND; d++) if (sads[d] < best_s) begin best_s = sads[d]; best_d = d; end
      if (mode >= 3) ties++;
      q_d.push_back(best_d); q_s.push_back(best_s); q_px.push_back(p % 128);
      for (int k = 0; k < ND; k++) begin
        int d;
        d = ND - 1 - k;
        while ($urandom % 4 == 0) begin valid = 0; @(negedge clk); end
        valid = 1; first = (k == 0); last = (k == ND - 1);
        sad = SAD_W'(sads[d]); disp = DW'(d); px_in = PX_W'(p % 128);
        @(negedge clk);
      end
      valid = 0;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (q_d.size() != 0) begin failures++; $display("%0d results missing", q_d.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

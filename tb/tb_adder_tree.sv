// tb_adder_tree: self-checking test of the pipelined 49-input adder tree.
// A new random input vector (including all-255 for the largest sum) enters
// every clock. Each output is matched, in order, with the sum computed in
// the testbench; the latency must be 6 clocks and a result must leave every
// clock while the input is valid every clock. Watchdog: 20000 clocks.
module tb_adder_tree;
  localparam int unsigned N = 49, IW = 8, TW = 16, LAT = 6, OW = IW + LAT;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, valid_in, valid_out; logic [TW-1:0] tag_in, tag_out;
  logic [IW-1:0] in [N]; logic [OW-1:0] sum;
  int checks = 0, failures = 0;
  int exp_sum [int]; int sent_cycle [int];
  int cycle = 0, outs = 0, last_out_cycle = -1;

  adder_tree #(.N(N), .IW(IW), .TAG_W(TW)) dut (.clk, .rst_n, .valid_in, .tag_in, .in, .valid_out, .tag_out, .sum);

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(negedge clk) if (rst_n && valid_out) begin
    int t;
    t = int'(tag_out);
    checks++;
    if (!exp_sum.exists(t)) begin failures++; $display("unexpected tag %0d", t); end
    else begin
      if (int'(sum) != exp_sum[t]) begin failures++; $display("tag %0d: sum %0d vs %0d", t, sum, exp_sum[t]); end
      checks++;
      if (cycle - sent_cycle[t] != LAT) begin failures++; $display("tag %0d latency %0d", t, cycle - sent_cycle[t]); end
      if (t != outs) begin failures++; $display("out of order: tag %0d, expected %0d", t, outs); end
      if (t < 100 && t > 0 && last_out_cycle != cycle - 1) begin failures++; $display("gap before tag %0d", t); end
    end
    outs++; last_out_cycle = cycle;
  end

  initial begin
    rst_n = 0; valid_in = 0; tag_in = 0;
    for (int i = 0; i < N; i++) in[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 160; t++) begin
      int s;
      // back-to-back for the first 100 vectors, then with bubbles
      valid_in = 1;
      s = 0;
      for (int i = 0; i < N; i++) begin
        in[i] = (t == 3) ? 8'hff : IW'($urandom);
        s += int'(in[i]);
      end
      tag_in = TW'(t); exp_sum[t] = s; sent_cycle[t] = cycle;
      @(negedge clk);
      if (t >= 100 && (t % 3 == 0)) begin valid_in = 0; @(negedge clk); end
    end
    valid_in = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (outs != 160) begin failures++; $display("%0d results, expected 160", outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

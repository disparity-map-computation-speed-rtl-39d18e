// tb_abs_diff_array: self-checking test of the 49 parallel absolute
// differences. Random windows (with equal and extreme values mixed in) are
// applied every clock; the outputs, tag and valid are checked one clock
// later. Watchdog ends the run after 20000 clocks.
module tb_abs_diff_array;
  localparam int unsigned PW = 8, N = 49, TW = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, valid_in, valid_out; logic [TW-1:0] tag_in, tag_out;
  logic [PW-1:0] left [N]; logic [PW-1:0] right [N]; logic [PW-1:0] ad [N];
  int checks = 0, failures = 0;

  abs_diff_array #(.PIX_W(PW), .N(N), .TAG_W(TW)) dut (.clk, .rst_n, .valid_in, .tag_in, .left, .right, .valid_out, .tag_out, .ad);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_ad [N]; logic exp_v; logic [TW-1:0] exp_tag;
    rst_n = 0; valid_in = 0; tag_in = 0;
    for (int i = 0; i < N; i++) begin left[i] = 0; right[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      valid_in = ($urandom % 3 != 0); tag_in = TW'(t);
      for (int i = 0; i < N; i++) begin
        case ($urandom % 4)
          0: begin left[i] = PW'($urandom); right[i] = left[i]; end
          1: begin left[i] = 8'hff; right[i] = 8'h00; end
          default: begin left[i] = PW'($urandom); right[i] = PW'($urandom); end
        endcase
        exp_ad[i] = (int'(left[i]) > int'(right[i])) ? int'(left[i]) - int'(right[i]) : int'(right[i]) - int'(left[i]);
      end
      exp_v = valid_in; exp_tag = tag_in;
      @(negedge clk);
      checks++;
      if (valid_out !== exp_v || (exp_v && tag_out !== exp_tag)) begin failures++; $display("t%0d valid/tag wrong", t); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(ad[i]) != exp_ad[i]) begin failures++; $display("t%0d i%0d: %0d vs %0d", t, i, ad[i], exp_ad[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

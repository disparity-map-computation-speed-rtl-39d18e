// tb_disp_ram: self-checking test of disp_ram (64 x 4 bit).
// Writes random values while reading other addresses, then reads all back;
// results are checked one clock after the address against a model.
// Watchdog ends the run after 20000 clocks.
module tb_disp_ram;
  localparam int unsigned DEPTH = 64, DW = 4, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [AW-1:0] waddr, raddr; logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  disp_ram #(.DEPTH(DEPTH), .DW(DW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = AW'(i); wdata = DW'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    // simultaneous write and read of different addresses
    for (int i = 0; i < DEPTH; i++) begin
      int unsigned r;
      r = (i + 7) % DEPTH;
      we = 1; waddr = AW'(i); wdata = DW'($urandom); raddr = AW'(r);
      @(negedge clk);
      checks++;
      if (rdata !== model[r]) begin failures++; $display("addr %0d: %h vs %h", r, rdata, model[r]); end
      model[i] = wdata;
    end
    we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = AW'(i);
      @(negedge clk);
      checks++;
      if (rdata !== model[i]) begin failures++; $display("addr %0d: %h vs %h", i, rdata, model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

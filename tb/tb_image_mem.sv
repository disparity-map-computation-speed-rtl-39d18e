// tb_image_mem: self-checking test of image_mem on a 16x8 image.
// Loads random pixels, then reads every address through both ports in
// different orders and compares with a model array, one clock after the
// address. Also checks that a read of the address being written returns the
// old pixel. Watchdog ends the run after 20000 clocks.
module tb_image_mem;
  localparam int unsigned W = 16, H = 8, PW = 8, AW = $clog2(W * H);
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [AW-1:0] waddr, ra, rb; logic [PW-1:0] wdata, da, db;
  logic [PW-1:0] model [W*H];
  int checks = 0, failures = 0;

  image_mem #(.IMG_W(W), .IMG_H(H), .PIX_W(PW)) dut (
    .clk, .we, .waddr, .wdata, .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; ra = 0; rb = 0;
    @(negedge clk);
    for (int i = 0; i < W*H; i++) begin
      we = 1; waddr = AW'(i); wdata = PW'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < W*H; i++) begin
      ra = AW'(i); rb = AW'(W*H - 1 - i);
      @(negedge clk);
      checks += 2;
      if (da !== model[i])         begin failures++; $display("port A addr %0d: %h vs %h", i, da, model[i]); end
      if (db !== model[W*H-1-i])   begin failures++; $display("port B addr %0d: %h vs %h", W*H-1-i, db, model[W*H-1-i]); end
    end
    // read during write: old data on both ports, new data afterwards
    we = 1; waddr = 5; wdata = ~model[5]; ra = 5; rb = 5;
    @(negedge clk);
    we = 0;
    checks += 2;
    if (da !== model[5] || db !== model[5]) begin failures++; $display("read-during-write not old data"); end
    model[5] = ~model[5];
    @(negedge clk);
    if (da !== model[5] || db !== model[5]) begin failures++; $display("new data not visible"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fifo_set: self-checking test of fifo_set (7 rows of 32 pixels).
// Fills the rows in column order as the frame sequencer does, reads the
// columns forward, rewinds the read pointer (reload) and reads again, and
// checks a partial refill of one row. Watchdog ends the run after 20000
// clocks.
module tb_fifo_set;
  localparam int unsigned W = 32, PW = 8, WIN = 7, CW = $clog2(W), SW = $clog2(WIN);
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en; logic [SW-1:0] wr_slot; logic [CW-1:0] wr_col, rd_col;
  logic [PW-1:0] wr_data; logic [PW-1:0] rd_column [WIN];
  logic [PW-1:0] model [WIN][W];
  int checks = 0, failures = 0;

  fifo_set #(.IMG_W(W), .PIX_W(PW), .WIN(WIN)) dut (.clk, .wr_en, .wr_slot, .wr_col, .wr_data, .rd_col, .rd_column);

  task automatic check_col(int c);
    rd_col = CW'(c);
    #1;
    for (int r = 0; r < WIN; r++) begin
      checks++;
      if (rd_column[r] !== model[r][c]) begin
        failures++; $display("row %0d col %0d: %h vs %h", r, c, rd_column[r], model[r][c]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_slot = 0; wr_col = 0; wr_data = 0; rd_col = 0;
    @(negedge clk);
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < W; c++) begin
        wr_en = 1; wr_slot = SW'(r); wr_col = CW'(c); wr_data = PW'($urandom); model[r][c] = wr_data;
        @(negedge clk);
      end
    wr_en = 0;
    for (int c = 0; c < W; c++) check_col(c);
    for (int c = 3; c < 10; c++) check_col(c);   // reload: read again from an earlier column
    // refill slot 2 only
    for (int c = 0; c < W; c++) begin
      @(negedge clk);
      wr_en = 1; wr_slot = 2; wr_col = CW'(c); wr_data = PW'($urandom); model[2][c] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int c = 0; c < W; c++) check_col(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

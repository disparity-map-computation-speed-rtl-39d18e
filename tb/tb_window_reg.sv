// tb_window_reg: self-checking test of the 7x7 window shift register.
// Shifts random columns in, with and without the shift enable, and after
// each clock compares all 49 outputs with a model of the last seven shifted
// columns. Watchdog ends the run after 20000 clocks.
module tb_window_reg;
  localparam int unsigned PW = 8, WIN = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic shift; logic [PW-1:0] col_in [WIN]; logic [PW-1:0] win [WIN*WIN];
  logic [PW-1:0] model [WIN][WIN];   // [row][col]
  int checks = 0, failures = 0, nshift = 0;

  window_reg #(.PIX_W(PW), .WIN(WIN)) dut (.clk, .shift, .col_in, .win);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0;
    for (int r = 0; r < WIN; r++) col_in[r] = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      shift = (i < WIN) || ($urandom % 4 != 0);
      for (int r = 0; r < WIN; r++) col_in[r] = PW'($urandom);
      @(posedge clk);
      if (shift) begin
        nshift++;
        for (int r = 0; r < WIN; r++) begin
          for (int c = 0; c < WIN - 1; c++) model[r][c] = model[r][c+1];
          model[r][WIN-1] = col_in[r];
        end
      end
      #1;
      if (nshift >= WIN)
        for (int r = 0; r < WIN; r++)
          for (int c = 0; c < WIN; c++) begin
            checks++;
            if (win[r*WIN + c] !== model[r][c]) begin
              failures++; $display("step %0d r%0d c%0d: %h vs %h", i, r, c, win[r*WIN+c], model[r][c]);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// window_reg: WIN x WIN window register built as a column shift register.
//
// The output column of a FIFO set is shifted in on the right; all columns
// move one place left and the oldest one drops out. After WIN shifts the
// register holds a complete window, and each further shift moves the window
// one pixel to the right without re-reading the other WIN-1 columns. All
// WIN*WIN pixels are visible at once for the parallel absolute differences.
//
// Interface: when shift is high, col_in enters column WIN-1 at the clock
// edge. win[r*WIN + c] is row r, column c (c = 0 leftmost), registered.
module window_reg #(
  parameter int unsigned PIX_W = stereo_pkg::PIX_W_DEF,
  parameter int unsigned WIN   = stereo_pkg::WIN_DEF
) (
  input  logic             clk,
  input  logic             shift,
  input  logic [PIX_W-1:0] col_in [WIN],
  output logic [PIX_W-1:0] win [WIN*WIN]
);
  always_ff @(posedge clk) begin
    if (shift) begin
      for (int r = 0; r < WIN; r++) begin
        for (int c = 0; c < WIN - 1; c++) win[r*WIN + c] <= win[r*WIN + c + 1];
        win[r*WIN + WIN - 1] <= col_in[r];
      end
    end
  end
endmodule

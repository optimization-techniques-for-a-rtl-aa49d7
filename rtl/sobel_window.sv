// sobel_window: the 3x3 neighbourhood register of the windowed Sobel filter.
//
// Adjacent output pixels share six of their nine input pixels, so instead of
// reading nine pixels from the line buffer per output, the window keeps the
// last three columns in registers. On each shift, columns 1 and 2 move to
// columns 0 and 1 and the column just read from the line buffer (one pixel
// from each of three lines) enters column 2. At the start of a line two shifts
// load columns 0 and 1 before the first output is formed.
//
// Ports: shift (enable) and col_in ([0] = top line .. [2] = bottom line) in;
// win ([row][col]) out, valid the cycle after the shift. Reset clears the
// window to zero (the reset value is this design's choice).
module sobel_window
  import sobel_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    shift,
  input  column_t col_in,
  output window_t win
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
    end else if (shift) begin
      for (int m = 0; m < 3; m++) begin
        win[m][0] <= win[m][1];
        win[m][1] <= win[m][2];
        win[m][2] <= col_in[m];
      end
    end
  end

endmodule

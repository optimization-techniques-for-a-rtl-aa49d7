// sobel_kernel: gradient magnitude of one 3x3 pixel window.
//
// Function: sum_x = sum(win[m][n]*DX[m][n]), sum_y = sum(win[m][n]*DY[m][n]),
// mag = |sum_x| + |sum_y|, clamped to 255. This is the arithmetic of the
// Sobel operator with the kernels printed in the C reference; the L1 norm and
// the clamp to 255 are taken from it as well.
//
// The block is purely combinational: the surrounding pipeline registers its
// output. Because the kernel coefficients are compile-time constants, the nine
// "multiplications" reduce to shifts and adds. Each partial sum fits an
// 11-bit signed value (|sum| <= 4*255); the magnitude fits 11 bits unsigned.
//
// Ports: win (3x3 window, [row][col]) in; mag (8-bit edge strength) out;
// sat is high when the magnitude was clamped (a diagnostic output).
module sobel_kernel
  import sobel_pkg::*;
(
  input  window_t win,
  output pixel_t  mag,
  output logic    sat
);

  localparam int unsigned SUM_W = PIX_W + 4;   // signed, holds +-4*PIX_MAX

  logic signed [SUM_W-1:0] sum_x, sum_y;
  logic        [SUM_W-1:0] abs_x, abs_y, total;

  always_comb begin
    sum_x = '0;
    sum_y = '0;
    for (int m = 0; m < 3; m++) begin
      for (int n = 0; n < 3; n++) begin
        sum_x += SUM_W'(DX[m][n]) * $signed({4'b0000, win[m][n]});
        sum_y += SUM_W'(DY[m][n]) * $signed({4'b0000, win[m][n]});
      end
    end
    abs_x = sum_x[SUM_W-1] ? SUM_W'(-sum_x) : SUM_W'(sum_x);
    abs_y = sum_y[SUM_W-1] ? SUM_W'(-sum_y) : SUM_W'(sum_y);
    total = abs_x + abs_y;
    sat   = (total > SUM_W'(PIX_MAX));
    mag   = sat ? pixel_t'(PIX_MAX) : total[PIX_W-1:0];
  end

endmodule

// sobel_pkg: types and constants shared by the Sobel edge-detection accelerator.
//
// Pixels are 8-bit unsigned grey levels (the C source works on unsigned char
// images). A window is the 3x3 neighbourhood of one output pixel, indexed
// [row][column] with row 0 the upper image line and column 0 the leftmost
// pixel. DX and DY are the two 3x3 convolution kernels of the Sobel operator,
// in the same [row][column] order. The default frame size is 640x480.
package sobel_pkg;

  localparam int unsigned PIX_W = 8;
  localparam int unsigned DEFAULT_ROWS = 480;
  localparam int unsigned DEFAULT_COLS = 640;

  // Number of lines held by the line buffer: three are read while the fourth
  // is being filled with the next input line.
  localparam int unsigned LB_LINES = 4;

  typedef logic [PIX_W-1:0] pixel_t;
  typedef pixel_t [2:0][2:0] window_t;   // [row][col]
  typedef pixel_t [2:0]      column_t;   // [row]: 0 = top, 2 = bottom

  typedef logic [$clog2(LB_LINES)-1:0] bank_t;

  // Horizontal-gradient kernel (responds to vertical edges).
  localparam int DX [3][3] = '{'{1, 0, -1}, '{2, 0, -2}, '{1, 0, -1}};
  // Vertical-gradient kernel (responds to horizontal edges).
  localparam int DY [3][3] = '{'{1, 2, 1}, '{0, 0, 0}, '{-1, -2, -1}};

  // Largest output value; larger gradient magnitudes are clamped to it.
  localparam int unsigned PIX_MAX = (1 << PIX_W) - 1;

endpackage

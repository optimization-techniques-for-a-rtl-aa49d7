// tb_sobel_top_full: two back-to-back 640x480 frames through the accelerator
// at its default parameters.
//
// Each image is a pseudo-random texture with a bright rectangle (placed
// differently in the two frames), so that the output has flat areas, strong
// (clamped) edges and noise. The writer keeps the input FIFO filled, running
// straight on into the second frame's pixels, and the reader empties the
// output FIFO every cycle: the streaming environment of one pixel per cycle
// the design is sized for. The second frame is started in the first cycle in
// which the accelerator is idle again.
//
// Checked: every one of the 2 x 638 x 478 output pixels against a reference
// computed here, the frame-end flags, the start-to-done time of the first
// frame, which must be (ROWS+1)*COLS + 3 = 307,843 cycles (at most the
// 310,711-cycle latency reported for the HLS-generated windowed accelerator,
// 0.2 % above the 307,200-cycle bound of one input pixel per cycle), and the
// done-to-done period of the second frame, which must be at most 3 cycles
// longer. The frame rates this period gives at 150 MHz and at 120.6 MHz are
// printed.
module tb_sobel_top_full;
  import sobel_pkg::*;

  localparam int unsigned ROWS = DEFAULT_ROWS;
  localparam int unsigned COLS = DEFAULT_COLS;
  localparam int unsigned NPIX = ROWS * COLS;
  localparam int unsigned NOUT = (ROWS - 2) * (COLS - 2);
  localparam int unsigned NFRAMES = 2;

  logic   clk = 0, rst_n = 0, start = 0;
  logic   idle, done;
  pixel_t in_data = '0;
  logic   in_write = 0, in_full_n;
  pixel_t out_data;
  logic   out_last, out_read = 0, out_empty_n;
  logic [4:0] in_level, out_level;

  pixel_t img  [NFRAMES][ROWS][COLS];
  pixel_t refo [NFRAMES][NOUT];
  int     in_pos = 0, out_pos = 0, mismatches = 0, n_sat = 0, n_done = 0;
  int     done_cycle [NFRAMES];
  int     checks = 0, failures = 0, cycle = 0;

  sobel_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .idle(idle), .done(done),
    .in_data(in_data), .in_write(in_write), .in_full_n(in_full_n),
    .out_data(out_data), .out_last(out_last), .out_read(out_read), .out_empty_n(out_empty_n),
    .in_level(in_level), .out_level(out_level)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    for (int f = 0; f < NFRAMES; f++) begin
      automatic int r0 = 100 + 60 * f, c0 = 200 - 90 * f;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if (r >= r0 && r < r0 + 200 && c >= c0 && c < c0 + 250)
            img[f][r][c] = pixel_t'(200 + ($urandom & 15));
          else
            img[f][r][c] = pixel_t'(40 + ($urandom & 31));
      for (int i = 1; i < ROWS - 1; i++)
        for (int j = 1; j < COLS - 1; j++) begin
          int gx, gy, s;
          gx = (int'(img[f][i-1][j-1]) + 2 * int'(img[f][i][j-1]) + int'(img[f][i+1][j-1]))
             - (int'(img[f][i-1][j+1]) + 2 * int'(img[f][i][j+1]) + int'(img[f][i+1][j+1]));
          gy = (int'(img[f][i-1][j-1]) + 2 * int'(img[f][i-1][j]) + int'(img[f][i-1][j+1]))
             - (int'(img[f][i+1][j-1]) + 2 * int'(img[f][i+1][j]) + int'(img[f][i+1][j+1]));
          s = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
          refo[f][(i - 1) * (COLS - 2) + (j - 1)] = pixel_t'(s > 255 ? 255 : s);
          if (s > 255) n_sat++;
        end
    end
  end

  always @(negedge clk) begin
    if (rst_n && done) begin
      if (n_done < NFRAMES) done_cycle[n_done] = cycle;
      n_done++;
    end
    in_write = rst_n && in_full_n && (in_pos < NFRAMES * NPIX);
    in_data  = (in_pos < NFRAMES * NPIX)
             ? img[in_pos / NPIX][(in_pos % NPIX) / COLS][in_pos % COLS] : '0;
    out_read = rst_n && out_empty_n;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_write) in_pos <= in_pos + 1;
      if (out_read) begin
        automatic int f = out_pos / NOUT, k = out_pos % NOUT;
        checks++;
        if (f >= NFRAMES || out_data != refo[f][k] || out_last != (k == NOUT - 1)) begin
          failures++;
          if (mismatches++ < 10)
            $display("FAIL frame %0d out %0d: got %0d last=%0b expected %0d", f, k, out_data,
                     out_last, f < NFRAMES ? refo[f][k] : -1);
        end
        out_pos <= out_pos + 1;
      end
    end
  end

  initial begin
    int t0, period, latency;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    t0    = cycle;
    @(negedge clk);
    start = 0;
    // second frame: start as soon as the accelerator is idle again
    while (n_done < 1) @(negedge clk);
    while (!idle) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (n_done < NFRAMES) @(negedge clk);
    repeat (5) @(negedge clk);
    latency = done_cycle[0] - t0;
    period  = done_cycle[1] - done_cycle[0];
    checks++;
    if (out_pos != NFRAMES * NOUT || in_pos != NFRAMES * NPIX || !idle) begin
      failures++;
      $display("FAIL %0d outputs (expected %0d), %0d inputs, idle=%0b",
               out_pos, NFRAMES * NOUT, in_pos, idle);
    end
    checks++;
    if (latency != (ROWS + 1) * COLS + 3 || latency > 310711) begin
      failures++;
      $display("FAIL first frame took %0d cycles, expected %0d", latency, (ROWS + 1) * COLS + 3);
    end
    checks++;
    if (period < latency || period > latency + 3) begin
      failures++;
      $display("FAIL frame period %0d cycles, expected %0d to %0d", period, latency, latency + 3);
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL test images have no clamped output"); end
    $display("%0dx%0d: first frame %0d cycles start to done, frame period %0d cycles",
             COLS, ROWS, latency, period);
    $display("frame rate: %0d fps at 150 MHz, %0d fps at 120.6 MHz; %0d outputs, %0d clamped",
             150_000_000 / period, 120_600_000 / period, out_pos, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycle == 700000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

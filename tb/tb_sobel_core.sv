// tb_sobel_core: runs whole frames through the accelerator core.
//
// The testbench plays both FIFOs: it presents the input image in raster order
// on src_dout/src_empty_n and accepts output pixels on dst_din while
// dst_full_n is high. The reference output is computed in the testbench from
// the definition of the operator over the interior pixels: Gx and Gy as
// weighted differences of the neighbours, |Gx|+|Gy| clamped to 255.
// Frame 1 runs with no stalls and must finish in (ROWS+1)*COLS + 3 cycles
// with one output per cycle inside each row; frames 2 and 3 run with random
// input starvation and output back-pressure. Every output pixel, its order,
// dst_last, done and idle are checked.
module tb_sobel_core;
  import sobel_pkg::*;

  localparam int unsigned ROWS = 9;
  localparam int unsigned COLS = 11;
  localparam int unsigned NOUT = (ROWS - 2) * (COLS - 2);

  logic   clk = 0, rst_n = 0, start = 0;
  logic   idle, done;
  pixel_t src_dout;
  logic   src_empty_n, src_read;
  pixel_t dst_din;
  logic   dst_full_n = 0, dst_write, dst_last;

  pixel_t img  [ROWS][COLS];
  pixel_t refo [NOUT];
  int     in_pos, out_pos, in_rate, out_rate, done_cycle;
  bit     frame_done;
  logic   in_gate;
  int     checks = 0, failures = 0, cycle = 0;
  int     n_starve = 0, n_backpressure = 0, n_sat = 0;

  sobel_core #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .idle(idle), .done(done),
    .src_dout(src_dout), .src_empty_n(src_empty_n), .src_read(src_read),
    .dst_din(dst_din), .dst_full_n(dst_full_n), .dst_write(dst_write), .dst_last(dst_last)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  assign src_empty_n = in_gate && (in_pos < ROWS * COLS);
  assign src_dout    = (in_pos < ROWS * COLS) ? img[in_pos / COLS][in_pos % COLS] : '0;

  function automatic void make_frame(int kind);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        case (kind)
          0: img[r][c] = pixel_t'($urandom);
          1: img[r][c] = (c > COLS / 2) ? 8'd240 : 8'd10;          // vertical edge
          default: img[r][c] = pixel_t'((r * 7 + c * 3) & 255);  // smooth ramp
        endcase
    for (int i = 1; i < ROWS - 1; i++)
      for (int j = 1; j < COLS - 1; j++) begin
        int gx, gy, s;
        gx = (int'(img[i-1][j-1]) + 2 * int'(img[i][j-1]) + int'(img[i+1][j-1]))
           - (int'(img[i-1][j+1]) + 2 * int'(img[i][j+1]) + int'(img[i+1][j+1]));
        gy = (int'(img[i-1][j-1]) + 2 * int'(img[i-1][j]) + int'(img[i-1][j+1]))
           - (int'(img[i+1][j-1]) + 2 * int'(img[i+1][j]) + int'(img[i+1][j+1]));
        s = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        refo[(i - 1) * (COLS - 2) + (j - 1)] = pixel_t'(s > 255 ? 255 : s);
        if (s > 255) n_sat++;
      end
  endfunction

  // input side: consume on src_read, randomly withhold data
  always @(posedge clk) begin
    if (rst_n && src_read) in_pos <= in_pos + 1;
  end
  always @(negedge clk) begin
    // done as seen just before the next rising edge
    if (rst_n && done) begin
      frame_done = 1;
      done_cycle = cycle;
    end
    in_gate    = ($urandom_range(0, 99) < in_rate);
    dst_full_n = ($urandom_range(0, 99) < out_rate);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (src_read === 1'b0 && in_pos < ROWS * COLS && !in_gate && !idle) n_starve++;
      if (!dst_full_n && !idle) n_backpressure++;
      if (dst_write) begin
        checks++;
        if (out_pos >= NOUT || dst_din != refo[out_pos] || dst_last != (out_pos == NOUT - 1)) begin
          failures++;
          $display("FAIL out %0d: got %0d last=%0b expected %0d", out_pos, dst_din, dst_last,
                   out_pos < NOUT ? refo[out_pos] : -1);
        end
        out_pos <= out_pos + 1;
      end
    end
  end

  task automatic run_frame(int kind, int irate, int orate, bit check_time);
    int t0, tdone;
    make_frame(kind);
    in_rate  = irate;
    out_rate = orate;
    @(negedge clk);
    in_pos  = 0;
    out_pos = 0;
    frame_done = 0;
    start   = 1;
    t0      = cycle;
    @(negedge clk);
    start = 0;
    while (!frame_done) @(negedge clk);
    tdone = done_cycle;
    @(negedge clk);
    checks++;
    if (out_pos != NOUT || in_pos != ROWS * COLS) begin
      failures++;
      $display("FAIL frame %0d: %0d outputs, %0d inputs", kind, out_pos, in_pos);
    end
    checks++;
    if (!idle) begin failures++; $display("FAIL not idle after done"); end
    if (check_time) begin
      checks++;
      if (tdone - t0 != (ROWS + 1) * COLS + 3) begin
        failures++;
        $display("FAIL frame took %0d cycles, expected %0d", tdone - t0, (ROWS + 1) * COLS + 3);
      end
      $display("frame of %0dx%0d: %0d cycles", ROWS, COLS, tdone - t0);
    end
  endtask

  initial begin
    in_pos = 0; out_pos = 0; in_rate = 100; out_rate = 100; in_gate = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!idle) begin failures++; $display("FAIL not idle after reset"); end
    run_frame(0, 100, 100, 1);
    run_frame(1, 60, 70, 0);
    run_frame(2, 85, 40, 0);
    run_frame(0, 30, 90, 0);
    checks++;
    if (n_starve == 0 || n_backpressure == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage starve=%0d backpressure=%0d saturated=%0d", n_starve, n_backpressure, n_sat);
    end
    $display("starve=%0d backpressure=%0d saturated=%0d", n_starve, n_backpressure, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycle == 50000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sobel_top: end-to-end test of the accelerator with its input and output
// FIFOs, at a reduced frame size.
//
// A writer pushes frames into the input FIFO whenever in_full_n allows (with
// random pauses); a reader pops the output FIFO (with random pauses). Each
// output pixel is compared with a reference computed here from the operator's
// definition (|Gx|+|Gy| over the interior pixels, clamped to 255). Four
// frames are run one after another: a random one at full speed, whose start-to-
// done time must be (ROWS+1)*COLS + 3 cycles, then frames with a slow writer,
// a slow reader, and a step image.
//
// Each mechanism of the design is counted and must happen at least once:
// prefill steps, compute steps that also fill the fourth line, compute steps
// without input (last two rows), each of the four line-buffer rotations,
// window shifts, clamped outputs, input starvation (core waits for an empty
// input FIFO), output back-pressure (core waits for a full output FIFO), a
// full input FIFO blocking the writer.
module tb_sobel_top;
  import sobel_pkg::*;

  localparam int unsigned ROWS  = 10;
  localparam int unsigned COLS  = 12;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned NOUT  = (ROWS - 2) * (COLS - 2);

  logic   clk = 0, rst_n = 0, start = 0;
  logic   idle, done;
  pixel_t in_data = '0;
  logic   in_write = 0, in_full_n;
  pixel_t out_data;
  logic   out_last, out_read = 0, out_empty_n;
  logic [$clog2(DEPTH):0] in_level, out_level;

  pixel_t img  [ROWS][COLS];
  pixel_t refo [NOUT];
  int     in_pos, out_pos, wr_rate, rd_rate, done_cycle;
  bit     frame_done;
  int     checks = 0, failures = 0, cycle = 0;

  // mechanism counters
  int n_prefill = 0, n_fill_compute = 0, n_tail = 0, n_shift = 0, n_sat = 0;
  int n_starve = 0, n_backpressure = 0, n_in_full = 0, n_frames = 0;
  int n_rot [LB_LINES];

  sobel_top #(.ROWS(ROWS), .COLS(COLS), .FIFO_DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .idle(idle), .done(done),
    .in_data(in_data), .in_write(in_write), .in_full_n(in_full_n),
    .out_data(out_data), .out_last(out_last), .out_read(out_read), .out_empty_n(out_empty_n),
    .in_level(in_level), .out_level(out_level)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic void make_frame(int kind);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        case (kind)
          1: img[r][c] = (r > ROWS / 2) ? 8'd250 : 8'd5;            // horizontal edge
          2: img[r][c] = pixel_t'((r * 5 + c * 9) & 255);         // ramp
          default: img[r][c] = pixel_t'($urandom);
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
      end
  endfunction

  // writer and reader: decide just after the falling edge, act on the rising
  always @(negedge clk) begin
    if (rst_n && done) begin
      frame_done = 1;
      done_cycle = cycle;
    end
    in_write = rst_n && in_full_n && (in_pos < ROWS * COLS) && ($urandom_range(0, 99) < wr_rate);
    in_data  = (in_pos < ROWS * COLS) ? img[in_pos / COLS][in_pos % COLS] : '0;
    out_read = rst_n && out_empty_n && ($urandom_range(0, 99) < rd_rate);
    if (rst_n && !in_full_n && in_pos < ROWS * COLS) n_in_full++;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_write) in_pos <= in_pos + 1;
      if (out_read) begin
        checks++;
        if (out_pos >= NOUT || out_data != refo[out_pos] || out_last != (out_pos == NOUT - 1)) begin
          failures++;
          $display("FAIL out %0d: got %0d last=%0b expected %0d", out_pos, out_data, out_last,
                   out_pos < NOUT ? refo[out_pos] : -1);
        end
        out_pos <= out_pos + 1;
      end
      // mechanisms, observed inside the core
      if (dut.u_core.adv && dut.u_core.busy) begin
        if (!dut.u_core.rd_en) n_prefill++;
        else if (dut.u_core.wr_en) n_fill_compute++;
        else n_tail++;
        if (dut.u_core.rd_en) n_rot[dut.u_core.rd_top]++;
      end
      if (dut.u_core.u_win.shift) n_shift++;
      if (dut.u_core.busy && dut.u_core.need_in && !dut.u_core.src_empty_n && dut.u_core.out_free)
        n_starve++;
      if (dut.u_core.out_valid && !dut.u_core.dst_full_n) n_backpressure++;
    end
  end

  task automatic run_frame(int kind, int wrate, int rrate, bit check_time);
    int t0, outs_before;
    make_frame(kind);
    for (int k = 0; k < NOUT; k++) if (refo[k] == 8'd255) n_sat++;
    // the previous frame's output must be drained from the reader's view first
    wr_rate = wrate;
    rd_rate = rrate;
    @(negedge clk);
    if (!idle) begin
      checks++;
      failures++;
      $display("FAIL not idle at frame start");
    end
    in_pos     = 0;
    out_pos    = 0;
    frame_done = 0;
    start      = 1;
    t0         = cycle;
    @(negedge clk);
    start = 0;
    while (!frame_done) @(negedge clk);
    // let the reader drain the output FIFO
    while (out_pos < NOUT && cycle - done_cycle < 1000) @(negedge clk);
    checks++;
    if (out_pos != NOUT || in_pos != ROWS * COLS) begin
      failures++;
      $display("FAIL frame kind %0d: %0d outputs, %0d inputs", kind, out_pos, in_pos);
    end
    if (check_time) begin
      checks++;
      if (done_cycle - t0 != (ROWS + 1) * COLS + 3) begin
        failures++;
        $display("FAIL frame took %0d cycles, expected %0d", done_cycle - t0, (ROWS + 1) * COLS + 3);
      end
      $display("full-speed frame %0dx%0d: %0d cycles start to done", ROWS, COLS, done_cycle - t0);
    end
    n_frames++;
  endtask

  initial begin
    n_rot = '{default: 0};
    in_pos = ROWS * COLS; out_pos = 0; wr_rate = 100; rd_rate = 100;
    make_frame(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(0, 100, 100, 1);
    run_frame(1, 35, 100, 0);
    run_frame(2, 100, 30, 0);
    run_frame(0, 60, 60, 0);
    begin
      automatic string names [10] = '{"prefill", "fill+compute", "tail rows without input", "rotation 0",
                            "rotation 1", "rotation 2", "rotation 3", "window shift",
                            "clamped output", "frames"};
      int    counts [10];
      counts = '{n_prefill, n_fill_compute, n_tail, n_rot[0], n_rot[1], n_rot[2], n_rot[3],
                 n_shift, n_sat, n_frames};
      for (int k = 0; k < 10; k++) begin
        checks++;
        if (counts[k] == 0) begin failures++; $display("FAIL mechanism never seen: %s", names[k]); end
        $display("  %-24s %0d", names[k], counts[k]);
      end
      checks += 3;
      if (n_starve == 0) begin failures++; $display("FAIL input starvation never seen"); end
      if (n_backpressure == 0) begin failures++; $display("FAIL output back-pressure never seen"); end
      if (n_in_full == 0) begin failures++; $display("FAIL input FIFO never full"); end
      $display("  %-24s %0d", "input starvation", n_starve);
      $display("  %-24s %0d", "output back-pressure", n_backpressure);
      $display("  %-24s %0d", "input FIFO full", n_in_full);
    end
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

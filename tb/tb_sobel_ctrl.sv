// tb_sobel_ctrl: checks the step sequence of the loop controller.
//
// The expected sequence is built from the loop nest of the windowed filter:
// three prefill lines (banks 0, 1, 2, one input pixel per step, nothing
// read), then for each output row i = 1 .. ROWS-2 one sweep over the columns
// that reads banks (i-1)%4 .. (i+1)%4 at column k, writes input line i+2 into
// bank (i+2)%4 while i < ROWS-2, and emits an output for k >= 2. The
// controller is driven with a random adv; every cycle with busy && adv must
// match the next expected step. Two frames are run; each must take exactly
// (ROWS+1)*COLS steps, and with adv held high exactly that many cycles.
// A start pulse in the middle of a frame must be ignored.
module tb_sobel_ctrl;
  import sobel_pkg::*;

  localparam int unsigned ROWS = 7;
  localparam int unsigned COLS = 5;
  localparam int unsigned AW = $clog2(COLS);

  typedef struct packed {
    logic          need_in;
    logic          wr_en;
    bank_t         wr_bank;
    logic [AW-1:0] col;
    logic          rd_en;
    bank_t         rd_top;
    logic          emit;
    logic          last;
  } step_t;

  logic          clk = 0, rst_n = 0, start = 0, adv = 0;
  logic          busy, need_in, wr_en, rd_en, emit, last;
  bank_t         wr_bank, rd_top;
  logic [AW-1:0] col;

  step_t exp_steps[$];
  int    checks = 0, failures = 0, cycle = 0;

  sobel_ctrl #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .adv(adv), .busy(busy),
    .need_in(need_in), .wr_en(wr_en), .wr_bank(wr_bank), .col(col),
    .rd_en(rd_en), .rd_top(rd_top), .emit(emit), .last(last)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic void build_expected();
    step_t s;
    exp_steps.delete();
    for (int p = 0; p < 3; p++)
      for (int k = 0; k < COLS; k++) begin
        s = '0;
        s.need_in = 1; s.wr_en = 1; s.wr_bank = bank_t'(p); s.col = AW'(k);
        s.rd_top = bank_t'(0);
        exp_steps.push_back(s);
      end
    for (int i = 1; i <= ROWS - 2; i++)
      for (int k = 0; k < COLS; k++) begin
        s = '0;
        s.need_in = (i < ROWS - 2);
        s.wr_en   = (i < ROWS - 2);
        s.wr_bank = bank_t'((i + 2) % 4);
        s.col     = AW'(k);
        s.rd_en   = 1;
        s.rd_top  = bank_t'((i - 1) % 4);
        s.emit    = (k >= 2);
        s.last    = (i == ROWS - 2) && (k == COLS - 1);
        exp_steps.push_back(s);
      end
  endfunction

  task automatic run_frame(int adv_pct, bit restart = 0);
    int steps = 0, cycles = 0;
    step_t got, want;
    build_expected();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (busy) begin
      adv = ($urandom_range(0, 99) < adv_pct);
      // a start pulse in the middle of a frame must be ignored
      start = restart && (cycles == COLS + 2);
      #1;
      if (adv) begin
        got = {need_in, wr_en, wr_bank, col, rd_en, rd_top, emit, last};
        want = exp_steps.pop_front();
        // wr_bank and rd_top only matter when the step writes or reads
        if (!want.wr_en) begin got.wr_bank = '0; want.wr_bank = '0; end
        if (!want.rd_en) begin got.rd_top = '0; want.rd_top = '0; end
        checks++;
        if (got !== want) begin
          failures++;
          $display("FAIL step %0d: got %p expected %p", steps, got, want);
        end
        steps++;
      end
      cycles++;
      @(negedge clk);
    end
    adv = 0;
    start = 0;
    checks++;
    if (steps != (ROWS + 1) * COLS || exp_steps.size() != 0) begin
      failures++;
      $display("FAIL frame had %0d steps, expected %0d", steps, (ROWS + 1) * COLS);
    end
    if (adv_pct == 100) begin
      checks++;
      if (cycles != (ROWS + 1) * COLS) begin
        failures++;
        $display("FAIL frame took %0d cycles at full rate, expected %0d", cycles, (ROWS + 1) * COLS);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after reset"); end
    run_frame(100);
    run_frame(60);
    // start while busy must not restart the frame
    run_frame(100, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycle == 5000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

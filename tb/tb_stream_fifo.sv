// tb_stream_fifo: checks order, flags and fill count of the pixel FIFO.
//
// Random writes and reads (the writer respects full_n, the reader empty_n)
// run against a queue model. Checked after every clock: head data, empty_n,
// full_n (with read low), count. Phases with a slow reader and with a slow
// writer drive the FIFO full and empty; a write together with a read while
// full is also counted.
module tb_stream_fifo;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned AW = $clog2(DEPTH);

  logic             clk = 0, rst_n = 0, write = 0, read = 0;
  logic [WIDTH-1:0] din = '0, dout;
  logic             full_n, empty_n;
  logic [AW:0]      count;

  logic [WIDTH-1:0] q[$];
  int checks = 0, failures = 0, cycle = 0;
  int n_full = 0, n_empty = 0, n_rw_full = 0;

  stream_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .write(write), .full_n(full_n),
    .dout(dout), .read(read), .empty_n(empty_n), .count(count)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check_state();
    checks++;
    if (count != (AW+1)'(q.size()) || empty_n != (q.size() != 0)) begin
      failures++;
      $display("FAIL count=%0d empty_n=%0b model size=%0d", count, empty_n, q.size());
    end
    if (q.size() != 0) begin
      checks++;
      if (dout != q[0]) begin failures++; $display("FAIL head %h expected %h", dout, q[0]); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check_state();
    for (int t = 0; t < 4000; t++) begin
      int wp, rp;
      // phase: 0 balanced, 1 slow reader, 2 slow writer
      case ((t / 500) % 3)
        0: begin wp = 50; rp = 50; end
        1: begin wp = 80; rp = 20; end
        default: begin wp = 20; rp = 80; end
      endcase
      @(negedge clk);
      read  = 0;
      #0;
      checks++;
      if (full_n != (q.size() < DEPTH)) begin failures++; $display("FAIL full_n=%0b size=%0d", full_n, q.size()); end
      read  = empty_n && ($urandom_range(0, 99) < rp);
      din   = WIDTH'($urandom);
      #1;
      write = full_n && ($urandom_range(0, 99) < wp);
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      if (q.size() == DEPTH && read && write) n_rw_full++;
      @(posedge clk);
      if (read) void'(q.pop_front());
      if (write) q.push_back(din);
      #1 check_state();
    end
    checks++;
    if (n_full == 0 || n_empty == 0 || n_rw_full == 0) begin
      failures++;
      $display("FAIL coverage full=%0d empty=%0d rw_full=%0d", n_full, n_empty, n_rw_full);
    end
    $display("full=%0d empty=%0d rw_full=%0d", n_full, n_empty, n_rw_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycle == 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

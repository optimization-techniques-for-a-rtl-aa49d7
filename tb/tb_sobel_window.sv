// tb_sobel_window: checks that the 3x3 window shifts one column per enable.
//
// A reference model keeps the last three columns pushed while shift was high;
// random columns are pushed with shift randomly low, and the whole window is
// compared after every clock. Reset must clear the window.
module tb_sobel_window;
  import sobel_pkg::*;

  logic    clk = 0, rst_n = 0, shift = 0;
  column_t col_in = '0;
  window_t win;
  window_t model;
  int      checks = 0, failures = 0, cycle = 0;

  sobel_window dut (.clk(clk), .rst_n(rst_n), .shift(shift), .col_in(col_in), .win(win));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (win != '0) begin failures++; $display("FAIL reset: %h", win); end
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      for (int r = 0; r < 3; r++) col_in[r] = pixel_t'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int r = 0; r < 3; r++) begin
          model[r][0] = model[r][1];
          model[r][1] = model[r][2];
          model[r][2] = col_in[r];
        end
      end
      #1;
      checks++;
      if (win != model) begin
        failures++;
        $display("FAIL t=%0d win=%h expected %h", t, win, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycle == 10000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sobel_kernel: checks the Sobel magnitude of single 3x3 windows.
//
// The reference spells the two kernels out as explicit weighted sums of the
// nine pixels (Gx = left column minus right column with the middle row
// weighted 2, Gy = top row minus bottom row with the middle column weighted
// 2), takes |Gx|+|Gy| and clamps to 255. Directed windows (flat, vertical
// and horizontal steps, the largest possible gradient) are followed by random
// windows, with random windows biased towards 0 and 255 so that both the
// clamped and the unclamped ranges are hit.
module tb_sobel_kernel;
  import sobel_pkg::*;

  window_t win;
  pixel_t  mag;
  logic    sat;
  int      checks = 0, failures = 0, n_sat = 0, n_unsat = 0;

  sobel_kernel dut (.win(win), .mag(mag), .sat(sat));

  function automatic int ref_mag(window_t w);
    int gx, gy, s;
    gx = (int'(w[0][0]) + 2*int'(w[1][0]) + int'(w[2][0]))
       - (int'(w[0][2]) + 2*int'(w[1][2]) + int'(w[2][2]));
    gy = (int'(w[0][0]) + 2*int'(w[0][1]) + int'(w[0][2]))
       - (int'(w[2][0]) + 2*int'(w[2][1]) + int'(w[2][2]));
    s = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return (s > 255) ? 255 : s;
  endfunction

  function automatic int raw_mag(window_t w);
    int gx, gy;
    gx = (int'(w[0][0]) + 2*int'(w[1][0]) + int'(w[2][0]))
       - (int'(w[0][2]) + 2*int'(w[1][2]) + int'(w[2][2]));
    gy = (int'(w[0][0]) + 2*int'(w[0][1]) + int'(w[0][2]))
       - (int'(w[2][0]) + 2*int'(w[2][1]) + int'(w[2][2]));
    return (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
  endfunction

  task automatic check(window_t w, string what);
    int exp;
    win = w;
    #1;
    exp = ref_mag(w);
    checks++;
    if (int'(mag) != exp || sat != (raw_mag(w) > 255)) begin
      failures++;
      $display("FAIL %s: win=%h mag=%0d sat=%0b expected %0d", what, w, mag, sat, exp);
    end
    if (raw_mag(w) > 255) n_sat++; else n_unsat++;
  endtask

  function automatic pixel_t rnd_pix(int mode);
    case (mode)
      0: return pixel_t'($urandom_range(0, 255));
      1: return ($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0;
      default: return pixel_t'($urandom_range(100, 140));
    endcase
  endfunction

  initial begin
    window_t w;
    // flat area: no edge
    w = {9{8'd77}};
    check(w, "flat");
    // vertical step, left dark right bright: Gx = -4*200
    w = '{'{8'd0, 8'd0, 8'd200}, '{8'd0, 8'd0, 8'd200}, '{8'd0, 8'd0, 8'd200}};
    check(w, "vertical edge");
    // gentle horizontal ramp, unclamped: Gy = 4*(10-0) = 40
    w = '{'{8'd10, 8'd10, 8'd10}, '{8'd5, 8'd5, 8'd5}, '{8'd0, 8'd0, 8'd0}};
    check(w, "horizontal ramp");
    // single bright pixel at a corner: Gx = 1, Gy = 1
    w = '0; w[0][0] = 8'd1;
    check(w, "corner");
    // largest gradient
    w = '{'{8'd255, 8'd255, 8'd0}, '{8'd255, 8'd0, 8'd0}, '{8'd0, 8'd0, 8'd0}};
    check(w, "diagonal");
    for (int t = 0; t < 3000; t++) begin
      automatic int mode = t % 3;
      for (int m = 0; m < 3; m++)
        for (int n = 0; n < 3; n++)
          w[m][n] = rnd_pix(mode);
      check(w, "random");
    end
    checks++;
    if (n_sat == 0 || n_unsat == 0) begin
      failures++;
      $display("FAIL coverage: clamped=%0d unclamped=%0d", n_sat, n_unsat);
    end
    $display("clamped=%0d unclamped=%0d", n_sat, n_unsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

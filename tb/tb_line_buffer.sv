// tb_line_buffer: checks the four-bank line buffer and its bank rotation.
//
// A model array lb[4][COLS] mirrors every write. Each cycle a random write
// (random bank, column, data) and a random read (random column, random upper
// bank) are issued; one cycle later col_out must hold the model's pixels of
// banks top, top+1, top+2 (mod 4) at that column, as they were before the
// write of the same cycle. Cycles with rd_en low must leave col_out unchanged.
// All four rotations are counted and must each occur.
module tb_line_buffer;
  import sobel_pkg::*;

  localparam int unsigned COLS = 12;
  localparam int unsigned AW = $clog2(COLS);

  logic          clk = 0, rst_n = 0;
  logic          wr_en = 0, rd_en = 0;
  bank_t         wr_bank = '0, rd_top = '0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  pixel_t        wr_data = '0;
  column_t       col_out;

  pixel_t  model [LB_LINES][COLS];
  column_t expect_col;
  int      checks = 0, failures = 0, cycle = 0;
  int      rot_seen [LB_LINES];

  line_buffer #(.COLS(COLS)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_bank(wr_bank), .wr_addr(wr_addr),
    .wr_data(wr_data), .rd_en(rd_en), .rd_top(rd_top), .rd_addr(rd_addr), .col_out(col_out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    rot_seen = '{default: 0};
    // fill every bank so that reads return known data
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < LB_LINES; b++) begin
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = bank_t'(b); wr_addr = AW'(c); wr_data = pixel_t'($urandom);
        model[b][c] = wr_data;
      end
    end
    @(negedge clk);
    wr_en = 0;
    expect_col = col_out;
    for (int t = 0; t < 3000; t++) begin
      logic do_rd;
      @(negedge clk);
      do_rd   = ($urandom_range(0, 4) != 0);
      rd_en   = do_rd;
      rd_top  = bank_t'($urandom);
      rd_addr = AW'($urandom_range(0, COLS - 1));
      wr_en   = ($urandom_range(0, 1) != 0);
      wr_bank = bank_t'($urandom);
      wr_addr = AW'($urandom_range(0, COLS - 1));
      wr_data = pixel_t'($urandom);
      if (do_rd) begin
        for (int r = 0; r < 3; r++) expect_col[r] = model[bank_t'(rd_top + bank_t'(r))][rd_addr];
        rot_seen[rd_top]++;
      end
      @(posedge clk);
      if (wr_en) model[wr_bank][wr_addr] = wr_data;
      #1;
      checks++;
      if (col_out != expect_col) begin
        failures++;
        $display("FAIL t=%0d rd=%0b top=%0d addr=%0d got %h expected %h",
                 t, do_rd, rd_top, rd_addr, col_out, expect_col);
      end
    end
    for (int b = 0; b < LB_LINES; b++) begin
      checks++;
      if (rot_seen[b] == 0) begin failures++; $display("FAIL rotation %0d never used", b); end
    end
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

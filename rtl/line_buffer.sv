// line_buffer: four image lines of COLS pixels, one memory per line.
//
// The buffer is the C array line_buffer[4][COLS] partitioned along its first
// dimension, so each line is its own dual-port memory (lb_bank). While the
// accelerator works on output row i it reads lines (i-1)%4, i%4 and (i+1)%4
// and fills line (i+2)%4 with the incoming image line, so every memory sees
// at most one read and one write per cycle and one output pixel can be formed
// per cycle.
//
// Write side: wr_en, wr_bank (which line), wr_addr (column), wr_data.
// Read side: rd_en, rd_addr (column) and rd_top, the bank holding the upper
// of the three lines. One cycle after rd_en, col_out holds the three pixels
// of that column, [0] from bank rd_top, [1] from rd_top+1, [2] from rd_top+2
// (modulo 4). rd_en also acts as the hold signal of the read registers.
module line_buffer
  import sobel_pkg::*;
#(
  parameter int unsigned COLS = DEFAULT_COLS,
  localparam int unsigned AW = $clog2(COLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  bank_t         wr_bank,
  input  logic [AW-1:0] wr_addr,
  input  pixel_t        wr_data,
  input  logic          rd_en,
  input  bank_t         rd_top,
  input  logic [AW-1:0] rd_addr,
  output column_t       col_out
);

  pixel_t bank_q [LB_LINES];
  bank_t  top_q;

  for (genvar b = 0; b < LB_LINES; b++) begin : g_bank
    lb_bank #(.DEPTH(COLS)) u_bank (
      .clk   (clk),
      .we    (wr_en && (wr_bank == bank_t'(b))),
      .waddr (wr_addr),
      .wdata (wr_data),
      .re    (rd_en),
      .raddr (rd_addr),
      .rdata (bank_q[b])
    );
  end

  // The bank rotation is registered alongside the read data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     top_q <= '0;
    else if (rd_en) top_q <= rd_top;
  end

  always_comb begin
    for (int r = 0; r < 3; r++) begin
      col_out[r] = bank_q[bank_t'(top_q + bank_t'(r))];
    end
  end

endmodule

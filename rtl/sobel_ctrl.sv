// sobel_ctrl: loop control of the windowed Sobel accelerator.
//
// The controller walks the loop nest of the windowed C implementation, one
// loop iteration ("step") per cycle, i.e. the inner loop is pipelined with an
// initiation interval of 1. A frame of ROWS x COLS pixels is processed as
// ROWS+1 sweeps of COLS steps:
//   * three prefill sweeps copy image lines 0, 1 and 2 into line-buffer
//     banks 0, 1 and 2;
//   * one compute sweep per output row i = 1 .. ROWS-2. Step k reads column k
//     of banks (i-1)%4, i%4, (i+1)%4 into the window and, while i < ROWS-2,
//     writes pixel k of image line i+2 into bank (i+2)%4. Steps k >= 2 emit
//     output pixel dst[i-1][k-2]; the last two sweeps read no input.
// Compared with the C code, the window shift is done before the column load
// instead of after the kernel, and the first/last column accesses are folded
// into the same sweep; the order of input reads and output writes is the
// same, and each row sweep takes exactly COLS steps.
//
// Interface: start (pulse, accepted when idle) begins a frame; adv is high in
// cycles in which the pipeline moves, and a step is issued in every cycle
// with busy && adv. The step outputs (need_in, wr_*, rd_*, emit, last) are
// combinational from the loop counters and describe the step issued now.
module sobel_ctrl
  import sobel_pkg::*;
#(
  parameter int unsigned ROWS = DEFAULT_ROWS,
  parameter int unsigned COLS = DEFAULT_COLS,
  localparam int unsigned AW = $clog2(COLS),
  localparam int unsigned RW = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          adv,
  output logic          busy,
  // step issued in this cycle (valid when busy)
  output logic          need_in,   // step consumes one input pixel
  output logic          wr_en,
  output bank_t         wr_bank,
  output logic [AW-1:0] col,       // column k, read and write address
  output logic          rd_en,     // step loads a window column
  output bank_t         rd_top,    // bank of the upper window line
  output logic          emit,      // step completes an output pixel
  output logic          last       // step completes the last output pixel
);

  typedef enum logic [1:0] {S_IDLE, S_PREFILL, S_COMPUTE} state_t;

  state_t        state;
  logic [1:0]    pre_line;  // prefill line 0..2
  logic [RW-1:0] row;       // output row i, 1 .. ROWS-2
  bank_t         top;       // (i-1) % 4
  logic          col_last, feed;

  assign busy     = (state != S_IDLE);
  assign col_last = (col == AW'(COLS - 1));
  // input line i+2 exists while i < ROWS-2
  assign feed     = (row < RW'(ROWS - 2));

  always_comb begin
    need_in = 1'b0;
    wr_en   = 1'b0;
    wr_bank = top + bank_t'(3);
    rd_en   = 1'b0;
    rd_top  = top;
    emit    = 1'b0;
    last    = 1'b0;
    unique case (state)
      S_PREFILL: begin
        need_in = 1'b1;
        wr_en   = 1'b1;
        wr_bank = bank_t'(pre_line);
      end
      S_COMPUTE: begin
        need_in = feed;
        wr_en   = feed;
        rd_en   = 1'b1;
        emit    = (col >= AW'(2));
        last    = !feed && col_last;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pre_line <= '0;
      row      <= RW'(1);
      top      <= '0;
      col      <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state    <= S_PREFILL;
            pre_line <= '0;
            row      <= RW'(1);
            top      <= '0;
            col      <= '0;
          end
        end
        S_PREFILL: if (adv) begin
          col <= col_last ? '0 : col + 1'b1;
          if (col_last) begin
            pre_line <= pre_line + 1'b1;
            if (pre_line == 2'd2) state <= S_COMPUTE;
          end
        end
        S_COMPUTE: if (adv) begin
          col <= col_last ? '0 : col + 1'b1;
          if (col_last) begin
            row <= row + 1'b1;
            top <= top + 1'b1;
            if (!feed) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (ROWS >= 3 && COLS >= 3)
    else $error("sobel_ctrl: frame must be at least 3x3");

endmodule

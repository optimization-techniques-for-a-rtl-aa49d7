// sobel_core: windowed Sobel edge-detection accelerator, one pixel per cycle.
//
// Input is a ROWS x COLS 8-bit image in raster order; output is the
// (ROWS-2) x (COLS-2) image of interior pixels, gradient magnitude
// |Gx| + |Gy| clamped to 255, also in raster order. Border pixels produce no
// output.
//
// Structure (three pipeline stages, all moved by one enable "adv"):
//   issue  sobel_ctrl picks the step; line_buffer writes the input pixel into
//          the bank being filled and starts the read of one column of the
//          three banks in use.
//   load   the column read from the line buffer shifts into sobel_window.
//   kernel sobel_kernel computes the magnitude from the window; the result
//          is registered in the output register that drives dst.
// The pipeline stalls as a whole: adv = (output register free) and (input
// pixel present, if the step needs one). A frame takes (ROWS+1)*COLS steps
// plus three cycles of pipeline latency when neither FIFO stalls.
//
// Ports use the ap_fifo handshake of FIFO interfaces: src_dout/src_empty_n/
// src_read read the input FIFO (first word fall through); dst_din/dst_full_n/
// dst_write write the output FIFO. start (pulse) begins a frame while idle is
// high; done pulses in the cycle the last output pixel is written; idle is
// high when no frame is in flight. dst_last marks the last pixel of a frame.
//
// The datapath (four-line buffer, 3x3 window, kernel, one pixel per cycle)
// follows the windowed HLS accelerator. The handshake signal names, the
// start/idle/done protocol, the global-stall policy and the three-stage split
// are this design's own.
module sobel_core
  import sobel_pkg::*;
#(
  parameter int unsigned ROWS = DEFAULT_ROWS,
  parameter int unsigned COLS = DEFAULT_COLS,
  localparam int unsigned AW = $clog2(COLS)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   idle,
  output logic   done,
  // input image stream
  input  pixel_t src_dout,
  input  logic   src_empty_n,
  output logic   src_read,
  // output image stream
  output pixel_t dst_din,
  input  logic   dst_full_n,
  output logic   dst_write,
  output logic   dst_last
);

  logic          busy, adv, out_free;
  logic          need_in, wr_en, rd_en, emit, last;
  bank_t         wr_bank, rd_top;
  logic [AW-1:0] col;
  column_t       col_data;
  window_t       win;
  pixel_t        mag;

  // stage valid/tag registers
  logic          ld_valid, ld_emit, ld_last;     // load stage
  logic          kn_emit, kn_last;               // kernel stage
  logic          out_valid, out_last;
  pixel_t        out_pix;

  assign out_free = !out_valid || dst_full_n;
  assign adv      = out_free && (!(busy && need_in) || src_empty_n);
  assign src_read = adv && busy && need_in;

  sobel_ctrl #(.ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start && idle),
    .adv     (adv),
    .busy    (busy),
    .need_in (need_in),
    .wr_en   (wr_en),
    .wr_bank (wr_bank),
    .col     (col),
    .rd_en   (rd_en),
    .rd_top  (rd_top),
    .emit    (emit),
    .last    (last)
  );

  line_buffer #(.COLS(COLS)) u_lb (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (adv && busy && wr_en),
    .wr_bank (wr_bank),
    .wr_addr (col),
    .wr_data (src_dout),
    .rd_en   (adv),
    .rd_top  (rd_top),
    .rd_addr (col),
    .col_out (col_data)
  );

  sobel_window u_win (
    .clk    (clk),
    .rst_n  (rst_n),
    .shift  (adv && ld_valid),
    .col_in (col_data),
    .win    (win)
  );

  sobel_kernel u_kernel (
    .win (win),
    .mag (mag),
    .sat ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_valid  <= 1'b0;
      ld_emit   <= 1'b0;
      ld_last   <= 1'b0;
      kn_emit   <= 1'b0;
      kn_last   <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_pix   <= '0;
    end else begin
      if (dst_write) out_valid <= 1'b0;
      if (adv) begin
        ld_valid <= busy && rd_en;
        ld_emit  <= busy && emit;
        ld_last  <= busy && last;
        kn_emit  <= ld_emit;
        kn_last  <= ld_last;
        if (kn_emit) begin
          out_valid <= 1'b1;
          out_pix   <= mag;
          out_last  <= kn_last;
        end
      end
    end
  end

  assign dst_din   = out_pix;
  assign dst_write = out_valid && dst_full_n;
  assign dst_last  = out_last;
  assign done      = dst_write && out_last;
  assign idle      = !busy && !ld_valid && !kn_emit && !out_valid;

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    dst_write |-> dst_full_n);
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
    src_read |-> src_empty_n);

endmodule

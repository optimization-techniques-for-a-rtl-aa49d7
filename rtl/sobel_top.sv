// sobel_top: streaming Sobel edge-detection accelerator with its I/O FIFOs.
//
// An 8-bit grey image of ROWS x COLS pixels (640x480 by default) is written
// pixel by pixel, in raster order, into the input FIFO; the accelerator core
// (sobel_core) reads it at up to one pixel per cycle, keeps four image lines
// in a row-partitioned line buffer and a 3x3 window in registers, and writes
// one edge-magnitude pixel per cycle for each interior pixel into the output
// FIFO, from which the (ROWS-2) x (COLS-2) result image is read in raster
// order. With both FIFOs kept non-empty/non-full a frame takes
// (ROWS+1)*COLS + 3 cycles from start to done (307,843 cycles at 640x480).
//
// Ports:
//   start/idle/done  frame control: start is taken while idle; done pulses
//                    when the last output pixel enters the output FIFO.
//   in_data/in_write/in_full_n     writer side of the input FIFO.
//   out_data/out_read/out_empty_n  reader side of the output FIFO (first
//                    word fall through); out_last marks the last pixel.
//   in_level/out_level  fill levels of the two FIFOs, for monitoring.
// FIFO_DEPTH sets the depth of both FIFOs; its value is this design's choice.
module sobel_top
  import sobel_pkg::*;
#(
  parameter int unsigned ROWS       = DEFAULT_ROWS,
  parameter int unsigned COLS       = DEFAULT_COLS,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   idle,
  output logic   done,
  input  pixel_t in_data,
  input  logic   in_write,
  output logic   in_full_n,
  output pixel_t out_data,
  output logic   out_last,
  input  logic   out_read,
  output logic   out_empty_n,
  output logic [$clog2(FIFO_DEPTH):0] in_level,   // input FIFO fill level
  output logic [$clog2(FIFO_DEPTH):0] out_level   // output FIFO fill level
);

  pixel_t     src_dout, dst_din;
  logic       src_empty_n, src_read;
  logic       dst_full_n, dst_write, dst_last;

  stream_fifo #(.WIDTH(PIX_W), .DEPTH(FIFO_DEPTH)) u_src_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .din     (in_data),
    .write   (in_write),
    .full_n  (in_full_n),
    .dout    (src_dout),
    .read    (src_read),
    .empty_n (src_empty_n),
    .count   (in_level)
  );

  sobel_core #(.ROWS(ROWS), .COLS(COLS)) u_core (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .idle        (idle),
    .done        (done),
    .src_dout    (src_dout),
    .src_empty_n (src_empty_n),
    .src_read    (src_read),
    .dst_din     (dst_din),
    .dst_full_n  (dst_full_n),
    .dst_write   (dst_write),
    .dst_last    (dst_last)
  );

  // The frame-end flag travels with the pixel through the output FIFO.
  stream_fifo #(.WIDTH(PIX_W + 1), .DEPTH(FIFO_DEPTH)) u_dst_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .din     ({dst_last, dst_din}),
    .write   (dst_write),
    .full_n  (dst_full_n),
    .dout    ({out_last, out_data}),
    .read    (out_read),
    .empty_n (out_empty_n),
    .count   (out_level)
  );

endmodule

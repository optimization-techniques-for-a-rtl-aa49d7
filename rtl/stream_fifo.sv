// stream_fifo: synchronous first-word-fall-through FIFO for pixel streams.
//
// The accelerator's image input and output are FIFOs: pixels arrive and leave
// strictly in raster order. This FIFO uses the same handshake on both sides
// as the accelerator's ports: the writer drives din and write while full_n is
// high; the reader sees the head entry on dout while empty_n is high and
// pops it with read. A write and a read may happen in the same cycle, also
// when the FIFO is full (the read frees the slot). A write while full or a
// read while empty is ignored (and flagged by an assertion).
//
// Storage is a circular array of DEPTH entries (a power of two) with a read
// and write pointer one bit wider than the address. count is the fill level.
// That the image ports are FIFOs comes from the HLS design this follows; the
// FIFO's depth, its first-word-fall-through read side and the same-cycle
// read/write rule are this design's choices. Timing: a pixel written in one
// cycle is visible on dout in the next.
module stream_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  input  logic             write,
  output logic             full_n,
  output logic [WIDTH-1:0] dout,
  input  logic             read,
  output logic             empty_n,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign count   = wptr - rptr;
  assign empty_n = (wptr != rptr);
  assign full_n  = (count != (AW+1)'(DEPTH)) || read;
  assign do_rd   = read && empty_n;
  assign do_wr   = write && full_n;
  assign dout    = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("stream_fifo: DEPTH must be a power of two");

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    write |-> full_n);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    read |-> empty_n);

endmodule

// lb_bank: one line of the line buffer, a simple dual-port memory.
//
// One write port and one read port, both synchronous, as a block RAM has.
// The read port has an enable so that the registered read data holds while
// the pipeline around it is stalled. Reading and writing the same address in
// the same cycle returns the old contents (never done by the accelerator).
//
// Ports: we/waddr/wdata (write), re/raddr (read request), rdata (read data,
// one cycle after re). DEPTH is the line length in pixels.
module lb_bank
  import sobel_pkg::*;
#(
  parameter int unsigned DEPTH = DEFAULT_COLS,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  pixel_t        wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output pixel_t        rdata
);

  pixel_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule

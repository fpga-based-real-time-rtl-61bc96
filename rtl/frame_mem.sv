// frame_mem: the image memory of the accelerator, one complex word per pixel.
//
// Holds the row[HEIGHT][WIDTH] complex array of the design, flattened to
// DEPTH = WIDTH*HEIGHT words at address row*WIDTH + col. One write port and
// one read port; the read is registered, so rdata shows the word at raddr
// one clock after raddr is presented (block-RAM timing). A write and a read
// of the same address in one clock return the old word. Contents are not
// reset.
module frame_mem
  import fft_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cplx_t         wdata,
  input  logic [AW-1:0] raddr,
  output cplx_t         rdata
);
  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

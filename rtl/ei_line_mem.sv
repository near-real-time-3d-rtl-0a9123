// ei_line_mem: one memory module of an elemental-image memory block.
//
// Module j of a block stores the EI lines j, j+K, j+2K, ... (K = 2W+1): with
// 64-pixel lines and K = 11 that is six lines for modules 0..8 and five for
// modules 9 and 10. Each word is one pixel; line group g (the g-th line the
// module holds) occupies addresses g*EI_SIZE .. g*EI_SIZE+EI_SIZE-1, position
// p within the line at offset p.
//
// Interface: one synchronous write port and one synchronous read port
// (read data one cycle after the address), as an FPGA block RAM. Contents are
// not reset. The one-pixel word and the address layout are this design's own
// choices; the line interleaving follows the architecture.
module ei_line_mem
  import inim_pkg::*;
#(
  parameter int unsigned DEPTH = STRIPS * EI_SIZE,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  pix_t          wdata,
  input  logic [AW-1:0] raddr,
  output pix_t          rdata
);

  pix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

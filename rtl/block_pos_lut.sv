// block_pos_lut: look-up table of pre-determined block positions.
//
// Each entry describes one neighbour pass (inim_pkg::pos_entry_t): which
// neighbour EI is searched, the top-left corner of the central block, the
// top-left corner of the first search block in the neighbour, and the scan
// direction. The host writes the table before processing; the controller reads
// the entry of the pass it is issuing. Positions for the initial grid
// (central pixel) and for grid refinement (arbitrary blocks) both come from
// here.
//
// Interface: synchronous write (`we`, `waddr`, `wdata`), asynchronous read
// (`raddr` -> `rdata` in the same cycle). The table is cleared by reset. The
// entry format, the depth and the host write port are this design's own
// choices; the architecture states only that positions come from a look-up
// table.
module block_pos_lut
  import inim_pkg::*;
#(
  parameter int unsigned DEPTH = LUT_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [AW-1:0] waddr,
  input  pos_entry_t wdata,
  input  logic [AW-1:0] raddr,
  output pos_entry_t rdata
);

  pos_entry_t tbl [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) tbl[i] <= '0;
    end else if (we) begin
      tbl[waddr] <= wdata;
    end
  end

  assign rdata = tbl[raddr];

endmodule

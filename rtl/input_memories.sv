// input_memories: the six EI memory blocks and the two multiplexers that feed
// the SAD array.
//
// Blocks (index in the load ports): 0 UpMem, 1 LMem, 2 RMem, 3 DnMem,
// 4 CMem-hor, 5 CMem-ver. The left and right neighbours and CMem-hor hold
// their EI row-wise (a line is a row); the up and down neighbours and CMem-ver
// hold it column-wise (a line is a column). The central EI is thus held twice.
// With K = 11 modules per block this is 66 memory modules.
//
// Each cycle the controller's request `req` names the neighbour to read, the
// first of K lines and the position along them, for the neighbour and for the
// central EI. One cycle later `nb_pix` carries the neighbour line segment
// selected by the 4:1 multiplexer, `c_pix` the central segment from CMem-hor
// for a horizontal search (left/right) or from CMem-ver for a vertical one
// (up/down), and `rsp` the request's control fields, aligned with the data.
//
// Load ports: one per block, in the ei_mem_bank write format, so all six can
// be loaded at the same time. The separate load ports are this design's own
// choice.
module input_memories
  import inim_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [5:0]             ld_en,
  input  logic [5:0][STRIP_W-1:0] ld_strip,
  input  logic [5:0][CRD_W-1:0]  ld_pos,
  input  pix_t [5:0][K-1:0]      ld_pix,
  input  rd_req_t                req,
  output rd_req_t                rsp,
  output pix_t [K-1:0]           nb_pix,
  output pix_t [K-1:0]           c_pix
);

  localparam int unsigned C_HOR = 4;
  localparam int unsigned C_VER = 5;

  pix_t [K-1:0] bank_q [6];

  for (genvar b = 0; b < 6; b++) begin : g_bank
    logic [CRD_W-1:0] line, pos;
    // Neighbour blocks read the neighbour request, central blocks the central one.
    assign line = (b < 4) ? req.nb_line : req.c_line;
    assign pos  = (b < 4) ? req.nb_pos  : req.c_pos;
    ei_mem_bank u_bank (
      .clk     (clk),
      .wr_en   (ld_en[b]),
      .wr_strip(ld_strip[b]),
      .wr_pos  (ld_pos[b]),
      .wr_pix  (ld_pix[b]),
      .rd_line (line),
      .rd_pos  (pos),
      .rd_pix  (bank_q[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp <= '0;
    else        rsp <= req;
  end

  assign nb_pix = bank_q[{1'b0, rsp.nb}];
  assign c_pix  = is_vertical(rsp.nb) ? bank_q[C_VER] : bank_q[C_HOR];

endmodule

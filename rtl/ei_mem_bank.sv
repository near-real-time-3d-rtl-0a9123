// ei_mem_bank: the memory block of one elemental image, built from K = 2W+1
// line-interleaved memory modules (ei_line_mem).
//
// A "line" is a row for an EI stored row-wise and a column for one stored
// column-wise; the bank does not care which. Line L lives in module L mod K at
// line group L div K. Any K consecutive lines therefore fall in K different
// modules, so one cycle suffices to read the pixel at position `rd_pos` of
// lines rd_line .. rd_line+K-1, wherever the block lies in the EI.
//
// Read: give `rd_line`, `rd_pos`; one cycle later `rd_pix[k]` holds the pixel
// of line rd_line+k (k = 0..K-1). The address translation computes each
// module's line from rd_line, and the outputs are rotated back into line
// order. rd_line+K-1 must stay inside the EI.
//
// Write: `wr_en` with line group `wr_strip` and position `wr_pos` writes
// wr_pix[j] into module j, i.e. line wr_strip*K+j. Lanes whose line lies
// beyond the EI (the unused cells of the last group) are not written. A whole
// EI is loaded in STRIPS*EI_SIZE cycles. This write format is this design's
// own choice.
module ei_mem_bank
  import inim_pkg::*;
(
  input  logic               clk,
  input  logic               wr_en,
  input  logic [STRIP_W-1:0] wr_strip,
  input  logic [CRD_W-1:0]   wr_pos,
  input  pix_t [K-1:0]       wr_pix,
  input  logic [CRD_W-1:0]   rd_line,
  input  logic [CRD_W-1:0]   rd_pos,
  output pix_t [K-1:0]       rd_pix
);

  localparam int unsigned DEPTH = STRIPS * EI_SIZE;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned RW    = $clog2(K);

  logic [AW-1:0] waddr;
  logic [AW-1:0] raddr [K];
  pix_t          mod_q [K];
  logic [RW-1:0] rot, rot_q;

  assign waddr = AW'(wr_strip) * AW'(EI_SIZE) + AW'(wr_pos);
  assign rot   = RW'(rd_line % K);

  // Module j holds the one line among rd_line .. rd_line+K-1 that is
  // congruent to j modulo K.
  always_comb begin
    for (int j = 0; j < int'(K); j++) begin
      logic [CRD_W:0] line_j;
      line_j   = (CRD_W+1)'(rd_line) + (CRD_W+1)'((j + int'(K) - int'(rot)) % int'(K));
      raddr[j] = AW'(line_j / K) * AW'(EI_SIZE) + AW'(rd_pos);
    end
  end

  for (genvar j = 0; j < int'(K); j++) begin : g_mod
    ei_line_mem u_mod (
      .clk  (clk),
      .we   (wr_en && (int'(wr_strip) * int'(K) + j < int'(EI_SIZE))),
      .waddr(waddr),
      .wdata(wr_pix[j]),
      .raddr(raddr[j]),
      .rdata(mod_q[j])
    );
  end

  always_ff @(posedge clk) rot_q <= rot;

  // Line rd_line+k was read by module (rot+k) mod K.
  always_comb begin
    for (int k = 0; k < int'(K); k++) begin
      rd_pix[k] = mod_q[(int'(rot_q) + k) % int'(K)];
    end
  end

endmodule

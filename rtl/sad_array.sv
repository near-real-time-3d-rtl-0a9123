// sad_array: M SAD units working one cycle apart on one search area.
//
// A pass compares one (2W+1)x(2W+1) block of the central EI with M blocks of a
// neighbour EI that lie at M consecutive positions along the search direction.
// The neighbour's lines (block columns for a horizontal search, block rows for
// a vertical one) arrive one per cycle on `nb_pix` and are broadcast to all
// units: M+2W lines per pass. The K lines of the central block arrive on
// `c_pix` with `c_first`/`c_last` marking the first and last, and are
// propagated through a chain of registers, so unit m sees them m cycles late.
// Unit m therefore compares the central block with the neighbour block that
// starts at search offset m. Its result appears K cycles after it started, so
// the M results leave one per cycle, in order m = 0..M-1, on the single output
// bus (`out_valid`, `out_sad`, `out_idx`, `out_tag`).
//
// Timing: if the first central line and neighbour line enter at cycle 0, unit m
// delivers at cycle m+K. Passes may follow each other every M+2W cycles. The
// propagation of central pixels follows the architecture; broadcasting the
// neighbour lines and the explicit index output are this design's choices.
module sad_array
  import inim_pkg::*;
#(
  parameter int unsigned NUNITS = M
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  pix_t [K-1:0]              nb_pix,
  input  logic                      c_valid,
  input  logic                      c_first,
  input  logic                      c_last,
  input  tag_t                      c_tag,
  input  pix_t [K-1:0]              c_pix,
  output logic                      out_valid,
  output logic [SAD_W-1:0]          out_sad,
  output logic [$clog2(NUNITS)-1:0] out_idx,
  output tag_t                      out_tag
);

  typedef struct packed {
    logic         valid;
    logic         first;
    logic         last;
    tag_t         tag;
    pix_t [K-1:0] pix;
  } cline_t;

  cline_t chain [NUNITS];
  logic [NUNITS-1:0] done_v;
  logic [SAD_W-1:0] sad_v  [NUNITS];
  tag_t             tag_v  [NUNITS];

  assign chain[0] = '{valid: c_valid, first: c_first, last: c_last, tag: c_tag, pix: c_pix};

  for (genvar m = 1; m < int'(NUNITS); m++) begin : g_chain
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) chain[m] <= '0;
      else        chain[m] <= chain[m-1];
    end
  end

  for (genvar m = 0; m < int'(NUNITS); m++) begin : g_unit
    sad_unit u_sad (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (chain[m].valid),
      .first  (chain[m].first),
      .last   (chain[m].last),
      .tag_in (chain[m].tag),
      .a      (chain[m].pix),
      .b      (nb_pix),
      .done   (done_v[m]),
      .sad    (sad_v[m]),
      .tag_out(tag_v[m])
    );
  end

  // At most one unit finishes per cycle: select it onto the single bus.
  always_comb begin
    out_valid = 1'b0;
    out_sad   = '0;
    out_idx   = '0;
    out_tag   = '0;
    for (int m = 0; m < int'(NUNITS); m++) begin
      if (done_v[m]) begin
        out_valid = 1'b1;
        out_sad   = sad_v[m];
        out_idx   = ($clog2(NUNITS))'(m);
        out_tag   = tag_v[m];
      end
    end
  end

  // Units start one cycle apart, so their results never collide.
  a_one_done: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(done_v))
    else $error("sad_array: two units finished in the same cycle");

endmodule

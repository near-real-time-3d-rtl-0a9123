// inim_pkg: constants and types shared by the Integral Imaging SAD accelerator.
//
// The default configuration is the practical acquisition system used as the
// case study: 64x64-pixel elemental images (EIs) of 8-bit pixels, an 11x11
// comparison window (W = 5), and an array of M = 30 SAD units. The neighbour
// numbering (up, left, right, down) follows the order of the four neighbour
// memories in the architecture. Accumulator widths and the LUT depth are this
// design's own choices.
package inim_pkg;

  localparam int unsigned PIX_W   = 8;   // pixel width
  localparam int unsigned W       = 5;   // window radius, window is (2W+1)x(2W+1)
  localparam int unsigned K       = 2 * W + 1;  // window side = number of memory modules per EI
  localparam int unsigned EI_SIZE = 64;  // EI side in pixels
  localparam int unsigned M       = 30;  // SAD units = block comparisons per search area

  // Number of interleaved line groups per memory module: ceil(EI_SIZE / K).
  localparam int unsigned STRIPS  = (EI_SIZE + K - 1) / K;
  localparam int unsigned CRD_W   = $clog2(EI_SIZE);      // line / position index width
  localparam int unsigned STRIP_W = $clog2(STRIPS);

  // Sum widths: one KxK block, and the running total
  // over all neighbours (room for 2^ACC_W / (K*K*255) block SADs).
  localparam int unsigned SAD_W   = $clog2(K * K * (2**PIX_W - 1) + 1);
  localparam int unsigned ACC_W   = 22;
  localparam int unsigned IDX_W   = $clog2(M);

  localparam int unsigned LUT_DEPTH = 16;
  localparam int unsigned LUT_AW    = $clog2(LUT_DEPTH);

  typedef logic [PIX_W-1:0] pix_t;

  // The four neighbour memories. Left and right are searched horizontally,
  // up and down vertically.
  typedef enum logic [1:0] {NB_UP = 2'd0, NB_LEFT = 2'd1, NB_RIGHT = 2'd2, NB_DOWN = 2'd3} nb_sel_t;

  // Tag that travels with each block comparison through the SAD array.
  typedef struct packed {
    logic clear;      // first pass of a reconstruction: add '0' instead of the stored sum
    logic final_pass; // last pass: send sums to the comparator instead of storing them
    logic stage_end;  // last pass issued by the current controller command
  } tag_t;

  // One entry of the block-position look-up table: one neighbour pass.
  typedef struct packed {
    nb_sel_t          nb;       // neighbour EI searched in this pass
    logic             reverse;  // scan the search area towards decreasing positions
    logic [CRD_W-1:0] c_row;    // central block: top row
    logic [CRD_W-1:0] c_col;    // central block: left column
    logic [CRD_W-1:0] s_row;    // first search block in the neighbour: top row
    logic [CRD_W-1:0] s_col;    // first search block in the neighbour: left column
  } pos_entry_t;

  // Read request for one cycle, from the controller to the input memories.
  // "line" is the first of K consecutive lines, "pos" the position along them.
  typedef struct packed {
    logic             nb_valid;
    nb_sel_t          nb;
    logic [CRD_W-1:0] nb_line;
    logic [CRD_W-1:0] nb_pos;
    logic             c_valid;
    logic             c_first;
    logic             c_last;
    tag_t             tag;
    logic [CRD_W-1:0] c_line;
    logic [CRD_W-1:0] c_pos;
  } rd_req_t;

  function automatic logic is_vertical(nb_sel_t nb);
    return (nb == NB_UP) || (nb == NB_DOWN);
  endfunction

endpackage

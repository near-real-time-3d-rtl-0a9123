// inim_recon_top: SAD-based correspondence search accelerator for 3D
// reconstruction from Integral Images.
//
// For one central elemental image (EI) block the accelerator finds, among M
// candidate positions, the one whose summed block distance to the neighbour
// EIs is smallest. Data path, as in the architecture: six EI memory blocks
// (up, left, right, down neighbours; the central EI row-wise and column-wise)
// -> neighbour and central multiplexers -> array of M (2W+1)x1 SAD units ->
// adder with the temporary-results memory and its '0' multiplexer ->
// sequential comparator. A controller reads block positions from a look-up
// table and issues one memory read per cycle.
//
// Use: load the EIs through the six load ports (ei_mem_bank write format,
// STRIPS*EI_SIZE cycles per EI, all six in parallel), write the positions of
// the passes into the look-up table, then pulse `start` with a command. A
// command of P passes issues P*(M+2W) memory reads back to back; `done`
// rises P*(M+2W)+4 clock edges after the edge that takes `start` (one cycle
// each for the memory read, the last SAD unit's accumulator, the
// temporary-results adder and the comparator). For the command flagged
// `cmd_final`, `res_valid` pulses in the same cycle as `done` with the minimum
// total SAD `res_sad` and its candidate index `res_idx` (search offset from
// the LUT's start positions). Between commands the neighbour memories may be
// reloaded, which is how neighbours at larger distances are added; the
// partial sums stay in the temporary-results memory.
//
// The blocks, their connections and sizes follow the architecture; the load
// ports, the look-up table format and the command protocol are this design's
// own, as the architecture does not describe its host interface.
module inim_recon_top
  import inim_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // EI loading, index 0 Up, 1 Left, 2 Right, 3 Down, 4 central row-wise, 5 central column-wise
  input  logic [5:0]              ld_en,
  input  logic [5:0][STRIP_W-1:0] ld_strip,
  input  logic [5:0][CRD_W-1:0]   ld_pos,
  input  pix_t [5:0][K-1:0]       ld_pix,
  // block-position look-up table
  input  logic                    lut_we,
  input  logic [LUT_AW-1:0]       lut_waddr,
  input  pos_entry_t              lut_wdata,
  // command
  input  logic                    start,
  input  logic [LUT_AW-1:0]       cmd_first,
  input  logic [LUT_AW:0]         cmd_count,
  input  logic                    cmd_clear,
  input  logic                    cmd_final,
  output logic                    busy,
  output logic                    done,
  // best match
  output logic                    res_valid,
  output logic [ACC_W-1:0]        res_sad,
  output logic [IDX_W-1:0]        res_idx
);

  logic [LUT_AW-1:0] lut_raddr;
  pos_entry_t        lut_rdata;
  rd_req_t           req, rsp;
  pix_t [K-1:0]      nb_pix, c_pix;
  logic              sad_valid;
  logic [SAD_W-1:0]  sad_val;
  logic [IDX_W-1:0]  sad_idx;
  tag_t              sad_tag;
  logic              acc_valid, stage_end;
  logic [ACC_W-1:0]  acc_sum;
  logic [IDX_W-1:0]  acc_idx;

  block_pos_lut u_lut (
    .clk(clk), .rst_n(rst_n),
    .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .raddr(lut_raddr), .rdata(lut_rdata)
  );

  recon_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .start(start), .cmd_first(cmd_first), .cmd_count(cmd_count),
    .cmd_clear(cmd_clear), .cmd_final(cmd_final),
    .busy(busy), .done(done),
    .lut_raddr(lut_raddr), .lut_rdata(lut_rdata),
    .req(req), .stage_end(stage_end)
  );

  input_memories u_mem (
    .clk(clk), .rst_n(rst_n),
    .ld_en(ld_en), .ld_strip(ld_strip), .ld_pos(ld_pos), .ld_pix(ld_pix),
    .req(req), .rsp(rsp), .nb_pix(nb_pix), .c_pix(c_pix)
  );

  sad_array u_array (
    .clk(clk), .rst_n(rst_n),
    .nb_pix(nb_pix),
    .c_valid(rsp.c_valid), .c_first(rsp.c_first), .c_last(rsp.c_last),
    .c_tag(rsp.tag), .c_pix(c_pix),
    .out_valid(sad_valid), .out_sad(sad_val), .out_idx(sad_idx), .out_tag(sad_tag)
  );

  temp_accum u_acc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(sad_valid), .in_sad(sad_val), .in_idx(sad_idx), .in_tag(sad_tag),
    .out_valid(acc_valid), .out_sum(acc_sum), .out_idx(acc_idx), .stage_end(stage_end)
  );

  seq_min_comp u_comp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(acc_valid), .in_val(acc_sum), .in_idx(acc_idx),
    .done(res_valid), .min_val(res_sad), .min_idx(res_idx)
  );

endmodule

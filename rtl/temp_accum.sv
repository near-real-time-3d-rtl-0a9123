// temp_accum: temporary-results memory, '0' multiplexer and adder behind the
// SAD array.
//
// The SAD array delivers, for each neighbour pass, M block SADs one per cycle
// with their candidate index. For each one the adder forms
//   sum = (clear ? 0 : temp[idx]) + sad
// where temp is an M-cell memory. Unless the pass is the final one, sum is
// written back to temp[idx], so the cells collect the total over all
// neighbours. In the final pass nothing is stored; the sums go out on
// `out_valid`/`out_sum`/`out_idx` to the comparator. `stage_end` pulses with
// the last index (M-1) of a pass tagged stage_end.
//
// Timing: results are registered, one cycle after the input. The memory is
// read asynchronously (distributed RAM), which lets a sum of one pass follow
// the previous pass's write to the same cell by any distance. Reset clears the
// output valid flags only. The structure follows the architecture; the read
// style and the tags are this design's own choices.
module temp_accum
  import inim_pkg::*;
#(
  parameter int unsigned NCAND = M,
  localparam int unsigned IW   = $clog2(NCAND)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [SAD_W-1:0]   in_sad,
  input  logic [IW-1:0]      in_idx,
  input  tag_t               in_tag,
  output logic               out_valid,
  output logic [ACC_W-1:0]   out_sum,
  output logic [IW-1:0]      out_idx,
  output logic               stage_end
);

  logic [ACC_W-1:0] temp [NCAND];
  logic [ACC_W-1:0] prev, sum;

  assign prev = in_tag.clear ? '0 : temp[in_idx];
  assign sum  = prev + ACC_W'(in_sad);

  always_ff @(posedge clk) begin
    if (in_valid && !in_tag.final_pass) temp[in_idx] <= sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sum   <= '0;
      out_idx   <= '0;
      stage_end <= 1'b0;
    end else begin
      out_valid <= in_valid && in_tag.final_pass;
      stage_end <= in_valid && in_tag.stage_end && (in_idx == IW'(NCAND - 1));
      if (in_valid) begin
        out_sum <= sum;
        out_idx <= in_idx;
      end
    end
  end

endmodule

// sad_unit: one (2W+1)x1 Sum-of-Absolute-Differences unit with its accumulator.
//
// Each cycle with `en` set the unit takes one line (a column or a row) of a
// (2W+1)x(2W+1) block pair as K = 2W+1 pixel pairs, forms the K absolute
// differences, adds them in a combinational tree and adds that line sum to the
// accumulator register. `first` marks the first line of a block: the
// accumulator restarts from that line sum instead of adding to the old value.
// `last` marks the final line: one cycle later `done` pulses with the block SAD
// on `sad` (K cycles per block, as in the architecture). A tag given with the
// first line is held and returned with `done`.
//
// Timing: line sums are not registered; the block result is registered
// (latency one cycle after the last line). The tag and the restart on `first`
// are this design's own choices.
module sad_unit
  import inim_pkg::*;
#(
  parameter int unsigned LINE = K       // pixel pairs per cycle
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               first,
  input  logic               last,
  input  tag_t               tag_in,
  input  pix_t [LINE-1:0]    a,
  input  pix_t [LINE-1:0]    b,
  output logic               done,
  output logic [SAD_W-1:0]   sad,
  output tag_t               tag_out
);

  logic [SAD_W-1:0] line_sum;
  logic [SAD_W-1:0] acc;
  tag_t             tag_q;

  always_comb begin
    line_sum = '0;
    for (int i = 0; i < int'(LINE); i++) begin
      line_sum += SAD_W'(pix_t'((a[i] > b[i]) ? (a[i] - b[i]) : (b[i] - a[i])));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      done  <= 1'b0;
      tag_q <= '0;
    end else begin
      done <= en && last;
      if (en) begin
        acc <= first ? line_sum : acc + line_sum;
        if (first) tag_q <= tag_in;
      end
    end
  end

  assign sad     = acc;
  assign tag_out = tag_q;

endmodule

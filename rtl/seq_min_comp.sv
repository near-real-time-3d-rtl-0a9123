// seq_min_comp: sequential comparator that finds the smallest of NCAND values
// arriving one per cycle with indices 0, 1, ..., NCAND-1.
//
// Index 0 loads the running minimum; each later value replaces it only if it
// is strictly smaller, so on a tie the lower index wins. With index NCAND-1 the
// result is complete: one cycle later `done` pulses with `min_val` and
// `min_idx`, which hold until the next search. The comparisons thus end one
// cycle after the last value arrives, as the architecture states. The tie rule
// is this design's own choice.
module seq_min_comp
  import inim_pkg::*;
#(
  parameter int unsigned NCAND = M,
  parameter int unsigned VW    = ACC_W,
  localparam int unsigned IW   = $clog2(NCAND)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [VW-1:0] in_val,
  input  logic [IW-1:0] in_idx,
  output logic          done,
  output logic [VW-1:0] min_val,
  output logic [IW-1:0] min_idx
);

  logic [VW-1:0] best_val;
  logic [IW-1:0] best_idx;
  logic          take;

  assign take = (in_idx == '0) || (in_val < best_val);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_val <= '0;
      best_idx <= '0;
      done     <= 1'b0;
      min_val  <= '0;
      min_idx  <= '0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        if (take) begin
          best_val <= in_val;
          best_idx <= in_idx;
        end
        if (in_idx == IW'(NCAND - 1)) begin
          done    <= 1'b1;
          min_val <= take ? in_val : best_val;
          min_idx <= take ? in_idx : best_idx;
        end
      end
    end
  end

endmodule

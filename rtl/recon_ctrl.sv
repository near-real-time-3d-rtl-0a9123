// recon_ctrl: controller that turns block positions into memory read
// requests for the SAD array.
//
// A command (`start` with `cmd_first`, `cmd_count`, `cmd_clear`, `cmd_final`)
// runs cmd_count neighbour passes whose positions are the look-up table
// entries cmd_first, cmd_first+1, ... For one pass the controller spends
// M+2W cycles. In cycle t it requests neighbour line segment t of the search
// area (K lines at position s+t, or s+K-1-t when the entry scans in reverse),
// and in cycles 0..K-1 also line t of the central block (reversed likewise),
// flagged first/last. For left/right neighbours a line is a row segment
// read at a column position (row-wise memories); for up/down it is a column
// segment read at a row position (column-wise memories). Passes follow each
// other without a gap.
//
// The tag of each pass tells the accumulator whether to start from zero (first
// pass of a command with cmd_clear), whether to pass the sums on to the
// comparator (last pass of a command with cmd_final), and which pass ends the
// command. `busy` stays high until the accumulator reports that the last sum
// of the command has been handled (`stage_end`), then `done` pulses once. A
// reconstruction that needs neighbours at several distances runs one command
// per distance and reloads the four neighbour memories in between.
//
// The command format, the reverse scan and the end-of-command handshake are
// this design's own choices; the architecture gives the pass structure and
// the use of a position look-up table.
module recon_ctrl
  import inim_pkg::*;
#(
  parameter int unsigned NCAND = M,
  localparam int unsigned PASS_LEN = NCAND + K - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LUT_AW-1:0] cmd_first,
  input  logic [LUT_AW:0]   cmd_count,
  input  logic              cmd_clear,
  input  logic              cmd_final,
  output logic              busy,
  output logic              done,
  output logic [LUT_AW-1:0] lut_raddr,
  input  pos_entry_t        lut_rdata,
  output rd_req_t           req,
  input  logic              stage_end
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_t;

  state_t                       state;
  logic [LUT_AW-1:0]            entry;
  logic [LUT_AW:0]              left;      // passes still to issue, current one included
  logic [$clog2(PASS_LEN)-1:0]  t;
  logic                         clear_q, final_q, first_pass;

  assign busy      = (state != S_IDLE);
  assign lut_raddr = entry;

  logic last_pass, vert;
  logic [CRD_W-1:0] nb_line, nb_base, c_line, c_base, tk;
  assign last_pass = (left == 1);
  assign vert      = is_vertical(lut_rdata.nb);
  assign nb_line   = vert ? lut_rdata.s_col : lut_rdata.s_row;
  assign nb_base   = vert ? lut_rdata.s_row : lut_rdata.s_col;
  assign c_line    = vert ? lut_rdata.c_col : lut_rdata.c_row;
  assign c_base    = vert ? lut_rdata.c_row : lut_rdata.c_col;
  assign tk        = CRD_W'(t);

  always_comb begin
    req = '0;
    if (state == S_RUN) begin
      req.nb_valid       = 1'b1;
      req.nb             = lut_rdata.nb;
      req.nb_line        = nb_line;
      req.nb_pos         = lut_rdata.reverse ? nb_base + CRD_W'(K - 1) - tk : nb_base + tk;
      req.c_valid        = (int'(t) < int'(K));
      req.c_first        = (t == 0);
      req.c_last         = (int'(t) == int'(K) - 1);
      req.tag.clear      = clear_q && first_pass;
      req.tag.final_pass = final_q && last_pass;
      req.tag.stage_end  = last_pass;
      req.c_line         = c_line;
      req.c_pos          = lut_rdata.reverse ? c_base + CRD_W'(K - 1) - tk : c_base + tk;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      entry      <= '0;
      left       <= '0;
      t          <= '0;
      clear_q    <= 1'b0;
      final_q    <= 1'b0;
      first_pass <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start && cmd_count != 0) begin
          state      <= S_RUN;
          entry      <= cmd_first;
          left       <= cmd_count;
          t          <= '0;
          clear_q    <= cmd_clear;
          final_q    <= cmd_final;
          first_pass <= 1'b1;
        end
        S_RUN: begin
          if (t == ($clog2(PASS_LEN))'(PASS_LEN - 1)) begin
            t          <= '0;
            first_pass <= 1'b0;
            if (last_pass) begin
              state <= S_WAIT;
            end else begin
              entry <= entry + 1'b1;
              left  <= left - 1'b1;
            end
          end else begin
            t <= t + 1'b1;
          end
        end
        S_WAIT: if (stage_end) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new command is only taken while idle.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("recon_ctrl: start while busy");

endmodule

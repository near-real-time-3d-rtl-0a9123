// tb_temp_accum: self-checking test of the temporary-results memory and adder.
// Plays sequences of passes (M random SADs each, indices 0..M-1, with random
// idle cycles) tagged clear / middle / final, and checks against a reference
// copy of the memory: the sums sent to the comparator in final passes, that
// nothing leaves in other passes, that a final pass does not change the
// stored sums, and the stage_end pulse after index M-1 of a tagged pass.
module tb_temp_accum;
  import inim_pkg::*;

  localparam int NC = M;
  localparam int IW = $clog2(NC);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [SAD_W-1:0] in_sad = '0;
  logic [IW-1:0] in_idx = '0;
  tag_t in_tag = '0;
  logic out_valid, stage_end;
  logic [ACC_W-1:0] out_sum;
  logic [IW-1:0] out_idx;
  int checks = 0, failures = 0;
  longint ref_tmp [NC];

  temp_accum dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(input bit clr, input bit fin, input bit send);
    for (int m = 0; m < NC; m++) begin
      longint s;
      if ($urandom % 4 == 0) begin
        in_valid = 0; in_sad = SAD_W'($urandom); in_idx = IW'($urandom % NC); in_tag = tag_t'($urandom);
        @(negedge clk);
        checks++;
        if (out_valid || stage_end) begin failures++; $display("FAIL output while idle"); end
      end
      in_valid = 1; in_sad = SAD_W'($urandom % (K * K * 256)); in_idx = IW'(m);
      in_tag = '{clear: clr, final_pass: fin, stage_end: send};
      s = (clr ? 0 : ref_tmp[m]) + longint'(in_sad);
      if (!fin) ref_tmp[m] = s;
      @(negedge clk);
      checks += 3;
      if (out_valid !== fin) begin failures++; $display("FAIL out_valid %b m=%0d", out_valid, m); end
      if (fin && (out_sum !== ACC_W'(s) || int'(out_idx) != m)) begin
        failures++; $display("FAIL sum %0d exp %0d m=%0d", out_sum, s, m);
      end
      if (stage_end !== (send && m == NC - 1)) begin failures++; $display("FAIL stage_end m=%0d", m); end
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // one reconstruction over 4 passes in one command
    pass(1, 0, 0); pass(0, 0, 0); pass(0, 0, 0); pass(0, 1, 1);
    // over three commands (neighbours reloaded in between)
    pass(1, 0, 0); pass(0, 0, 0); pass(0, 0, 0); pass(0, 0, 1);
    pass(0, 0, 0); pass(0, 0, 0); pass(0, 0, 0); pass(0, 0, 1);
    pass(0, 0, 0); pass(0, 0, 0); pass(0, 0, 0); pass(0, 1, 1);
    // a final pass does not overwrite: the next non-clearing pass sees old sums
    pass(0, 1, 0); pass(0, 1, 1);
    // single-pass reconstruction
    pass(1, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

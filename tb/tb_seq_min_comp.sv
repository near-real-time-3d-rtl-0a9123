// tb_seq_min_comp: self-checking test of the sequential minimum comparator.
// Sends many searches of M values (indices 0..M-1, random idle cycles,
// random values, some with ties and with the minimum at the first or last
// index) and checks the minimum and its index (lowest index on a tie), and
// that `done` is high exactly in the cycle after the last value is taken.
module tb_seq_min_comp;
  import inim_pkg::*;

  localparam int NC = M;
  localparam int IW = $clog2(NC);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [ACC_W-1:0] in_val = '0, min_val;
  logic [IW-1:0] in_idx = '0, min_idx;
  logic done;
  int checks = 0, failures = 0;

  seq_min_comp dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 200; s++) begin
      int vals [NC];
      int bv, bi;
      for (int m = 0; m < NC; m++) vals[m] = (s % 3 == 0) ? int'($urandom % 8) + 100 : int'($urandom % (1 << 20));
      if (s % 5 == 1) vals[0] = 5;
      if (s % 5 == 2) vals[NC - 1] = 3;
      bv = vals[0]; bi = 0;
      for (int m = 1; m < NC; m++) if (vals[m] < bv) begin bv = vals[m]; bi = m; end
      for (int m = 0; m < NC; m++) begin
        while ($urandom % 5 == 0) begin
          in_valid = 0; in_val = ACC_W'($urandom % 2); in_idx = IW'(NC - 1);
          @(negedge clk);
          checks++;
          if (done) begin failures++; $display("FAIL done while idle"); end
        end
        in_valid = 1; in_val = ACC_W'(vals[m]); in_idx = IW'(m);
        @(negedge clk);
        checks++;
        if (done !== (m == NC - 1)) begin failures++; $display("FAIL done=%b at index %0d", done, m); end
      end
      in_valid = 0;
      checks++;
      if (min_val !== ACC_W'(bv) || int'(min_idx) != bi) begin
        failures++; $display("FAIL min %0d@%0d exp %0d@%0d", min_val, min_idx, bv, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

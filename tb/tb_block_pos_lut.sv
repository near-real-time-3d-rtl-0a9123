// tb_block_pos_lut: self-checking test of the block-position look-up table.
// Checks that reset clears every entry, then writes random entries in random
// order and reads every entry back combinationally after each write.
module tb_block_pos_lut;
  import inim_pkg::*;

  logic clk = 0, rst_n = 0;
  logic we = 0;
  logic [LUT_AW-1:0] waddr = '0, raddr = '0;
  pos_entry_t wdata = '0, rdata;
  pos_entry_t ref_tbl [LUT_DEPTH];
  int checks = 0, failures = 0;

  block_pos_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < int'(LUT_DEPTH); i++) begin
      raddr = LUT_AW'(i);
      #1;
      checks++;
      if (rdata !== ref_tbl[i]) begin failures++; $display("FAIL entry %0d", i); end
    end
  endtask

  initial begin
    for (int i = 0; i < int'(LUT_DEPTH); i++) ref_tbl[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      we = 1; waddr = LUT_AW'($urandom); wdata = pos_entry_t'($urandom);
      ref_tbl[waddr] = wdata;
      @(negedge clk);
      we = ($urandom % 2 == 0); wdata = pos_entry_t'($urandom); waddr = LUT_AW'($urandom);
      // we is dropped before the next edge only half of the time: model it
      @(posedge clk);
      if (we) ref_tbl[waddr] = wdata;
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ei_line_mem: self-checking test of one line-interleaved memory module.
// Writes random pixels to every address, reads them all back (one-cycle read
// latency), overwrites a random subset while reading other addresses, and
// checks the read data against a reference copy.
module tb_ei_line_mem;
  import inim_pkg::*;

  localparam int DEPTH = STRIPS * EI_SIZE;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0;
  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  pix_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  pix_t ref_mem [DEPTH];

  ei_line_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = pix_t'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++; $display("FAIL addr %0d: %h exp %h", a, rdata, ref_mem[a]);
      end
    end
    for (int n = 0; n < 500; n++) begin
      int ra, wa;
      ra = $urandom % DEPTH; wa = $urandom % DEPTH;
      if (wa == ra) wa = (wa + 1) % DEPTH;
      raddr = AW'(ra); we = 1; waddr = AW'(wa); wdata = pix_t'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[ra]) begin
        failures++; $display("FAIL addr %0d: %h exp %h", ra, rdata, ref_mem[ra]);
      end
      ref_mem[wa] = wdata;
    end
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

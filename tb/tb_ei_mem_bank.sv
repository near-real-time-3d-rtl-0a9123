// tb_ei_mem_bank: self-checking test of one EI memory block.
// Loads a random 64x64 EI strip by strip (lines 11g..11g+10 at one position
// per cycle), then reads K consecutive lines at every legal first line and at
// many random places, a new address every cycle, and checks each of the K
// pixels against the reference image one cycle after its address, while the
// next address is already applied.
module tb_ei_mem_bank;
  import inim_pkg::*;

  logic clk = 0;
  logic wr_en = 0;
  logic [STRIP_W-1:0] wr_strip = '0;
  logic [CRD_W-1:0] wr_pos = '0, rd_line = '0, rd_pos = '0;
  pix_t [K-1:0] wr_pix = '0, rd_pix;
  int checks = 0, failures = 0;
  pix_t img [EI_SIZE][EI_SIZE];   // [line][pos]

  ei_mem_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pl, pp;
    for (int l = 0; l < int'(EI_SIZE); l++)
      for (int p = 0; p < int'(EI_SIZE); p++) img[l][p] = pix_t'($urandom);
    for (int g = 0; g < int'(STRIPS); g++)
      for (int p = 0; p < int'(EI_SIZE); p++) begin
        @(negedge clk);
        wr_en = 1; wr_strip = STRIP_W'(g); wr_pos = CRD_W'(p);
        for (int j = 0; j < int'(K); j++)
          wr_pix[j] = (g * int'(K) + j < int'(EI_SIZE)) ? img[g * int'(K) + j][p] : pix_t'($urandom);
      end
    @(negedge clk);
    wr_en = 0;
    pl = 0; pp = 0;
    for (int n = 0; n <= 3000; n++) begin
      int l, p;
      l = (n < int'(EI_SIZE - K + 1)) ? n : int'($urandom % (EI_SIZE - K + 1));
      p = $urandom % EI_SIZE;
      rd_line = CRD_W'(l); rd_pos = CRD_W'(p);
      if (n > 0) begin
        #1;
        for (int k = 0; k < int'(K); k++) begin
          checks++;
          if (rd_pix[k] !== img[pl + k][pp]) begin
            failures++;
            if (failures < 10) $display("FAIL line %0d+%0d pos %0d: %h exp %h", pl, k, pp, rd_pix[k], img[pl + k][pp]);
          end
        end
      end
      pl = l; pp = p;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

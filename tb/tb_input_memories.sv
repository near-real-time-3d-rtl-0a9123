// tb_input_memories: self-checking test of the six EI memory blocks and the
// neighbour / central multiplexers.
// Loads six different random EIs through the six load ports at once, then
// issues random read requests, one per cycle, and checks one cycle later that
// the neighbour data come from the requested neighbour memory, the central
// data from CMem-hor (left/right) or CMem-ver (up/down), and that the request
// fields come back aligned with the data.
module tb_input_memories;
  import inim_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [5:0] ld_en = '0;
  logic [5:0][STRIP_W-1:0] ld_strip = '0;
  logic [5:0][CRD_W-1:0] ld_pos = '0;
  pix_t [5:0][K-1:0] ld_pix = '0;
  rd_req_t req = '0, rsp;
  pix_t [K-1:0] nb_pix, c_pix;
  int checks = 0, failures = 0;
  int nsel [4] = '{0, 0, 0, 0};
  pix_t img [6][EI_SIZE][EI_SIZE];

  input_memories dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_req_t prev;
    for (int b = 0; b < 6; b++)
      for (int l = 0; l < int'(EI_SIZE); l++)
        for (int p = 0; p < int'(EI_SIZE); p++) img[b][l][p] = pix_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < int'(STRIPS); g++)
      for (int p = 0; p < int'(EI_SIZE); p++) begin
        @(negedge clk);
        for (int b = 0; b < 6; b++) begin
          ld_en[b] = 1; ld_strip[b] = STRIP_W'(g); ld_pos[b] = CRD_W'(p);
          for (int j = 0; j < int'(K); j++)
            ld_pix[b][j] = (g * int'(K) + j < int'(EI_SIZE)) ? img[b][g * int'(K) + j][p] : 8'h00;
        end
      end
    @(negedge clk);
    ld_en = '0;
    for (int n = 0; n < 2000; n++) begin
      req = rd_req_t'({$urandom, $urandom});
      req.nb_line = CRD_W'($urandom % (EI_SIZE - K + 1));
      req.c_line  = CRD_W'($urandom % (EI_SIZE - K + 1));
      @(negedge clk);
      prev = req;
      begin
        int cb;
        cb = is_vertical(prev.nb) ? 5 : 4;
        nsel[prev.nb]++;
        checks++;
        if (rsp !== prev) begin failures++; $display("FAIL rsp misaligned"); end
        for (int k = 0; k < int'(K); k++) begin
          checks += 2;
          if (nb_pix[k] !== img[prev.nb][prev.nb_line + k][prev.nb_pos]) begin
            failures++;
            if (failures < 10) $display("FAIL nb %0d line %0d pos %0d", prev.nb, prev.nb_line + k, prev.nb_pos);
          end
          if (c_pix[k] !== img[cb][prev.c_line + k][prev.c_pos]) begin
            failures++;
            if (failures < 10) $display("FAIL central %0d line %0d pos %0d", cb, prev.c_line + k, prev.c_pos);
          end
        end
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (nsel[i] == 0) begin failures++; $display("FAIL neighbour %0d never read", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

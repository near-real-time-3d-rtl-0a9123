// tb_recon_ctrl: self-checking test of the controller.
// A table model answers the controller's look-up reads. Several commands
// (one to four passes, all four neighbours, forward and reverse scans,
// clear/final flags) are started; every request is compared with positions
// worked out from the table entry in the testbench, the issue phase must last
// exactly passes*(M+2W) cycles without a gap, and `done` must follow the
// accumulator's stage_end by one cycle.
module tb_recon_ctrl;
  import inim_pkg::*;

  localparam int PLEN = int'(M + K) - 1;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [LUT_AW-1:0] cmd_first = '0, lut_raddr;
  logic [LUT_AW:0] cmd_count = '0;
  logic cmd_clear = 0, cmd_final = 0, busy, done, stage_end = 0;
  pos_entry_t lut_rdata;
  rd_req_t req;
  pos_entry_t tbl [LUT_DEPTH];
  int checks = 0, failures = 0;

  assign lut_rdata = tbl[lut_raddr];

  recon_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rd_req_t expect_req(pos_entry_t e, int t, bit clr, bit fin, bit se);
    rd_req_t r;
    bit v;
    int nl, nb, cl, cb;
    v  = (e.nb == NB_UP) || (e.nb == NB_DOWN);
    nl = v ? e.s_col : e.s_row;  nb = v ? e.s_row : e.s_col;
    cl = v ? e.c_col : e.c_row;  cb = v ? e.c_row : e.c_col;
    r = '0;
    r.nb_valid = 1; r.nb = e.nb; r.nb_line = CRD_W'(nl);
    r.nb_pos   = CRD_W'(e.reverse ? nb + int'(K) - 1 - t : nb + t);
    r.c_valid  = (t < int'(K)); r.c_first = (t == 0); r.c_last = (t == int'(K) - 1);
    r.tag      = '{clear: clr, final_pass: fin, stage_end: se};
    r.c_line   = CRD_W'(cl);
    r.c_pos    = CRD_W'(e.reverse ? cb + int'(K) - 1 - t : cb + t);
    return r;
  endfunction

  task automatic run_cmd(int first, int count, bit clr, bit fin);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy before start"); end
    start = 1; cmd_first = LUT_AW'(first); cmd_count = (LUT_AW+1)'(count);
    cmd_clear = clr; cmd_final = fin;
    @(negedge clk);
    start = 0; cmd_clear = 0; cmd_final = 0; cmd_first = '0;
    for (int p = 0; p < count; p++)
      for (int t = 0; t < PLEN; t++) begin
        rd_req_t er;
        er = expect_req(tbl[first + p], t, clr && p == 0, fin && p == count - 1, p == count - 1);
        checks++;
        if (req !== er) begin
          failures++;
          if (failures < 10) $display("FAIL cmd %0d pass %0d t %0d: %h exp %h", first, p, t, req, er);
        end
        @(negedge clk);
      end
    // issue phase over: nothing more is requested while waiting
    repeat (7) begin
      checks++;
      if (req.nb_valid || !busy || done) begin failures++; $display("FAIL after issue phase"); end
      @(negedge clk);
    end
    stage_end = 1;
    @(negedge clk);
    stage_end = 0;
    checks++;
    if (!done || busy) begin failures++; $display("FAIL done/busy after stage_end"); end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    for (int i = 0; i < int'(LUT_DEPTH); i++) begin
      tbl[i].nb      = nb_sel_t'(i % 4);
      tbl[i].reverse = (i % 3 == 1);
      tbl[i].c_row   = CRD_W'($urandom % (EI_SIZE - K + 1));
      tbl[i].c_col   = CRD_W'($urandom % (EI_SIZE - K + 1));
      tbl[i].s_row   = CRD_W'($urandom % (EI_SIZE - K + 1));
      tbl[i].s_col   = CRD_W'($urandom % (EI_SIZE - K + 1));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_cmd(0, 4, 1, 1);
    run_cmd(4, 4, 1, 0);
    run_cmd(8, 4, 0, 0);
    run_cmd(12, 4, 0, 1);
    run_cmd(5, 1, 1, 1);
    run_cmd(9, 2, 0, 1);
    // a command of zero passes is ignored
    @(negedge clk);
    start = 1; cmd_count = '0;
    @(negedge clk);
    start = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL zero-pass command accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

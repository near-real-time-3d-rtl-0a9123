// tb_sad_array: self-checking test of the M-unit SAD array.
// Runs several passes back to back (a new pass every M+2W cycles): each pass
// has a random central block and M+2W random neighbour lines, some passes with
// the best match planted at a known offset. Checks every one of the M results
// against a reference SAD, the result order (index m in cycle m), the latency
// (unit m delivers K+1+m cycles after the first line is driven) and the tag.
module tb_sad_array;
  import inim_pkg::*;

  localparam int NU   = M;
  localparam int PLEN = NU + int'(K) - 1;
  localparam int NPASS = 6;

  logic clk = 0, rst_n = 0;
  pix_t [K-1:0] nb_pix = '0, c_pix = '0;
  logic c_valid = 0, c_first = 0, c_last = 0;
  tag_t c_tag = '0;
  logic out_valid;
  logic [SAD_W-1:0] out_sad;
  logic [$clog2(NU)-1:0] out_idx;
  tag_t out_tag;
  int checks = 0, failures = 0;

  sad_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int sad; int idx; int cyc; tag_t tag; } exp_t;
  exp_t expq [$];
  int cyc = 0;
  int nres = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      exp_t e;
      nres++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected result");
      end else begin
        e = expq.pop_front();
        checks++;
        if (out_sad !== SAD_W'(e.sad) || int'(out_idx) != e.idx || cyc != e.cyc || out_tag !== e.tag) begin
          failures++;
          $display("FAIL idx=%0d/%0d sad=%0d/%0d cyc=%0d/%0d", out_idx, e.idx, out_sad, e.sad, cyc, e.cyc);
        end
      end
    end
  end

  initial begin
    pix_t [K-1:0] cb [K];
    pix_t [K-1:0] nb [PLEN];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < NPASS; p++) begin
      tag_t tg;
      int k0;
      tg = tag_t'(p);
      for (int l = 0; l < int'(K); l++)
        for (int i = 0; i < int'(K); i++) cb[l][i] = pix_t'($urandom);
      for (int l = 0; l < PLEN; l++)
        for (int i = 0; i < int'(K); i++) nb[l][i] = pix_t'($urandom);
      if (p % 2 == 1) begin
        int off;
        off = (p * 7) % NU;
        for (int l = 0; l < int'(K); l++) nb[off + l] = cb[l];
      end
      k0 = cyc;
      for (int m = 0; m < NU; m++) begin
        int s;
        s = 0;
        for (int l = 0; l < int'(K); l++)
          for (int i = 0; i < int'(K); i++)
            s += (cb[l][i] > nb[m + l][i]) ? cb[l][i] - nb[m + l][i] : nb[m + l][i] - cb[l][i];
        expq.push_back('{sad: s, idx: m, cyc: k0 + int'(K) + 1 + m, tag: tg});
      end
      for (int t = 0; t < PLEN; t++) begin
        nb_pix  = nb[t];
        c_valid = (t < int'(K));
        c_first = (t == 0);
        c_last  = (t == int'(K) - 1);
        c_pix   = (t < int'(K)) ? cb[t] : pix_t'($urandom);
        c_tag   = (t == 0) ? tg : tag_t'($urandom);
        @(negedge clk);
      end
    end
    c_valid = 0; c_first = 0; c_last = 0;
    repeat (PLEN + 5) @(negedge clk);
    checks++;
    if (nres != NPASS * NU || expq.size() != 0) begin
      failures++; $display("FAIL %0d results, %0d missing", nres, expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

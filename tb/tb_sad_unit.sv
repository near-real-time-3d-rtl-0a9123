// tb_sad_unit: self-checking test of one (2W+1)x1 SAD unit.
// Feeds random 11x11 block pairs one line per cycle, back to back, and checks
// each block SAD against a reference sum, the K-cycle rate (done exactly one
// cycle after the last line) and the returned tag. Includes all-equal and
// maximum-difference blocks.
module tb_sad_unit;
  import inim_pkg::*;

  logic clk = 0, rst_n = 0;
  logic en = 0, first = 0, last = 0;
  tag_t tag_in = '0, tag_out;
  pix_t [K-1:0] a, b;
  logic done;
  logic [SAD_W-1:0] sad;
  int checks = 0, failures = 0;

  sad_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expected [$];
  tag_t exp_tag [$];
  int cyc = 0, last_cyc [$];

  // Result monitor. A line driven after edge k is taken at edge k+1, so the
  // result of a block whose last line was driven after edge k is seen at k+2.
  always @(posedge clk) begin
    cyc++;
    if (rst_n && done) begin
      int e; tag_t et; int lc;
      e = expected.pop_front(); et = exp_tag.pop_front(); lc = last_cyc.pop_front();
      checks++;
      if (sad !== SAD_W'(e) || tag_out !== et || cyc != lc + 2) begin
        failures++;
        $display("FAIL sad=%0d exp=%0d tag=%b/%b cyc=%0d last=%0d", sad, e, tag_out, et, cyc, lc);
      end
    end
  end

  task automatic run_block(input int mode, input bit idle_after);
    pix_t [K-1:0][K-1:0] ba, bb;
    int ref_sad = 0;
    tag_t tg;
    for (int l = 0; l < int'(K); l++)
      for (int i = 0; i < int'(K); i++) begin
        case (mode)
          0: begin ba[l][i] = pix_t'($urandom); bb[l][i] = pix_t'($urandom); end
          1: begin ba[l][i] = pix_t'($urandom); bb[l][i] = ba[l][i]; end
          default: begin ba[l][i] = ((l + i) % 2 != 0) ? 8'hFF : 8'h00; bb[l][i] = ~ba[l][i]; end
        endcase
        ref_sad += (ba[l][i] > bb[l][i]) ? ba[l][i] - bb[l][i] : bb[l][i] - ba[l][i];
      end
    tg = tag_t'($urandom);
    expected.push_back(ref_sad);
    exp_tag.push_back(tg);
    for (int l = 0; l < int'(K); l++) begin
      @(negedge clk);
      en = 1; first = (l == 0); last = (l == int'(K) - 1);
      tag_in = (l == 0) ? tg : tag_t'($urandom);
      a = ba[l]; b = bb[l];
      if (l == int'(K) - 1) last_cyc.push_back(cyc);
    end
    if (idle_after) begin
      // idle cycle with garbage on the inputs: en must gate everything
      @(negedge clk);
      en = 0; first = 1; last = 1; a = pix_t'($urandom); b = '1;
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) run_block(n % 5 == 0 ? 1 : ((n % 7 == 0) ? 2 : 0), n % 3 == 0);
    @(negedge clk);
    en = 0; first = 0; last = 0;
    repeat (5) @(negedge clk);
    if (expected.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_inim_workload: the acquisition-system workload at N = 3, S = 2, on a few
// elemental images of a synthetic integral image, at the default size.
//
// The scene is a textured plane seen through the lens array: EI (k,l) shows
// the texture shifted by D pixels per lens, so a block of the central EI is
// found D*n pixels away in a neighbour n lenses away (towards lower columns in
// the right neighbour, higher in the left one, and likewise for down/up).
// For every processed EI the engine searches four blocks: the central-pixel
// block and three refinement blocks next to it. Each search runs one command
// per radius n = 1..3 (four passes: right, left, up, down), with the four
// neighbour memories reloaded before each command; the position table places
// the true match at candidate MSTAR for every radius. The testbench checks
// each minimum and candidate against SADs computed directly from the images,
// checks that the planted candidate wins, and reports the cycles spent per EI
// (loads included) and the frame rate they imply for a 64x64-lens image at
// 43 MHz.
module tb_inim_workload;
  import inim_pkg::*;

  localparam int PLEN  = int'(M + K) - 1;
  localparam int KK    = int'(K);
  localparam int N     = 3;
  localparam int D     = 2;
  localparam int MSTAR = 15;
  localparam int NEI   = 3;   // EIs processed: (10,10), (10,11), (10,12)

  logic clk = 0, rst_n = 0;
  logic [5:0] ld_en = '0;
  logic [5:0][STRIP_W-1:0] ld_strip = '0;
  logic [5:0][CRD_W-1:0] ld_pos = '0;
  pix_t [5:0][K-1:0] ld_pix = '0;
  logic lut_we = 0;
  logic [LUT_AW-1:0] lut_waddr = '0;
  pos_entry_t lut_wdata = '0;
  logic start = 0;
  logic [LUT_AW-1:0] cmd_first = '0;
  logic [LUT_AW:0] cmd_count = '0;
  logic cmd_clear = 0, cmd_final = 0;
  logic busy, done, res_valid;
  logic [ACC_W-1:0] res_sad;
  logic [IDX_W-1:0] res_idx;

  inim_recon_top dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Texture and the EI of lens (k,l) with a little per-lens noise.
  function automatic int tex(int y, int x);
    int h;
    h = (y * 1103 + x * 2999) ^ (y * x * 37) ^ ((y >> 2) * 7919);
    return (h ^ (h >> 7)) & 255;
  endfunction

  function automatic pix_t ei_pix(int k, int l, int r, int c);
    int v, n;
    n = ((k * 131 + l * 71 + r * 17 + c * 5) * 2654435) >> 13;
    v = tex(k * D + r, l * D + c) + (n % 5) - 2;
    return pix_t'(v < 0 ? 0 : (v > 255 ? 255 : v));
  endfunction

  // images held in memory, [row][col]: 0 up, 1 left, 2 right, 3 down, 4 central
  int lens_k [5], lens_l [5];
  pos_entry_t tbl [LUT_DEPTH];
  longint ref_tot [M];

  function automatic int absd(int a, int b);
    return a > b ? a - b : b - a;
  endfunction

  function automatic int ref_sad(pos_entry_t e, int m);
    int s, nr, nc, dir, b;
    s = 0;
    b = int'(e.nb);
    dir = e.reverse ? -m : m;
    nr = int'(e.s_row); nc = int'(e.s_col);
    if (is_vertical(e.nb)) nr += dir; else nc += dir;
    for (int r = 0; r < KK; r++)
      for (int c = 0; c < KK; c++)
        s += absd(ei_pix(lens_k[4], lens_l[4], int'(e.c_row) + r, int'(e.c_col) + c),
                  ei_pix(lens_k[b], lens_l[b], nr + r, nc + c));
    return s;
  endfunction

  task automatic load(logic [5:0] mask);
    for (int g = 0; g < int'(STRIPS); g++)
      for (int p = 0; p < int'(EI_SIZE); p++) begin
        @(negedge clk);
        for (int b = 0; b < 6; b++) begin
          int src;
          src = (b == 5) ? 4 : b;
          ld_en[b] = mask[b]; ld_strip[b] = STRIP_W'(g); ld_pos[b] = CRD_W'(p);
          for (int j = 0; j < KK; j++) begin
            int ln;
            ln = g * KK + j;
            if (ln >= int'(EI_SIZE)) ld_pix[b][j] = '0;
            else if (b == 1 || b == 2 || b == 4) ld_pix[b][j] = ei_pix(lens_k[src], lens_l[src], ln, p);
            else ld_pix[b][j] = ei_pix(lens_k[src], lens_l[src], p, ln);
          end
        end
      end
    @(negedge clk);
    ld_en = '0;
  endtask

  task automatic write_lut(int a, nb_sel_t nb, bit rev, int cr, int cc, int sr, int sc);
    pos_entry_t e;
    e = '{nb: nb, reverse: rev, c_row: CRD_W'(cr), c_col: CRD_W'(cc), s_row: CRD_W'(sr), s_col: CRD_W'(sc)};
    tbl[a] = e;
    @(negedge clk);
    lut_we = 1; lut_waddr = LUT_AW'(a); lut_wdata = e;
    @(negedge clk);
    lut_we = 0;
  endtask

  // Passes for block (cr,cc) at radius n: the match lies n*D away, at candidate MSTAR.
  task automatic write_radius(int a, int cr, int cc, int n);
    write_lut(a + 0, NB_RIGHT, 0, cr, cc, cr, cc - n * D - MSTAR);
    write_lut(a + 1, NB_LEFT,  1, cr, cc, cr, cc + n * D + MSTAR);
    write_lut(a + 2, NB_UP,    1, cr, cc, cr + n * D + MSTAR, cc);
    write_lut(a + 3, NB_DOWN,  0, cr, cc, cr - n * D - MSTAR, cc);
  endtask

  task automatic set_neighbours(int k, int l, int n);
    lens_k[0] = k - n; lens_l[0] = l;
    lens_k[1] = k;     lens_l[1] = l - n;
    lens_k[2] = k;     lens_l[2] = l + n;
    lens_k[3] = k + n; lens_l[3] = l;
  endtask

  task automatic run(int first, bit clr, bit fin);
    @(negedge clk);
    start = 1; cmd_first = LUT_AW'(first); cmd_count = (LUT_AW+1)'(4);
    cmd_clear = clr; cmd_final = fin;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    int blk_r [4] = '{27, 27, 28, 28};
    int blk_c [4] = '{27, 28, 27, 28};
    int total_cycles;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // table: entries 4*(n-1) .. 4*(n-1)+3 for radius n, rewritten per block
    total_cycles = 0;
    for (int e = 0; e < NEI; e++) begin
      int k, l, c0;
      k = 10; l = 10 + e;
      lens_k[4] = k; lens_l[4] = l;
      c0 = cyc;
      for (int b = 0; b < 4; b++) begin
        for (int n = 1; n <= N; n++) write_radius(4 * (n - 1), blk_r[b], blk_c[b], n);
        for (int n = 1; n <= N; n++) begin
          set_neighbours(k, l, n);
          load((b == 0 && n == 1) ? 6'b111111 : 6'b001111);
          for (int m = 0; m < int'(M); m++) begin
            if (n == 1) ref_tot[m] = 0;
            for (int q = 0; q < 4; q++) ref_tot[m] += ref_sad(tbl[4 * (n - 1) + q], m);
          end
          run(4 * (n - 1), n == 1, n == N);
        end
        begin
          longint bv;
          int bi;
          bv = ref_tot[0]; bi = 0;
          for (int m = 1; m < int'(M); m++) if (ref_tot[m] < bv) begin bv = ref_tot[m]; bi = m; end
          checks += 2;
          if (res_sad !== ACC_W'(bv) || int'(res_idx) != bi) begin
            failures++; $display("FAIL EI (%0d,%0d) block %0d: %0d@%0d, expected %0d@%0d", k, l, b, res_sad, res_idx, bv, bi);
          end
          if (bi != MSTAR) begin
            failures++; $display("FAIL EI (%0d,%0d) block %0d: planted candidate not best (%0d)", k, l, b, bi);
          end
        end
      end
      $display("EI (%0d,%0d): 4 blocks, N=%0d, %0d cycles", k, l, N, cyc - c0);
      total_cycles += cyc - c0;
    end
    begin
      real per_ei, frame_cycles;
      per_ei = real'(total_cycles) / NEI;
      frame_cycles = per_ei * (64 - 2 * N) * (64 - 2 * N);
      $display("average %0.0f cycles per EI (table writes included); %0d EIs per frame -> %0.2f frames/s at 43 MHz",
               per_ei, (64 - 2 * N) * (64 - 2 * N), 43.0e6 / frame_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

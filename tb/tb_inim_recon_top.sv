// tb_inim_recon_top: end-to-end test of the whole accelerator at its default
// size (64x64 EIs, 11x11 window, 30 SAD units).
//
// The testbench builds a small scene: a random central EI and four random
// neighbour EIs into which the central 11x11 block is copied, with a little
// noise, at the positions of one chosen candidate. The left and up neighbours
// are searched with reverse scans so that candidate m means the same
// disparity in all four directions. It loads the six memories (the central EI
// twice, row-wise and column-wise; up/down column-wise), fills the position
// table and runs:
//   1. an initial-grid search for the central pixel, N = 1: one command of
//      four passes, clear + final;
//   2. a search over two neighbour distances, N = 2: a clearing command of
//      four passes, a reload of the four neighbour memories, and a final
//      command of four passes that adds to the stored partial sums;
//   3. a grid-refinement search for an off-centre block, N = 1.
// Every result (minimum total SAD and its candidate) is compared with a
// reference computed here directly from the images, and the command time is
// checked against P*(M+2W)+4 cycles for P passes (from the edge that takes
// `start` to the edge that raises `done`). Counters record that each
// mechanism happened: zero-start passes, passes added to stored sums, final
// passes into the comparator, horizontal and vertical searches (CMem-hor and
// CMem-ver), forward and reverse scans, and neighbour reloads.
module tb_inim_recon_top;
  import inim_pkg::*;

  localparam int PLEN = int'(M + K) - 1;
  localparam int KK = int'(K);

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
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // images [row][col]; 0 up, 1 left, 2 right, 3 down, 4 central
  pix_t img [5][EI_SIZE][EI_SIZE];
  pos_entry_t tbl [LUT_DEPTH];
  longint ref_tot [M];

  // ---- mechanism counters, observed inside the design ----
  int n_clear = 0, n_added = 0, n_final = 0, n_hor = 0, n_ver = 0, n_rev = 0, n_fwd = 0, n_reload = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_acc.in_valid && dut.u_acc.in_idx == '0) begin
      if (dut.u_acc.in_tag.clear) n_clear++; else n_added++;
      if (dut.u_acc.in_tag.final_pass) n_final++;
    end
    if (dut.u_ctrl.req.c_first) begin
      if (is_vertical(dut.u_ctrl.req.nb)) n_ver++; else n_hor++;
      if (dut.u_ctrl.lut_rdata.reverse) n_rev++; else n_fwd++;
    end
  end

  function automatic int absd(int a, int b);
    return a > b ? a - b : b - a;
  endfunction

  // SAD of candidate m of a table entry, straight from the images.
  function automatic int ref_sad(pos_entry_t e, int m);
    int s, nr, nc, dir;
    s = 0;
    dir = e.reverse ? -m : m;
    nr = int'(e.s_row); nc = int'(e.s_col);
    if (is_vertical(e.nb)) nr += dir; else nc += dir;
    for (int r = 0; r < KK; r++)
      for (int c = 0; c < KK; c++)
        s += absd(img[4][int'(e.c_row) + r][int'(e.c_col) + c], img[int'(e.nb)][nr + r][nc + c]);
    return s;
  endfunction

  // Copy the central block at (cr,cc) into neighbour nb at (r,c), with noise.
  task automatic plant(int nb, int cr, int cc, int r, int c);
    for (int i = 0; i < KK; i++)
      for (int j = 0; j < KK; j++) begin
        int v;
        v = int'(img[4][cr + i][cc + j]) + int'($urandom % 7) - 3;
        img[nb][r + i][c + j] = pix_t'(v < 0 ? 0 : (v > 255 ? 255 : v));
      end
  endtask

  task automatic new_neighbours();
    for (int b = 0; b < 4; b++)
      for (int r = 0; r < int'(EI_SIZE); r++)
        for (int c = 0; c < int'(EI_SIZE); c++) img[b][r][c] = pix_t'($urandom);
  endtask

  // Load memories; mask selects which of the six are written.
  task automatic load(logic [5:0] mask);
    for (int g = 0; g < int'(STRIPS); g++)
      for (int p = 0; p < int'(EI_SIZE); p++) begin
        @(negedge clk);
        for (int b = 0; b < 6; b++) begin
          ld_en[b] = mask[b]; ld_strip[b] = STRIP_W'(g); ld_pos[b] = CRD_W'(p);
          for (int j = 0; j < KK; j++) begin
            int ln;
            ln = g * KK + j;
            if (ln >= int'(EI_SIZE)) ld_pix[b][j] = '0;
            else if (b == 1 || b == 2 || b == 4) ld_pix[b][j] = img[b == 4 ? 4 : b][ln][p];  // row-wise
            else ld_pix[b][j] = img[b == 5 ? 4 : b][p][ln];                                    // column-wise
          end
        end
      end
    @(negedge clk);
    ld_en = '0;
    if (mask[3:0] != 0) n_reload++;
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

  // Four passes (right, left, up, down) for central block (cr,cc), with the
  // right/down search starting `d` positions before it and left/up mirrored.
  task automatic write_quad(int a, int cr, int cc, int d);
    write_lut(a + 0, NB_RIGHT, 0, cr, cc, cr, cc - d);
    write_lut(a + 1, NB_LEFT,  1, cr, cc, cr, cc + d);
    write_lut(a + 2, NB_UP,    1, cr, cc, cr + d, cc);
    write_lut(a + 3, NB_DOWN,  0, cr, cc, cr - d, cc);
  endtask

  task automatic plant_quad(int a, int mstar);
    for (int q = 0; q < 4; q++) begin
      pos_entry_t e;
      int dir, r, c;
      e = tbl[a + q];
      dir = e.reverse ? -mstar : mstar;
      r = int'(e.s_row); c = int'(e.s_col);
      if (is_vertical(e.nb)) r += dir; else c += dir;
      plant(int'(e.nb), int'(e.c_row), int'(e.c_col), r, c);
    end
  endtask

  task automatic add_ref(int a, bit clr);
    for (int m = 0; m < int'(M); m++) begin
      if (clr) ref_tot[m] = 0;
      for (int q = 0; q < 4; q++) ref_tot[m] += ref_sad(tbl[a + q], m);
    end
  endtask

  // Run one command and check its timing and, if final, its result.
  task automatic run(int first, int count, bit clr, bit fin, int expect_idx);
    int cycles;
    bit got;
    @(negedge clk);
    start = 1; cmd_first = LUT_AW'(first); cmd_count = (LUT_AW+1)'(count);
    cmd_clear = clr; cmd_final = fin;
    @(negedge clk);
    start = 0;
    cycles = 1;
    got = 0;
    while (!done && cycles < 10000) begin
      @(negedge clk);
      cycles++;
      if (res_valid) got = 1;
    end
    checks++;
    if (cycles != count * PLEN + 4) begin
      failures++; $display("FAIL command took %0d cycles, expected %0d", cycles, count * PLEN + 4);
    end
    checks++;
    if (got !== fin) begin failures++; $display("FAIL res_valid=%b for final=%b", got, fin); end
    if (fin) begin
      longint bv;
      int bi;
      bv = ref_tot[0]; bi = 0;
      for (int m = 1; m < int'(M); m++) if (ref_tot[m] < bv) begin bv = ref_tot[m]; bi = m; end
      checks += 2;
      if (res_sad !== ACC_W'(bv) || int'(res_idx) != bi) begin
        failures++; $display("FAIL result %0d@%0d, expected %0d@%0d", res_sad, res_idx, bv, bi);
      end else
        $display("command at %0d: best candidate %0d, total SAD %0d, %0d cycles", first, bi, bv, cycles);
      if (expect_idx >= 0 && bi != expect_idx) begin
        failures++; $display("FAIL planted candidate %0d not found (%0d)", expect_idx, bi);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < int'(EI_SIZE); r++)
      for (int c = 0; c < int'(EI_SIZE); c++) img[4][r][c] = pix_t'($urandom);
    new_neighbours();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Table: 0..3 central pixel (block 27..37) at distance 1, search offsets
    // m-24; 4..7 the same block for the second distance; 8..11 a refinement
    // block at rows 16..26, columns 40..50.
    write_quad(0, 27, 27, 24);
    write_quad(4, 27, 27, 20);
    write_quad(8, 16, 40, 12);

    // 1. initial grid, N = 1
    plant_quad(0, 17);
    load(6'b111111);
    add_ref(0, 1);
    run(0, 4, 1, 1, 17);

    // 3. refinement block, N = 1 (same memories, new planted block)
    plant_quad(8, 5);
    load(6'b001111);
    add_ref(8, 1);
    run(8, 4, 1, 1, 5);

    // 2. N = 2: distance-1 neighbours, reload, distance-2 neighbours
    new_neighbours();
    plant_quad(0, 9);
    load(6'b001111);
    add_ref(0, 1);
    run(0, 4, 1, 0, -1);
    new_neighbours();
    plant_quad(4, 9);
    load(6'b001111);
    add_ref(4, 0);
    run(4, 4, 0, 1, 9);

    repeat (5) @(negedge clk);
    $display("mechanisms: clear=%0d added=%0d final=%0d hor=%0d ver=%0d fwd=%0d rev=%0d reload=%0d",
             n_clear, n_added, n_final, n_hor, n_ver, n_fwd, n_rev, n_reload);
    checks += 8;
    if (n_clear == 0)  begin failures++; $display("FAIL no zero-start pass"); end
    if (n_added == 0)  begin failures++; $display("FAIL no pass added to stored sums"); end
    if (n_final == 0)  begin failures++; $display("FAIL no final pass"); end
    if (n_hor == 0)    begin failures++; $display("FAIL no horizontal search"); end
    if (n_ver == 0)    begin failures++; $display("FAIL no vertical search"); end
    if (n_fwd == 0)    begin failures++; $display("FAIL no forward scan"); end
    if (n_rev == 0)    begin failures++; $display("FAIL no reverse scan"); end
    if (n_reload < 2)  begin failures++; $display("FAIL no neighbour reload"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

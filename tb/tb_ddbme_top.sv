// tb_ddbme_top: end-to-end test of the DDBME at its default sizes on a CIF
// (352x288) reference alpha plane.
//
// The testbench draws a reference plane of a few elliptic objects plus noise,
// loads it into the frame memory model, and runs a series of searches. For
// each one it computes the expected result itself: the SAD of all 32x32
// candidates around the predictor (pixels outside the frame are 0), the first
// smallest one in the order strip 0 (i = 0..15) then strip 1, j upwards,
// i upwards, and compares motion vector and SAD. It also checks the predictor
// choice, the predictor-check shortcut, that each strip of 32 positions runs
// in exactly 32 x 16 cycles without a stall, the number of PE cycles per
// search, and the time from the last PE cycle to done. It counts how often
// each mechanism occurred (SR fill stall, out-of-frame word, unaligned and
// aligned search range, predictor hit and miss, predictor default 0) and
// fails if one never did.
module tb_ddbme_top;
  import ddbme_pkg::*;

  localparam int W_WORDS = 22;
  localparam int H       = 288;
  localparam int W       = W_WORDS * 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n16 = 16;      // loop bound held in a variable so the simulator keeps the loops

  // DUT signals
  logic        cur_we = 0;
  logic [3:0]  cur_waddr = 0;
  row_t        cur_wdata = 0;
  logic        start = 0, pre_en = 0;
  sad_t        thr = 0;
  logic [5:0]  bab_y = 0;
  logic [5:0]  bab_x = 0;
  mv_t         nb_mv [6];
  logic [5:0]  nb_valid = 0;
  logic        fm_re;
  logic [9:0]  fm_row;
  logic [5:0]  fm_col;
  row_t        fm_rdata;
  logic        busy, done, used_pred, pre_checked, mvp_defined, stall;
  mv_t         mv, mvp_out;
  sad_t        min_sad;

  logic        fw_we = 0;
  logic [9:0]  fw_row = 0;
  logic [5:0]  fw_col = 0;
  logic [15:0] fw_data = 0;

  ddbme_top dut (
    .clk, .rst_n, .cur_we, .cur_waddr, .cur_wdata, .start, .pre_en, .thr,
    .bab_y, .bab_x, .nb_mv, .nb_valid,
    .frame_h(10'(H)), .frame_w_words(6'(W_WORDS)),
    .fm_re, .fm_row, .fm_col, .fm_rdata,
    .busy, .done, .mv, .min_sad, .used_pred, .pre_checked, .mvp_out,
    .mvp_defined, .stall
  );

  frame_mem_model #(.W_WORDS(W_WORDS), .H(H)) u_fm (
    .clk, .re(fm_re), .row(fm_row), .col(fm_col), .rdata(fm_rdata),
    .we(fw_we), .wrow(fw_row), .wcol(fw_col), .wdata(fw_data)
  );

  // ---------------- reference plane (testbench copy) ----------------
  bit plane [H][W];
  bit curb  [16][16];

  function automatic bit ref_pix(int x, int y);
    if (x < 0 || y < 0 || x >= W || y >= H) return 1'b0;
    return plane[y][x];
  endfunction

  task automatic make_plane();
    int cx[4] = '{100, 230, 60, 300};
    int cy[4] = '{90, 150, 220, 40};
    int rx[4] = '{60, 45, 35, 30};
    int ry[4] = '{50, 70, 40, 25};
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        bit v = 0;
        for (int o = 0; o < n16/4; o++) begin
          int dx = x - cx[o], dy = y - cy[o];
          if (dx*dx*ry[o]*ry[o] + dy*dy*rx[o]*rx[o] <= rx[o]*rx[o]*ry[o]*ry[o]) v = 1;
        end
        if (($urandom % 50) == 0) v = ~v;
        plane[y][x] = v;
      end
  endtask

  task automatic load_plane();
    for (int y = 0; y < H; y++)
      for (int c = 0; c < W_WORDS; c++) begin
        logic [15:0] wv;
        for (int b = 0; b < n16; b++) wv[15-b] = plane[y][16*c+b];
        @(negedge clk);
        fw_we = 1; fw_row = 10'(y); fw_col = 6'(c); fw_data = wv;
      end
    @(negedge clk); fw_we = 0;
  endtask

  // current BAB: the reference block at (sx,sy) with some pixels flipped
  task automatic load_cur(int sx, int sy, int flips);
    for (int r = 0; r < n16; r++)
      for (int b = 0; b < n16; b++) curb[r][b] = ref_pix(sx + b, sy + r);
    for (int f = 0; f < flips; f++) begin
      int r = $urandom % 16, b = $urandom % 16;
      curb[r][b] = ~curb[r][b];
    end
    for (int r = 0; r < n16; r++) begin
      row_t wv;
      for (int b = 0; b < n16; b++) wv[15-b] = curb[r][b];
      @(negedge clk);
      cur_we = 1; cur_waddr = 4'(r); cur_wdata = wv;
    end
    @(negedge clk); cur_we = 0;
  endtask

  function automatic int cand_sad(int bx, int by, int mvx, int mvy);
    int s = 0;
    for (int r = 0; r < n16; r++)
      for (int b = 0; b < n16; b++)
        s += int'(curb[r][b] ^ ref_pix(16*bx + mvx + b, 16*by + mvy + r));
    return s;
  endfunction

  // ---------------- mechanism and timing monitors ----------------
  int n_stall = 0, n_zero_word = 0, n_unaligned = 0, n_aligned = 0;
  int n_pre_hit = 0, n_pre_miss = 0, n_mvp_zero = 0, n_mvp_cand = 0;
  int pe_cycles = 0, cyc = 0, last_pe_cyc = 0;
  int strip_first [2], strip_last [2];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && busy) begin
      if (stall) n_stall++;
      if (dut.u_ag.f_issue && dut.u_ag.f_zero) n_zero_word++;
      if (dut.u_ag.pe_valid) begin
        pe_cycles++;
        last_pe_cyc = cyc;
        if (!dut.u_ag.pe_tag.pre) begin
          if (dut.u_ag.pe_tag.j == 0 && dut.u_ag.pe_first)
            strip_first[dut.u_ag.pe_tag.strip] = cyc;
          strip_last[dut.u_ag.pe_tag.strip] = cyc;
        end
      end
    end
  end

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one search; returns when done
  task automatic run_search(int bx, int by, int px, int py, int srcx, int srcy,
                            int flips, bit pre, int thr_v, bit use_nb);
    int best, bi, bj, s, exp_x, exp_y, t0, done_cyc;
    bit exp_pre;
    load_cur(srcx, srcy, flips);
    // neighbour MVs: when use_nb, put the predictor in MV2 (a texture MV) and
    // leave the shape MVs undefined; otherwise no neighbour is defined
    for (int c = 0; c < 6; c++) nb_mv[c] = '{x: MV_W'(c + 1), y: MV_W'(-c)};
    nb_valid = 6'b0;
    if (use_nb) begin
      nb_mv[4]    = '{x: MV_W'(px), y: MV_W'(py)};
      nb_valid    = 6'b110000;   // MV2 and MV3 defined, MV2 first in priority
      n_mvp_cand++;
    end else begin
      px = 0; py = 0;
      n_mvp_zero++;
    end
    if (((16*bx + px) % 16) != 0) n_unaligned++; else n_aligned++;
    @(negedge clk);
    bab_x = 6'(bx); bab_y = 6'(by); pre_en = pre; thr = sad_t'(thr_v);
    start = 1;
    pe_cycles = 0;
    strip_first = '{0, 0}; strip_last = '{0, 0};
    t0 = cyc;
    #1;
    check(mvp_out.x == MV_W'(px) && mvp_out.y == MV_W'(py) && mvp_defined == use_nb,
          $sformatf("predictor (%0d,%0d) got (%0d,%0d)", px, py, int'(mvp_out.x), int'(mvp_out.y)));
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    done_cyc = cyc;

    // expected result
    exp_pre = pre && (cand_sad(bx, by, px, py) < thr_v);
    if (exp_pre) begin
      best = cand_sad(bx, by, px, py); exp_x = px; exp_y = py;
      n_pre_hit++;
    end else begin
      if (pre) n_pre_miss++;
      best = 1 << 30; bi = 0; bj = 0;
      for (int st = 0; st < 2; st++)
        for (int j = 0; j < 2*n16; j++)
          for (int k = 0; k < n16; k++) begin
            s = cand_sad(bx, by, px + 16*st + k - 16, py + j - 16);
            if (s < best) begin best = s; bi = 16*st + k; bj = j; end
          end
      exp_x = px + bi - 16; exp_y = py + bj - 16;
    end
    check(mv.x == MV_W'(exp_x) && mv.y == MV_W'(exp_y),
          $sformatf("mv (%0d,%0d) expected (%0d,%0d)", int'(mv.x), int'(mv.y), exp_x, exp_y));
    check(int'(min_sad) == best, $sformatf("sad %0d expected %0d", min_sad, best));
    check(used_pred == exp_pre, "used_pred");
    if (!exp_pre) begin
      // 32 positions x 16 rows x 2 strips of PE work (plus 16 for the check)
      check(pe_cycles == 32*16*2 + (pre ? 16 : 0),
            $sformatf("PE cycles %0d", pe_cycles));
      // each strip runs back to back: 32 x 16 cycles from first to last row
      check(strip_last[0] - strip_first[0] == 32*16 - 1 &&
            strip_last[1] - strip_first[1] == 32*16 - 1,
            $sformatf("strip spans %0d %0d", strip_last[0] - strip_first[0],
                      strip_last[1] - strip_first[1]));
      // last PE row -> SADs -> 16 comparisons -> done
      check(done_cyc - last_pe_cyc == 18,
            $sformatf("tail %0d", done_cyc - last_pe_cyc));
    end
    $display("search bab=(%0d,%0d) mvp=(%0d,%0d) pre=%0d -> mv=(%0d,%0d) sad=%0d pred=%0d cycles=%0d",
             bx, by, px, py, pre, int'(mv.x), int'(mv.y), min_sad, used_pred, done_cyc - t0);
  endtask

  initial begin
    for (int c = 0; c < 6; c++) nb_mv[c] = '0;
    make_plane();
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_plane();
    // interior BAB, unaligned predictor, noisy copy of a displaced block
    run_search(6, 5, 3, -5, 16*6 + 7, 16*5 - 9, 6, 1'b0, 0, 1'b1);
    // frame corner: search range leaves the frame
    run_search(0, 0, -2, 1, 4, 3, 3, 1'b0, 0, 1'b1);
    // predictor check hits: exact copy of the block the predictor points at
    run_search(10, 8, 5, 4, 16*10 + 5, 16*8 + 4, 0, 1'b1, 4, 1'b1);
    // predictor check misses, aligned search range, no neighbour MVs
    run_search(14, 9, 0, 0, 16*14 + 11, 16*9 + 2, 10, 1'b1, 1, 1'b0);
    // bottom-right corner
    run_search(21, 17, 7, 9, 16*21 - 6, 16*17 + 5, 2, 1'b0, 0, 1'b1);

    check(n_stall > 0,     "SR fill stall never happened");
    check(n_zero_word > 0, "out-of-frame word never fetched");
    check(n_unaligned > 0 && n_aligned > 0, "aligned/unaligned search ranges");
    check(n_pre_hit > 0 && n_pre_miss > 0, "predictor hit and miss");
    check(n_mvp_zero > 0 && n_mvp_cand > 0, "predictor default and candidate");
    $display("mechanisms: stall=%0d zero_words=%0d unaligned=%0d aligned=%0d pre_hit=%0d pre_miss=%0d mvp_zero=%0d mvp_cand=%0d",
             n_stall, n_zero_word, n_unaligned, n_aligned, n_pre_hit, n_pre_miss, n_mvp_zero, n_mvp_cand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

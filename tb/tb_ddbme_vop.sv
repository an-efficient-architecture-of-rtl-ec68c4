// tb_ddbme_vop: runs the motion estimator over every boundary BAB of one
// CIF (352x288) video object plane, the unit of the core-profile workload.
//
// The reference plane holds three elliptic objects. The current plane holds
// the same objects, each moved by its own few pixels. The
// testbench walks the 22 x 18 BABs in raster order. All-0 (transparent) and
// all-1 (opaque) blocks need no motion vector; every other (boundary) block
// is searched. As in an encoder, the predictor comes from the shape MVs
// already found for the left, upper and upper-right BABs. The predictor
// check is on, with a threshold of 16 differing pixels. Every result is
// compared with the testbench's own exhaustive search. At the end the
// testbench prints the number of boundary blocks and the cycles spent, and
// from them the clock needed for 2 objects at 30 planes per second.
module tb_ddbme_vop;
  import ddbme_pkg::*;

  localparam int W_WORDS = 22;
  localparam int H       = 288;
  localparam int W       = W_WORDS * 16;
  localparam int NBX     = W_WORDS;
  localparam int NBY     = H / 16;
  localparam int THR     = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n16 = 16;

  logic        cur_we = 0;
  logic [3:0]  cur_waddr = 0;
  row_t        cur_wdata = 0;
  logic        start = 0, pre_en = 1;
  sad_t        thr = sad_t'(THR);
  logic [5:0]  bab_y = 0, bab_x = 0;
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

  bit refp [H][W];
  bit curp [H][W];
  bit curb [16][16];
  int mvx_tab [NBY][NBX];
  int mvy_tab [NBY][NBX];
  bit mv_def  [NBY][NBX];

  function automatic bit ref_pix(int x, int y);
    if (x < 0 || y < 0 || x >= W || y >= H) return 1'b0;
    return refp[y][x];
  endfunction

  function automatic bit in_objects(int x, int y, int shift_sel);
    int cx[3] = '{110, 240, 70};
    int cy[3] = '{120, 100, 230};
    int rx[3] = '{70, 50, 40};
    int ry[3] = '{60, 75, 30};
    int mx[3] = '{3, -6, 11};
    int my[3] = '{-2, 5, 1};
    for (int o = 0; o < n16 / 5; o++) begin
      int dx = x - cx[o] - (shift_sel ? mx[o] : 0);
      int dy = y - cy[o] - (shift_sel ? my[o] : 0);
      if (dx*dx*ry[o]*ry[o] + dy*dy*rx[o]*rx[o] <= rx[o]*rx[o]*ry[o]*ry[o]) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic int cand_sad(int bx, int by, int mvx, int mvy);
    int s = 0;
    for (int r = 0; r < n16; r++)
      for (int b = 0; b < n16; b++)
        s += int'(curb[r][b] ^ ref_pix(16*bx + mvx + b, 16*by + mvy + r));
    return s;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int n_boundary = 0, n_opaque = 0, n_transp = 0, n_hit = 0, busy_cycles = 0;
    int ones, best, bi, bj, s, px, py, exp_x, exp_y, t0, longest = 0;
    bit exp_pre;
    for (int c = 0; c < 6; c++) nb_mv[c] = '0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        refp[y][x] = in_objects(x, y, 0);
        curp[y][x] = in_objects(x, y, 1);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int c = 0; c < W_WORDS; c++) begin
        @(negedge clk);
        fw_we = 1; fw_row = 10'(y); fw_col = 6'(c);
        for (int b = 0; b < n16; b++) fw_data[15-b] = refp[y][16*c+b];
      end
    @(negedge clk); fw_we = 0;

    for (int by = 0; by < NBY; by++)
      for (int bx = 0; bx < NBX; bx++) begin
        mv_def[by][bx] = 0;
        ones = 0;
        for (int r = 0; r < n16; r++)
          for (int b = 0; b < n16; b++) begin
            curb[r][b] = curp[16*by + r][16*bx + b];
            ones += int'(curb[r][b]);
          end
        if (ones == 0)   begin n_transp++; continue; end
        if (ones == 256) begin n_opaque++; continue; end
        n_boundary++;
        // neighbours: left, upper, upper-right shape MVs
        nb_valid = '0;
        if (bx > 0 && mv_def[by][bx-1]) begin
          nb_valid[0] = 1; nb_mv[0] = '{x: MV_W'(mvx_tab[by][bx-1]), y: MV_W'(mvy_tab[by][bx-1])};
        end
        if (by > 0 && mv_def[by-1][bx]) begin
          nb_valid[1] = 1; nb_mv[1] = '{x: MV_W'(mvx_tab[by-1][bx]), y: MV_W'(mvy_tab[by-1][bx])};
        end
        if (by > 0 && bx < NBX-1 && mv_def[by-1][bx+1]) begin
          nb_valid[2] = 1; nb_mv[2] = '{x: MV_W'(mvx_tab[by-1][bx+1]), y: MV_W'(mvy_tab[by-1][bx+1])};
        end
        px = 0; py = 0;
        for (int c = 2; c >= 0; c--)
          if (nb_valid[c]) begin px = int'(nb_mv[c].x); py = int'(nb_mv[c].y); end
        for (int r = 0; r < n16; r++) begin
          @(negedge clk);
          cur_we = 1; cur_waddr = 4'(r);
          for (int b = 0; b < n16; b++) cur_wdata[15-b] = curb[r][b];
        end
        @(negedge clk);
        cur_we = 0;
        bab_x = 6'(bx); bab_y = 6'(by); start = 1;
        t0 = cyc;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        busy_cycles += cyc - t0;
        if (cyc - t0 > longest) longest = cyc - t0;

        exp_pre = cand_sad(bx, by, px, py) < THR;
        if (exp_pre) begin
          best = cand_sad(bx, by, px, py); exp_x = px; exp_y = py; n_hit++;
        end else begin
          best = 1 << 30; bi = 0; bj = 0;
          for (int st = 0; st < 2; st++)
            for (int j = 0; j < 2*n16; j++)
              for (int k = 0; k < n16; k++) begin
                s = cand_sad(bx, by, px + 16*st + k - 16, py + j - 16);
                if (s < best) begin best = s; bi = 16*st + k; bj = j; end
              end
          exp_x = px + bi - 16; exp_y = py + bj - 16;
        end
        checks++;
        if (int'(mv.x) != exp_x || int'(mv.y) != exp_y || int'(min_sad) != best ||
            used_pred != exp_pre) begin
          failures++;
          $display("FAIL bab (%0d,%0d): mv (%0d,%0d) sad %0d pred %0d, expected (%0d,%0d) %0d %0d",
                   bx, by, int'(mv.x), int'(mv.y), min_sad, used_pred, exp_x, exp_y, best, exp_pre);
        end
        mv_def[by][bx] = 1; mvx_tab[by][bx] = int'(mv.x); mvy_tab[by][bx] = int'(mv.y);
      end

    checks++;
    if (n_boundary == 0 || n_hit == 0 || n_hit == n_boundary) begin
      failures++;
      $display("FAIL workload did not exercise both predictor outcomes");
    end
    checks++;
    if (longest > 1179) begin
      failures++;
      $display("FAIL longest search %0d cycles", longest);
    end
    $display("VOP: %0d boundary, %0d opaque, %0d transparent BABs; %0d accepted the predictor",
             n_boundary, n_opaque, n_transp, n_hit);
    $display("VOP: %0d cycles of motion estimation, longest search %0d cycles", busy_cycles, longest);
    $display("2 objects x 30 planes/s of this kind need %0d kHz", (busy_cycles * 60) / 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

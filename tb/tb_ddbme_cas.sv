// tb_ddbme_cas: plays the PE array's side. For a full search it delivers 64
// sets of 16 random SADs, one set every 16 cycles (a few with extra gaps),
// tagged strip 0 j = 0..31 then strip 1 j = 0..31, and checks the motion
// vector, minimum SAD and that done comes exactly 17 cycles after the last
// set. Ties are planted to check that the first candidate in processing
// order wins. It also checks the predictor check: a hit ends with mv = mvp
// on the next cycle, a miss lets the search go on.
module tb_ddbme_cas;
  import ddbme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic    start = 0, sad_valid = 0;
  mv_t     mvp = '0;
  sad_t    thr = 0;
  postag_t tag = '0;
  sad_t    sads [NPE];
  logic    pre_done, pre_hit, done, used_pred;
  mv_t     mv;
  sad_t    min_sad;
  int checks = 0, failures = 0;
  int n16 = 16;

  ddbme_cas dut (.clk, .rst_n, .start, .mvp, .thr, .sad_valid, .tag, .sads,
                 .pre_done, .pre_hit, .done, .mv, .min_sad, .used_pred);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic search(int px, int py, bit pre, int pre_sad, int thr_v, int floor_v);
    int best, bi, bj, wait_n;
    @(negedge clk);
    mvp = '{x: MV_W'(px), y: MV_W'(py)}; thr = sad_t'(thr_v); start = 1;
    @(negedge clk);
    start = 0;
    if (pre) begin
      for (int k = 0; k < n16; k++) sads[k] = sad_t'(300);
      sads[0] = sad_t'(pre_sad);
      tag = '{pre: 1'b1, strip: 1'b1, j: 5'd16, last: 1'b0};
      sad_valid = 1;
      @(negedge clk);
      sad_valid = 0;
      chk(pre_done, "pre_done");
      chk(pre_hit == (pre_sad < thr_v), "pre_hit");
      if (pre_sad < thr_v) begin
        chk(done && used_pred && mv.x == MV_W'(px) && mv.y == MV_W'(py) &&
            int'(min_sad) == pre_sad, "predictor result");
        return;
      end
      chk(!done, "no done on miss");
      repeat (5) @(negedge clk);
    end
    best = 1 << 30; bi = 0; bj = 0;
    for (int st = 0; st < 2; st++)
      for (int j = 0; j < 2*n16; j++) begin
        for (int k = 0; k < n16; k++) begin
          sads[k] = sad_t'(floor_v + ($urandom % 200));
          if (st == 1 && j == 7 && k == 3) sads[k] = sad_t'(floor_v);   // tie, later
          if (st == 0 && j == 20 && k == 9) sads[k] = sad_t'(floor_v);  // tie, first
          if (int'(sads[k]) < best) begin best = sads[k]; bi = 16*st + k; bj = j; end
        end
        tag = '{pre: 1'b0, strip: st[0], j: 5'(j), last: (st == 1 && j == 31)};
        sad_valid = 1;
        @(negedge clk);
        sad_valid = 0;
        wait_n = (j % 9 == 0) ? 20 : 15;
        for (int w = 0; w < wait_n; w++) begin
          @(negedge clk);
          if (!(st == 1 && j == 31)) chk(!done, "done too early");
          else if (w < 15) chk(!done, "done too early (tail)");
          else if (w == 15) chk(done, "done 17 cycles after the last set");
        end
      end
    chk(int'(min_sad) == best, $sformatf("min sad %0d expected %0d", min_sad, best));
    chk(mv.x == MV_W'(px + bi - 16) && mv.y == MV_W'(py + bj - 16),
        $sformatf("mv (%0d,%0d) expected (%0d,%0d)", int'(mv.x), int'(mv.y), px + bi - 16, py + bj - 16));
    chk(!used_pred, "used_pred after search");
  endtask

  initial begin
    for (int k = 0; k < 16; k++) sads[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    search(3, -4, 1'b0, 0, 0, 10);
    search(-7, 12, 1'b1, 5, 6, 0);     // predictor hit
    search(2, 2, 1'b1, 9, 6, 1);       // predictor miss, then full search
    search(0, 0, 1'b0, 0, 0, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

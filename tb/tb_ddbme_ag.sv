// tb_ddbme_ag: checks the address generator on its own. A one-cycle delay
// stands in for the shift-and-pack unit (a row is written one cycle after its
// third word). For a search with the predictor check and one without, the
// testbench builds its own list of the frame words that must be read (rows
// and word columns of each phase, words outside the frame skipped) and of the
// SR slot / current row pairs the PE array must see, and compares them in
// order with what the generator produces. It also checks the PE control
// (first/last/tag), that no stall occurs inside a strip, the PE cycle count
// (32 x 16 per strip), and that finish stops all activity at once.
module tb_ddbme_ag;
  import ddbme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, pre_en = 0, finish = 0;
  logic [5:0]  bab_y = 0;
  logic [5:0]  bab_x = 0;
  mv_t         mvp = '0;
  logic        fm_re;
  logic [9:0]  fm_row;
  logic [5:0]  fm_col;
  logic        sap_clear, sap_in_valid, sap_in_zero, sap_in_last, sap_out_valid;
  logic [3:0]  sap_offset, sr_wr_addr, sr_rd_addr, cur_rd_addr;
  logic        pe_valid, pe_first, pe_last, busy, stall;
  postag_t     pe_tag;
  int checks = 0, failures = 0;
  int n16 = 16;

  ddbme_ag dut (.clk, .rst_n, .start, .pre_en, .bab_y, .bab_x, .mvp,
                .frame_h(10'd288), .frame_w_words(6'd22), .finish,
                .fm_re, .fm_row, .fm_col, .sap_clear, .sap_in_valid,
                .sap_in_zero, .sap_in_last, .sap_offset, .sap_out_valid,
                .sr_wr_addr, .sr_rd_addr, .cur_rd_addr, .pe_valid, .pe_first,
                .pe_last, .pe_tag, .busy, .stall);

  always_ff @(posedge clk) sap_out_valid <= sap_in_valid && sap_in_last && !sap_clear;

  // expected sequences
  int exp_fm [$];       // row * 64 + col
  int exp_rd [$];       // slot * 16 + cur row, with tag and flags packed above
  int got_fm [$];
  int got_rd [$];
  logic [3:0] sr_rd_q, cur_rd_q;
  int pe_count, stall_in_strip, cyc, strip_first [2], strip_last [2];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    sr_rd_q  <= sr_rd_addr;
    cur_rd_q <= cur_rd_addr;
    if (fm_re) got_fm.push_back(int'(fm_row) * 64 + int'(fm_col));
    if (pe_valid) begin
      got_rd.push_back((int'(pe_tag) << 10) | (int'(pe_first) << 9) | (int'(pe_last) << 8) |
                       (int'(sr_rd_q) << 4) | int'(cur_rd_q));
      pe_count++;
      if (!pe_tag.pre) begin
        if (pe_first && pe_tag.j == 0) strip_first[pe_tag.strip] = cyc;
        strip_last[pe_tag.strip] = cyc;
      end
    end
    if (stall && dut.c_j != 0) stall_in_strip++;
  end

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

  task automatic build_expected(int bx, int by, int px, int py, bit pre);
    int x0, y0, g, base;
    postag_t tg;
    exp_fm.delete(); exp_rd.delete();
    x0 = 16*bx + px - 16; y0 = 16*by + py - 16;
    // frame reads: phase 0 rows 16..31 at column x0+16; strips at x0, x0+16
    for (int ph = (pre ? 0 : 1); ph < 3; ph++) begin
      int r0 = (ph == 0) ? 16 : 0;
      int nr = (ph == 0) ? 16 : 47;
      int xs = x0 + ((ph == 1) ? 0 : 16);
      int w0 = (xs >= 0) ? xs / 16 : -((15 - xs) / 16);
      for (int r = r0; r < r0 + nr; r++)
        for (int m = 0; m < 3; m++) begin
          int y = y0 + r, w = w0 + m;
          if (y >= 0 && y < 288 && w >= 0 && w < 22) exp_fm.push_back(y * 64 + w);
        end
    end
    // PE reads, rows numbered in one stream
    g = 0;
    for (int ph = (pre ? 0 : 1); ph < 3; ph++) begin
      int npos = (ph == 0) ? 1 : 32;
      base = g;
      for (int j = 0; j < npos; j++)
        for (int t = 0; t < n16; t++) begin
          tg = '{pre: (ph == 0), strip: (ph == 2), j: 5'(j), last: (ph == 2 && j == 31)};
          exp_rd.push_back((int'(tg) << 10) | (int'(t == 0) << 9) | (int'(t == 15) << 8) |
                           (((base + j + t) % 16) << 4) | t);
        end
      g = base + ((ph == 0) ? 16 : 47);
    end
  endtask

  task automatic run(int bx, int by, int px, int py, bit pre, int stop_after_pe);
    got_fm.delete(); got_rd.delete();
    pe_count = 0; stall_in_strip = 0;
    build_expected(bx, by, px, py, pre);
    @(negedge clk);
    bab_x = 6'(bx); bab_y = 6'(by); mvp = '{x: MV_W'(px), y: MV_W'(py)}; pre_en = pre;
    start = 1;
    @(negedge clk);
    start = 0;
    while (pe_count < stop_after_pe) @(negedge clk);
    if (stop_after_pe < 1024) repeat (2) @(negedge clk);
    else                       repeat (18) @(negedge clk);
    finish = 1;
    @(negedge clk);
    finish = 0;
    chk(!busy, "busy after finish");
    repeat (20) @(negedge clk);
    chk(!pe_valid && !fm_re, "idle after finish");
    if (stop_after_pe >= 1024) begin
      chk(got_fm.size() == exp_fm.size(), $sformatf("frame reads %0d expected %0d", got_fm.size(), exp_fm.size()));
      for (int i = 0; i < got_fm.size() && i < exp_fm.size(); i++)
        if (got_fm[i] != exp_fm[i]) begin
          chk(0, $sformatf("frame read %0d: %0d expected %0d", i, got_fm[i], exp_fm[i]));
          break;
        end
      checks++;
      chk(got_rd.size() == exp_rd.size(), $sformatf("PE reads %0d expected %0d", got_rd.size(), exp_rd.size()));
      for (int i = 0; i < got_rd.size() && i < exp_rd.size(); i++)
        if (got_rd[i] != exp_rd[i]) begin
          chk(0, $sformatf("PE read %0d: %h expected %h", i, got_rd[i], exp_rd[i]));
          break;
        end
      checks++;
      chk(strip_last[0] - strip_first[0] == 511 && strip_last[1] - strip_first[1] == 511,
          "each strip runs in 32 x 16 cycles");
      chk(stall_in_strip == 0, "no stall inside a strip");
    end else begin
      // stopped after the predictor check: no strip position was started
      chk(pe_count == 16, $sformatf("PE cycles before stop %0d", pe_count));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(6, 5, 3, -5, 1'b0, 1024);
    run(0, 0, -9, 2, 1'b1, 1040);
    run(21, 17, 14, 7, 1'b0, 1024);
    run(8, 8, 1, 1, 1'b1, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

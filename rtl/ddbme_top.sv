// ddbme_top: data-dispatch based binary motion estimator (DDBME) for MPEG-4
// binary shape coding.
//
// For one 16x16 binary alpha block (BAB) it finds the motion vector of the
// best matching block in the reference alpha plane, searching [-16,15] in x
// and y around the shape motion vector predictor (MVPs), with the sum of
// absolute differences (here: the number of differing pixels) as the cost.
//
// Blocks: mvp_select picks the predictor from six neighbour MVs; the address
// generator (ag) reads the reference plane from an external frame memory;
// shift-and-pack (sap) aligns each search-range row to 32 pixels; the 16x32
// SR buffer holds 16 rows; the PE array compares 16 horizontally adjacent
// candidates with the current BAB (held in a 16x16 RAM) in 16 cycles; compare
// and select (cas) keeps the best candidate. The block structure, the data
// dispatch and the processing flow follow the published DDBME; the buffer
// management, handshakes and port formats are this design's own.
//
// Use: write the 16 rows of the current BAB through cur_we/cur_waddr/
// cur_wdata, then pulse start for one cycle with bab_x/bab_y (BAB position in
// 16-pixel units), the neighbour MVs and pre_en/thr held stable during that
// cycle. With pre_en set, the candidate the predictor points at is checked
// first; if its SAD is below thr the predictor is the result. Otherwise all
// 1024 candidates are searched. pre_hit is the same as used_pred and is left
// unused here. done pulses with mv, min_sad and used_pred
// valid from then until the next start.
//
// Timing: the PE array works 16 cycles per candidate position, 512 cycles per
// strip of 16 x 32 candidates without a stall, 1024 cycles per search, and
// reads 4 bytes from the SR buffer in each of them. Each strip is preceded by
// filling the SR buffer with its first 16 rows, and done follows the last PE
// cycle by 18 cycles: a full search takes 1128 cycles from start to done,
// 1179 after a failed predictor check, 69 when the predictor is accepted.
//
// Frame memory: a 16-bit word per (fm_row, fm_col), leftmost pixel in bit 15,
// returned on fm_rdata the cycle after fm_re. Pixels outside frame_h rows by
// frame_w_words words are taken as 0 (transparent).
module ddbme_top
  import ddbme_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // current BAB load port
  input  logic               cur_we,
  input  logic [3:0]         cur_waddr,
  input  row_t               cur_wdata,
  // search request
  input  logic               start,
  input  logic               pre_en,
  input  sad_t               thr,
  input  logic [ROW_W-5:0]   bab_y,
  input  logic [COL_W-1:0]   bab_x,
  input  mv_t                nb_mv [6],      // MVs1, MVs2, MVs3, MV1, MV2, MV3
  input  logic [5:0]         nb_valid,
  input  logic [ROW_W-1:0]   frame_h,
  input  logic [COL_W-1:0]   frame_w_words,
  // frame memory read port
  output logic               fm_re,
  output logic [ROW_W-1:0]   fm_row,
  output logic [COL_W-1:0]   fm_col,
  input  row_t               fm_rdata,
  // result
  output logic               busy,
  output logic               done,
  output mv_t                mv,
  output sad_t               min_sad,
  output logic               used_pred,
  output logic               pre_checked,    // pulse: predictor check made
  output mv_t                mvp_out,        // predictor in use
  output logic               mvp_defined,    // a neighbour MV was available
  output logic               stall           // PE array waits for SR rows
);

  mv_t        mvp;

  logic       sap_clear, sap_in_valid, sap_in_zero, sap_in_last, sap_out_valid;
  logic [3:0] sap_offset;
  srword_t    sap_out_word;

  logic [3:0] sr_wr_addr, sr_rd_addr, cur_rd_addr;
  srword_t    sr_rd_data;
  row_t       cur_rd_data;

  logic       pe_valid, pe_first, pe_last;
  postag_t    pe_tag, sad_tag;
  logic       sad_valid;
  sad_t       sads [NPE];

  logic       pre_hit;

  assign mvp_out = mvp;

  ddbme_mvp_select u_mvp (
    .cand       (nb_mv),
    .cand_valid (nb_valid),
    .mvp        (mvp),
    .from_cand  (mvp_defined)
  );

  ddbme_ag u_ag (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .pre_en        (pre_en),
    .bab_y         (bab_y),
    .bab_x         (bab_x),
    .mvp           (mvp),
    .frame_h       (frame_h),
    .frame_w_words (frame_w_words),
    .finish        (done),
    .fm_re         (fm_re),
    .fm_row        (fm_row),
    .fm_col        (fm_col),
    .sap_clear     (sap_clear),
    .sap_in_valid  (sap_in_valid),
    .sap_in_zero   (sap_in_zero),
    .sap_in_last   (sap_in_last),
    .sap_offset    (sap_offset),
    .sap_out_valid (sap_out_valid),
    .sr_wr_addr    (sr_wr_addr),
    .sr_rd_addr    (sr_rd_addr),
    .cur_rd_addr   (cur_rd_addr),
    .pe_valid      (pe_valid),
    .pe_first      (pe_first),
    .pe_last       (pe_last),
    .pe_tag        (pe_tag),
    .busy          (busy),
    .stall         (stall)
  );

  ddbme_sap u_sap (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (sap_clear),
    .in_valid  (sap_in_valid),
    .in_zero   (sap_in_zero),
    .in_last   (sap_in_last),
    .in_word   (fm_rdata),
    .offset    (sap_offset),
    .out_valid (sap_out_valid),
    .out_word  (sap_out_word)
  );

  ddbme_sr_buffer #(.DEPTH(BLK), .WIDTH(SRW)) u_sr (
    .clk     (clk),
    .wr_en   (sap_out_valid),
    .wr_addr (sr_wr_addr),
    .wr_data (sap_out_word),
    .rd_addr (sr_rd_addr),
    .rd_data (sr_rd_data)
  );

  ddbme_cur_ram u_cur (
    .clk     (clk),
    .wr_en   (cur_we),
    .wr_addr (cur_waddr),
    .wr_data (cur_wdata),
    .rd_addr (cur_rd_addr),
    .rd_data (cur_rd_data)
  );

  ddbme_pe_array u_pea (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (pe_valid),
    .in_first  (pe_first),
    .in_last   (pe_last),
    .in_tag    (pe_tag),
    .sr_word   (sr_rd_data),
    .cur_row   (cur_rd_data),
    .sad_valid (sad_valid),
    .tag_out   (sad_tag),
    .sads      (sads)
  );

  ddbme_cas u_cas (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .mvp       (mvp),
    .thr       (thr),
    .sad_valid (sad_valid),
    .tag       (sad_tag),
    .sads      (sads),
    .pre_done  (pre_checked),
    .pre_hit   (pre_hit),
    .done      (done),
    .mv        (mv),
    .min_sad   (min_sad),
    .used_pred (used_pred)
  );

endmodule

// ddbme_ag: address generation and sequencing for the DDBME.
//
// The search for one BAB runs in up to three phases of candidate positions:
//   phase 0 (optional, pre_en): the single position whose PE0 candidate is the
//           one the predictor points at (search-range rows 16..31, columns
//           16..47); only its PE0 SAD is used, for the predictor check.
//   phase 1: candidates i = 0..15 (search-range columns 0..31), j = 0..31.
//   phase 2: candidates i = 16..31 (columns 16..47), j = 0..31.
// Phases 1 and 2 are the two strips of the published processing flow; in each
// strip the 16 PEs move down the search range one row per position.
//
// Two engines run side by side.
// Fetch: for each search-range row of each phase, in order, it reads three
//   16-bit frame words (the row starts at pixel column x0 + 16*strip with
//   x0 = 16*bab_x + mvp.x - 16, row y = 16*bab_y + mvp.y - 16 + r) and hands
//   them to the shift-and-pack unit with the pixel offset x0 mod 16. Words
//   outside the frame are not read and count as zero. A row is fetched only
//   when the SR buffer has a free slot: at most 16 rows are held.
// Compute: a position j starts only when its 16 rows (j..j+15) are all in the
//   SR buffer; otherwise the array stalls (stall high). Then for 16 cycles it
//   reads SR row j+t and current-BAB row t, t = 0..15. A row is given back to
//   the fetch engine after its last use: row j at the first cycle of position
//   j, and every row of the last position of a phase as it is read.
// Rows are numbered in one stream over all phases; row g lives in SR slot
// g mod 16. The ring of slots, the credit counting and the stall rule are
// this design's own way of realising the published data flow; they add a
// 16-row fill before each strip.
//
// Timing: pe_* outputs are registered so they line up with the synchronous
// SR buffer and current-BAB RAM reads. sap_in_* are registered so they line
// up with a frame memory that returns data one cycle after fm_re. The
// search ends on finish (from CAS); busy is high from start until then.
module ddbme_ag
  import ddbme_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               pre_en,
  input  logic [ROW_W-5:0]   bab_y,          // BAB row index (in 16-pixel units)
  input  logic [COL_W-1:0]   bab_x,          // BAB column index (= word column)
  input  mv_t                mvp,
  input  logic [ROW_W-1:0]   frame_h,        // frame height in rows
  input  logic [COL_W-1:0]   frame_w_words,  // frame width in 16-pixel words
  input  logic               finish,         // search over (CAS done)
  // frame memory read port
  output logic               fm_re,
  output logic [ROW_W-1:0]   fm_row,
  output logic [COL_W-1:0]   fm_col,
  // shift and pack control
  output logic               sap_clear,
  output logic               sap_in_valid,
  output logic               sap_in_zero,
  output logic               sap_in_last,
  output logic [3:0]         sap_offset,
  input  logic               sap_out_valid,
  // SR buffer and current RAM
  output logic [3:0]         sr_wr_addr,
  output logic [3:0]         sr_rd_addr,
  output logic [3:0]         cur_rd_addr,
  // PE array control
  output logic               pe_valid,
  output logic               pe_first,
  output logic               pe_last,
  output postag_t            pe_tag,
  // status
  output logic               busy,
  output logic               stall
);

  localparam int unsigned SR_ROWS = NPOS + BLK - 1;   // 47 rows per strip
  localparam int unsigned GW      = 7;                // global row counter width

  // ---------------- search geometry ----------------
  logic signed [COORD_W-1:0] x0_q, y0_q;
  logic                      pre_q;

  // ---------------- fetch engine ----------------
  logic [1:0]    f_phase;
  logic [5:0]    f_row;
  logic [1:0]    f_m;
  logic          f_active;
  logic [GW-1:0] issued, released, written;

  // ---------------- compute engine ----------------
  logic [1:0]    c_phase;
  logic [4:0]    c_j;
  logic [3:0]    c_t;
  logic          c_active;
  logic          c_run;                 // inside a position (t > 0)

  logic [GW-1:0] c_base;                // first global row of this phase
  logic [GW-1:0] c_g;                   // global row being read
  logic          c_read;                // an SR row is read this cycle
  logic          c_lastpos;
  logic          c_rows_ready;

  logic signed [COORD_W-1:0] f_y, f_xs, f_w;
  logic                      f_zero, f_issue, f_slot_free;

  // ---- fetch address arithmetic ----
  always_comb begin
    f_y  = y0_q + COORD_W'(f_row) + COORD_W'(f_phase == 2'd0 ? BLK : 0);
    f_xs = x0_q + COORD_W'(f_phase == 2'd1 ? 0 : 16);
    f_w  = (f_xs >>> 4) + signed'(COORD_W'(f_m));
    f_zero = (f_y < 0) || (f_y >= $signed({2'b00, frame_h})) ||
             (f_w < 0) || (f_w >= $signed({{(COORD_W-COL_W){1'b0}}, frame_w_words}));
    f_slot_free = (issued - released) < GW'(BLK);
    f_issue = f_active && (f_m != 2'd0 || f_slot_free);
  end

  assign fm_re  = f_issue && !f_zero;
  assign fm_row = f_y[ROW_W-1:0];
  assign fm_col = f_w[COL_W-1:0];
  assign sap_offset = x0_q[3:0];
  assign sr_wr_addr = written[3:0];

  // ---- compute sequencing ----
  always_comb begin
    case (c_phase)
      2'd0:    c_base = '0;
      2'd1:    c_base = pre_q ? GW'(BLK) : '0;
      default: c_base = (pre_q ? GW'(BLK) : '0) + GW'(SR_ROWS);
    endcase
    c_lastpos    = (c_phase == 2'd0) || (c_j == 5'(NPOS-1));
    c_g          = c_base + GW'(c_j) + GW'(c_t);
    c_rows_ready = written >= c_base + GW'(c_j) + GW'(BLK);
    c_read       = c_active && (c_run || c_rows_ready);
    stall        = c_active && !c_run && !c_rows_ready;
  end

  assign sr_rd_addr  = c_g[3:0];
  assign cur_rd_addr = c_t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      pre_q        <= 1'b0;
      x0_q         <= '0;
      y0_q         <= '0;
      f_phase      <= '0;
      f_row        <= '0;
      f_m          <= '0;
      f_active     <= 1'b0;
      issued       <= '0;
      released     <= '0;
      written      <= '0;
      c_phase      <= '0;
      c_j          <= '0;
      c_t          <= '0;
      c_active     <= 1'b0;
      c_run        <= 1'b0;
      sap_clear    <= 1'b0;
      sap_in_valid <= 1'b0;
      sap_in_zero  <= 1'b0;
      sap_in_last  <= 1'b0;
      pe_valid     <= 1'b0;
      pe_first     <= 1'b0;
      pe_last      <= 1'b0;
      pe_tag       <= '0;
    end else begin
      sap_clear    <= 1'b0;
      sap_in_valid <= 1'b0;
      sap_in_zero  <= 1'b0;
      sap_in_last  <= 1'b0;
      pe_valid     <= 1'b0;
      pe_first     <= 1'b0;
      pe_last      <= 1'b0;
      if (start) begin
        busy      <= 1'b1;
        pre_q     <= pre_en;
        x0_q      <= COORD_W'({bab_x, 4'b0000}) + COORD_W'(mvp.x) - COORD_W'(BLK);
        y0_q      <= COORD_W'({bab_y, 4'b0000}) + COORD_W'(mvp.y) - COORD_W'(BLK);
        f_phase   <= pre_en ? 2'd0 : 2'd1;
        f_row     <= '0;
        f_m       <= '0;
        f_active  <= 1'b1;
        issued    <= '0;
        released  <= '0;
        written   <= '0;
        c_phase   <= pre_en ? 2'd0 : 2'd1;
        c_j       <= '0;
        c_t       <= '0;
        c_active  <= 1'b1;
        c_run     <= 1'b0;
        sap_clear <= 1'b1;
      end else if (finish) begin
        busy      <= 1'b0;
        f_active  <= 1'b0;
        c_active  <= 1'b0;
        c_run     <= 1'b0;
        sap_clear <= 1'b1;
      end else begin
        // ---------------- fetch ----------------
        if (f_issue) begin
          sap_in_valid <= 1'b1;
          sap_in_zero  <= f_zero;
          sap_in_last  <= (f_m == 2'd2);
          if (f_m == 2'd0) issued <= issued + 1'b1;
          if (f_m == 2'd2) begin
            f_m <= '0;
            if ((f_phase == 2'd0 && f_row == 6'(BLK-1)) ||
                (f_phase != 2'd0 && f_row == 6'(SR_ROWS-1))) begin
              f_row <= '0;
              if (f_phase == 2'd2) f_active <= 1'b0;
              else                 f_phase  <= f_phase + 2'd1;
            end else begin
              f_row <= f_row + 6'd1;
            end
          end else begin
            f_m <= f_m + 2'd1;
          end
        end
        if (sap_out_valid) written <= written + 1'b1;

        // ---------------- compute ----------------
        if (c_read) begin
          pe_valid <= 1'b1;
          pe_first <= (c_t == 4'd0);
          pe_last  <= (c_t == 4'(BLK-1));
          pe_tag   <= '{pre:   (c_phase == 2'd0),
                        strip: (c_phase == 2'd2),
                        j:     c_j,
                        last:  (c_phase == 2'd2) && (c_j == 5'(NPOS-1))};
          if (c_lastpos || c_t == 4'd0) released <= released + 1'b1;
          c_t   <= c_t + 4'd1;
          c_run <= (c_t != 4'(BLK-1));
          if (c_t == 4'(BLK-1)) begin
            if (c_lastpos) begin
              c_j <= '0;
              if (c_phase == 2'd2) c_active <= 1'b0;
              else                 c_phase  <= c_phase + 2'd1;
            end else begin
              c_j <= c_j + 5'd1;
            end
          end
        end
      end
    end
  end

  // The fetch engine never holds more than 16 rows.
  a_credit: assert property (@(posedge clk) disable iff (!rst_n)
    (issued - released) <= GW'(BLK));
  // A row is never read before it has been written.
  a_row_present: assert property (@(posedge clk) disable iff (!rst_n)
    c_read |-> (c_g < written));

endmodule

// ddbme_cas: compare and select.
//
// Every time the PE array finishes a vertical candidate position it delivers
// 16 SADs at once (sad_valid). CAS copies them into its 16 SAD buffers and
// then feeds them one per cycle, PE0 first, to a single comparator that keeps
// the smallest SAD seen so far and the candidate (i, j) it came from. The
// 16 comparisons overlap the PE array's work on the next position, as in the
// published design. A candidate replaces the best one only when its SAD is
// strictly smaller, so on a tie the candidate met first in the processing
// order (strip 0 before strip 1, j upwards, PE0 upwards) wins; the document
// does not fix a tie rule, this one is this design's choice.
//
// Predictor check: a set of SADs tagged 'pre' carries, in PE0, the SAD of the
// candidate the predictor points at. If it is below thr, the search ends at
// once with mv = mvp (pre_hit). pre_done pulses whenever that check is made.
//
// Output: mv = mvp + (i - 16, j - 16) of the best candidate and its SAD. done
// pulses for one cycle when they are final: the cycle after the check for a
// predictor hit, otherwise the cycle after the 16th comparison of the last
// position. start (with mvp) clears the running minimum and latches mvp.
module ddbme_cas
  import ddbme_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  mv_t     mvp,
  input  sad_t    thr,
  input  logic    sad_valid,
  input  postag_t tag,
  input  sad_t    sads [NPE],
  output logic    pre_done,
  output logic    pre_hit,
  output logic    done,
  output mv_t     mv,
  output sad_t    min_sad,
  output logic    used_pred
);

  sad_t       sbuf [NPE];
  postag_t    btag;
  logic [3:0] idx;
  logic       busy;
  logic [4:0] best_i;      // 0..31 horizontal candidate index
  logic [4:0] best_j;      // 0..31 vertical candidate index
  mv_t        mvp_q;
  sad_t       cand;

  assign cand = sbuf[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NPE; k++) sbuf[k] <= '0;
      btag      <= '0;
      idx       <= '0;
      busy      <= 1'b0;
      best_i    <= '0;
      best_j    <= '0;
      min_sad   <= '1;
      mvp_q     <= '0;
      pre_done  <= 1'b0;
      pre_hit   <= 1'b0;
      done      <= 1'b0;
      used_pred <= 1'b0;
    end else begin
      pre_done <= 1'b0;
      done     <= 1'b0;
      if (start) begin
        min_sad   <= '1;
        best_i    <= '0;
        best_j    <= '0;
        mvp_q     <= mvp;
        busy      <= 1'b0;
        idx       <= '0;
        pre_hit   <= 1'b0;
        used_pred <= 1'b0;
      end else begin
        // one comparison per cycle from the SAD buffers
        if (busy) begin
          if (cand < min_sad) begin
            min_sad <= cand;
            best_i  <= {btag.strip, idx};
            best_j  <= btag.j;
          end
          idx <= idx + 4'd1;
          if (idx == 4'(NPE-1)) begin
            busy <= 1'b0;
            done <= btag.last;
          end
        end
        if (sad_valid && tag.pre) begin
          pre_done <= 1'b1;
          pre_hit  <= sads[0] < thr;
          if (sads[0] < thr) begin
            min_sad   <= sads[0];
            best_i    <= 5'(NPE);
            best_j    <= 5'(NPE);
            used_pred <= 1'b1;
            done      <= 1'b1;
          end
        end else if (sad_valid) begin
          for (int k = 0; k < NPE; k++) sbuf[k] <= sads[k];
          btag <= tag;
          idx  <= '0;
          busy <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    mv.x = mvp_q.x + MV_W'(signed'({1'b0, best_i})) - MV_W'(NPE);
    mv.y = mvp_q.y + MV_W'(signed'({1'b0, best_j})) - MV_W'(NPE);
  end

  // A new set of SADs may only arrive when the comparator is idle or on its
  // last buffer entry.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (sad_valid && !tag.pre && busy) |-> (idx == 4'(NPE-1)));

endmodule

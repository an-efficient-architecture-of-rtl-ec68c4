// ddbme_pe_array: sixteen PEs with the hardwired data dispatch of DDBME.
//
// One 32-bit search-range word SR[31:0] (leftmost pixel in bit 31) is read per
// cycle. PE k receives the 16 bits SR[31-k:16-k], i.e. the row of the
// candidate that lies k pixels to the right of PE0's candidate, so every bit
// that is read is used and no shifting is needed. All PEs see the same row of
// the current BAB. After 16 rows all 16 PEs hold the SADs of 16 horizontally
// adjacent candidates.
//
// Timing: inputs are taken on the clock edge when in_valid is high. sad_valid
// rises for one cycle, the cycle after the in_last row, with sads[k] the SAD
// of PE k and tag_out a copy of the tag given with the in_last row.
module ddbme_pe_array
  import ddbme_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_first,
  input  logic    in_last,
  input  postag_t in_tag,
  input  srword_t sr_word,
  input  row_t    cur_row,
  output logic    sad_valid,
  output postag_t tag_out,
  output sad_t    sads [NPE]
);

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    ddbme_pe u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .in_first (in_first),
      .ref_row  (sr_word[SRW-1-k -: BLK]),
      .cur_row  (cur_row),
      .sad      (sads[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad_valid <= 1'b0;
      tag_out   <= '0;
    end else begin
      sad_valid <= in_valid && in_last;
      if (in_valid && in_last) tag_out <= in_tag;
    end
  end

endmodule

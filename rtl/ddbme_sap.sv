// ddbme_sap: shift and pack unit between frame memory and the SR buffer.
//
// When the search range does not start on a 16-pixel boundary, one 32-pixel
// search-range row touches three 16-bit frame memory words. The SAP collects
// the three words of a row as they arrive (in_valid, in_last on the third),
// joins them into 48 bits with the first word on the left, and one barrel
// shifter left-shifts by the pixel offset (0..15) and keeps the top 32 bits.
// A word flagged in_zero lies outside the frame and is taken as all zero
// (transparent). The three-word scheme, the zero rule and the registered
// output are this design's choices; the published unit is only described as
// a 32-bit barrel shifter that shifts and packs.
//
// Timing: out_valid/out_word are registered and appear the cycle after the
// in_last word. clear empties the word registers.
module ddbme_sap
  import ddbme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  logic        in_zero,
  input  logic        in_last,
  input  row_t        in_word,
  input  logic [3:0]  offset,
  output logic        out_valid,
  output srword_t     out_word
);

  row_t              w0, w1;
  row_t              w2;
  logic [3*BLK-1:0]  joined;
  logic [3*BLK-1:0]  shifted;

  always_comb begin
    w2      = in_zero ? '0 : in_word;
    joined  = {w0, w1, w2};
    shifted = joined << offset;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w0        <= '0;
      w1        <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else if (clear) begin
      w0        <= '0;
      w1        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        w0 <= w1;
        w1 <= w2;
      end
      if (in_valid && in_last) out_word <= shifted[3*BLK-1 -: SRW];
    end
  end

endmodule

// ddbme_pe: one processing element of the DDBME array.
//
// Each cycle with in_valid set, the PE XORs one 16-bit reference row with the
// matching 16-bit current-BAB row, counts the differing pixels with the adder
// tree and adds the count to its accumulator. in_first marks the first of the
// 16 rows of a candidate: the accumulator then restarts from that row's count.
// After 16 rows (in_last on the final one) the accumulator holds the SAD of
// one candidate BAB, one candidate every 16 cycles, as in the published PE.
//
// Timing: sad is a register; it holds the complete SAD during the cycle after
// the in_last row and is overwritten by the next candidate's first row.
module ddbme_pe
  import ddbme_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  row_t  ref_row,
  input  row_t  cur_row,
  output sad_t  sad
);

  logic [CNT_W-1:0] cnt;

  ddbme_adder_tree u_tree (
    .x   (ref_row ^ cur_row),
    .cnt (cnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad <= '0;
    end else if (in_valid) begin
      sad <= (in_first ? sad_t'(0) : sad) + sad_t'(cnt);
    end
  end

endmodule

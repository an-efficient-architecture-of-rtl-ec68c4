// ddbme_cur_ram: 16 x 16-bit RAM holding the current BAB, one packed row per
// entry (leftmost pixel in bit 15).
//
// It is loaded from outside before a search and read row 0 to row 15 over and
// over while the candidates are compared; all PEs use the same row, so no
// pipeline registers for the current block are needed. The size is the
// published one; the single write port and the one-cycle synchronous read are
// this design's choice.
//
// Timing: rd_data shows the row addressed by rd_addr on the previous edge.
module ddbme_cur_ram
  import ddbme_pkg::*;
(
  input  logic       clk,
  input  logic       wr_en,
  input  logic [3:0] wr_addr,
  input  row_t       wr_data,
  input  logic [3:0] rd_addr,
  output row_t       rd_data
);

  row_t mem [BLK];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule

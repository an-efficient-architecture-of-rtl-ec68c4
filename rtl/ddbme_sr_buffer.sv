// ddbme_sr_buffer: the 16 x 32-bit search range (SR) buffer.
//
// Holds the 16 search-range rows that the PE array needs for one vertical
// candidate position; rows are kept in slot (row number mod 16), so the
// buffer works as a circular window that slides down by one row per
// position. One write port (from the shift-and-pack unit) and one read port
// (to the PE array). The 16 x 32 size is the published one; the port
// arrangement and the one-cycle synchronous read are this design's choice.
//
// Timing: rd_data shows the entry addressed by rd_addr on the previous clock
// edge. A write and a read of the same entry in one cycle return the old data.
module ddbme_sr_buffer #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule

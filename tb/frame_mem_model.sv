// frame_mem_model: behavioural model of the external frame memory that holds
// the reference binary alpha plane, for simulation only.
//
// One 16-bit word per (row, col), leftmost pixel in bit 15, stored at
// row * W_WORDS + col. A read (re) returns the word on rdata after the next
// clock edge. The testbench fills it through the write port.
module frame_mem_model #(
  parameter int unsigned W_WORDS = 22,
  parameter int unsigned H       = 288
) (
  input  logic        clk,
  input  logic        re,
  input  logic [9:0]  row,
  input  logic [5:0]  col,
  output logic [15:0] rdata,
  input  logic        we,
  input  logic [9:0]  wrow,
  input  logic [5:0]  wcol,
  input  logic [15:0] wdata
);

  logic [15:0] mem [W_WORDS*H];

  always_ff @(posedge clk) begin
    if (we) mem[int'(wrow) * W_WORDS + int'(wcol)] <= wdata;
    if (re) begin
      if (int'(row) < H && int'(col) < W_WORDS) rdata <= mem[int'(row) * W_WORDS + int'(col)];
      else                                      rdata <= 16'hDEAD;
    end
  end

endmodule

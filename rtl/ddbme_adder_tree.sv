// ddbme_adder_tree: counts the ones of a 16-bit row difference.
//
// Structure (as the published adder tree): five 1-bit full adders each take
// three bits x[15:13], x[12:10], x[9:7], x[6:4], x[3:1]; three 2-bit adders
// add full-adder pairs (1,2), (3,4) and full adder 5 with x[0]; a 3-bit adder
// adds the first two 2-bit sums; a 4-bit adder adds that to the third 2-bit
// sum. Purely combinational.
//
// Interface: x (16 bits) in, cnt (0..16, 5 bits) out.
module ddbme_adder_tree (
  input  logic [15:0] x,
  output logic [4:0]  cnt
);

  logic [1:0] fa [5];     // full-adder outputs {carry, sum}
  logic [2:0] s2 [3];     // 2-bit adder outputs
  logic [3:0] s3;         // 3-bit adder output

  always_comb begin
    for (int f = 0; f < 5; f++) begin
      fa[f] = {1'b0, x[15-3*f]} + {1'b0, x[14-3*f]} + {1'b0, x[13-3*f]};
    end
    s2[0] = {1'b0, fa[0]} + {1'b0, fa[1]};
    s2[1] = {1'b0, fa[2]} + {1'b0, fa[3]};
    s2[2] = {1'b0, fa[4]} + {2'b00, x[0]};
    s3    = {1'b0, s2[0]} + {1'b0, s2[1]};
    cnt   = {1'b0, s3} + {2'b00, s2[2]};
  end

endmodule

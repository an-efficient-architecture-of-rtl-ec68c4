// tb_ddbme_mvp_select: applies all 64 patterns of valid flags with random
// candidate MVs and checks that the predictor is the first valid candidate in
// the order MVs1, MVs2, MVs3, MV1, MV2, MV3, or (0,0) when none is valid.
module tb_ddbme_mvp_select;
  import ddbme_pkg::*;
  mv_t        cand [6];
  logic [5:0] cand_valid;
  mv_t        mvp;
  logic       from_cand;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  ddbme_mvp_select dut (.cand, .cand_valid, .mvp, .from_cand);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mv_t exp;
    bit  found;
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 64; v++) begin
        for (int c = 0; c < 6; c++) cand[c] = mv_t'($urandom);
        cand_valid = 6'(v);
        exp = '0; found = 0;
        for (int c = 0; c < 6; c++)
          if (!found && cand_valid[c]) begin exp = cand[c]; found = 1; end
        #1;
        checks++;
        if (mvp !== exp || from_cand !== found) begin
          failures++;
          $display("FAIL valid=%b mvp=%h expected %h", cand_valid, mvp, exp);
        end
        @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

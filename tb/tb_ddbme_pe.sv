// tb_ddbme_pe: drives 40 candidates of 16 random row pairs back to back into
// one PE and checks that the SAD (differing pixels over the 16 rows) is in
// the accumulator exactly the cycle after the 16th row. Two idle cycles are
// inserted between some candidates to check that the PE holds its value.
module tb_ddbme_pe;
  import ddbme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_first = 0;
  row_t ref_row = 0, cur_row = 0;
  sad_t sad;
  int checks = 0, failures = 0;
  int n16 = 16;

  ddbme_pe dut (.clk, .rst_n, .in_valid, .in_first, .ref_row, .cur_row, .sad);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sad;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 40; c++) begin
      exp_sad = 0;
      for (int r = 0; r < n16; r++) begin
        in_valid = 1; in_first = (r == 0);
        ref_row = row_t'($urandom); cur_row = row_t'($urandom);
        if (c == 3) cur_row = ref_row;          // SAD 0
        if (c == 4) cur_row = ~ref_row;         // SAD 256
        exp_sad += $countones(ref_row ^ cur_row);
        @(negedge clk);
      end
      in_valid = 0;
      checks++;
      if (int'(sad) != exp_sad) begin
        failures++;
        $display("FAIL cand %0d sad %0d expected %0d", c, sad, exp_sad);
      end
      if (c % 5 == 0) begin
        repeat (2) @(negedge clk);
        checks++;
        if (int'(sad) != exp_sad) begin
          failures++;
          $display("FAIL hold cand %0d", c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ddbme_pe_array: feeds 20 positions of 16 random 32-bit search-range
// words and current rows. For PE k the expected SAD is the sum over the 16
// rows of the ones in SR[31-k:16-k] xor current row. Checks all 16 SADs, that
// sad_valid is high exactly the cycle after the last row and never
// otherwise, and that the tag comes through.
module tb_ddbme_pe_array;
  import ddbme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic    in_valid = 0, in_first = 0, in_last = 0;
  postag_t in_tag = '0, tag_out;
  srword_t sr_word = 0;
  row_t    cur_row = 0;
  logic    sad_valid;
  sad_t    sads [NPE];
  int checks = 0, failures = 0;
  int n16 = 16;
  int exp_sad [16];

  ddbme_pe_array dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_tag,
                      .sr_word, .cur_row, .sad_valid, .tag_out, .sads);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 20; p++) begin
      for (int k = 0; k < n16; k++) exp_sad[k] = 0;
      for (int r = 0; r < n16; r++) begin
        in_valid = 1; in_first = (r == 0); in_last = (r == 15);
        in_tag = '{pre: 1'b0, strip: p[0], j: 5'(p), last: (p == 19)};
        sr_word = srword_t'($urandom); cur_row = row_t'($urandom);
        for (int k = 0; k < n16; k++)
          exp_sad[k] += $countones(sr_word[31-k -: 16] ^ cur_row);
        @(negedge clk);
        if (r != 15) begin
          checks++;
          if (sad_valid) begin failures++; $display("FAIL early sad_valid"); end
        end
      end
      in_valid = 0; in_last = 0;
      checks++;
      if (!sad_valid) begin failures++; $display("FAIL no sad_valid pos %0d", p); end
      checks++;
      if (tag_out.j != 5'(p) || tag_out.last != (p == 19)) begin
        failures++; $display("FAIL tag pos %0d", p);
      end
      for (int k = 0; k < n16; k++) begin
        checks++;
        if (int'(sads[k]) != exp_sad[k]) begin
          failures++;
          $display("FAIL pos %0d PE%0d sad %0d expected %0d", p, k, sads[k], exp_sad[k]);
        end
      end
      if (p % 4 == 0) begin
        @(negedge clk);
        checks++;
        if (sad_valid) begin failures++; $display("FAIL sad_valid held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

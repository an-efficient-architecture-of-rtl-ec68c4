// tb_ddbme_sap: sends 200 rows of three random 16-bit words, each with a
// random pixel offset and, sometimes, words flagged as outside the frame
// (which must count as zero), with random idle cycles between words. The
// expected 32-bit row is bits 47-offset down to 16-offset of the three words
// joined left to right. Checks the row and that out_valid is high exactly
// the cycle after the third word, and that clear empties the word registers.
module tb_ddbme_sap;
  import ddbme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       clear = 0, in_valid = 0, in_zero = 0, in_last = 0;
  row_t       in_word = 0;
  logic [3:0] offset = 0;
  logic       out_valid;
  srword_t    out_word;
  int checks = 0, failures = 0;

  ddbme_sap dut (.clk, .rst_n, .clear, .in_valid, .in_zero, .in_last, .in_word,
                 .offset, .out_valid, .out_word);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] cat;
    logic [31:0] exp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      offset = 4'($urandom);
      if (r < 16) offset = 4'(r);
      for (int m = 0; m < 3; m++) begin
        in_valid = 1; in_last = (m == 2);
        in_word  = row_t'($urandom);
        in_zero  = ($urandom % 5) == 0;
        cat = {cat[31:0], in_zero ? 16'h0000 : in_word};
        @(negedge clk);
        in_valid = 0; in_last = 0;
        if (m < 2) begin
          checks++;
          if (out_valid) begin failures++; $display("FAIL early out_valid"); end
          repeat ($urandom % 2) @(negedge clk);
        end
      end
      exp = cat[47 - offset -: 32];
      checks++;
      if (!out_valid || out_word !== exp) begin
        failures++;
        $display("FAIL row %0d off %0d: %h expected %h (valid %0d)", r, offset, out_word, exp, out_valid);
      end
    end
    // clear: the first two words of a row are dropped, then zeros remain
    in_valid = 1; in_word = 16'hFFFF; in_zero = 0; in_last = 0; offset = 0;
    @(negedge clk); @(negedge clk);
    in_valid = 0; clear = 1;
    @(negedge clk); clear = 0;
    in_valid = 1; in_last = 1; in_word = 16'h1234;
    @(negedge clk); in_valid = 0; in_last = 0;
    checks++;
    if (out_word !== 32'h0000_0000) begin failures++; $display("FAIL clear %h", out_word); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

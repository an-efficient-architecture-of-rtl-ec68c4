// tb_ddbme_adder_tree: exhaustive test of the 16-bit ones counter. Every one
// of the 65536 inputs is applied and the count compared with $countones.
module tb_ddbme_adder_tree;
  logic [15:0] x;
  logic [4:0]  cnt;
  int checks = 0, failures = 0;
  int nmax = 65536;
  logic clk = 0;
  always #5 clk = ~clk;

  ddbme_adder_tree dut (.x(x), .cnt(cnt));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < nmax; v++) begin
      x = 16'(v);
      #1;
      checks++;
      if (int'(cnt) != $countones(x)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h cnt=%0d", x, cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ddbme_cur_ram: writes random rows to all 16 entries of the current-BAB
// RAM, reads each back (data one cycle after the address), then rewrites
// entries while reading them in the same cycle and checks that the read
// returns the old row and a later read the new one.
module tb_ddbme_cur_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        wr_en = 0;
  logic [3:0]  wr_addr = 0, rd_addr = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  ddbme_cur_ram dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [15:0] exp, string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, rd_data, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 4'(a); wr_data = $urandom; model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < 16; a++) begin
      rd_addr = 4'(15 - a);
      @(negedge clk);
      chk(model[15 - a], "read");
    end
    for (int a = 0; a < 16; a++) begin
      logic [15:0] old;
      old = model[a];
      wr_en = 1; wr_addr = 4'(a); wr_data = $urandom; model[a] = wr_data;
      rd_addr = 4'(a);
      @(negedge clk);
      wr_en = 0;
      chk(old, "read during write");
      @(negedge clk);
      chk(model[a], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_efuse_box: checks the e-fuse model: all fuses read 0 on a fresh part,
// programming blows the selected fuses, and blown fuses stay blown when a
// later word with zeros is programmed over them.
`timescale 1ns/1ps
module tb_efuse_box;
  logic       clk = 1'b0, prog;
  logic [2:0] prog_addr, rd_addr;
  logic [7:0] prog_data, rd_data;
  logic [7:0] expect_w [8];
  int checks = 0, failures = 0;

  efuse_box dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog = 0; prog_addr = 0; prog_data = 0; rd_addr = 0;
    for (int a = 0; a < 8; a++) begin
      rd_addr = 3'(a); #1; checks++;
      if (rd_data !== 8'h00) begin failures++; $display("FAIL fresh word %0d", a); end
      expect_w[a] = 0;
    end
    for (int n = 0; n < 24; n++) begin
      @(negedge clk);
      prog = 1; prog_addr = 3'($urandom); prog_data = 8'($urandom);
      expect_w[prog_addr] |= prog_data;
      @(negedge clk); prog = 0;
      for (int a = 0; a < 8; a++) begin
        rd_addr = 3'(a); #1; checks++;
        if (rd_data !== expect_w[a]) begin failures++; $display("FAIL word %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

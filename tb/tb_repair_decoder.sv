// tb_repair_decoder: exhaustive check of the 3-to-8 repair decoder: one-hot
// output at the address when enabled, all zeros when disabled.
`timescale 1ns/1ps
module tb_repair_decoder;
  logic [2:0] addr;
  logic       en;
  logic [7:0] decoder_out;
  int checks = 0, failures = 0;

  repair_decoder dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 8; a++) begin
        addr = 3'(a); en = e[0];
        #1;
        checks++;
        if (decoder_out !== (e[0] ? (8'd1 << a) : 8'd0)) begin
          failures++;
          $display("FAIL en=%0d addr=%0d out=%b", e, a, decoder_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bist_lfsr: checks the BIST address generator. From reset it must give
// 0,1,2,5,3,7,6,4 and repeat, visiting every address once per period with
// last high only on the eighth state; done must hold the state and start
// must return it to 0.
`timescale 1ns/1ps
module tb_bist_lfsr;
  logic       clk = 1'b0, reset, start, done, last;
  logic [2:0] lfsr_out;
  int checks = 0, failures = 0;
  localparam logic [2:0] SEQ [8] = '{3'd0, 3'd1, 3'd2, 3'd5, 3'd3, 3'd7, 3'd6, 3'd4};

  bist_lfsr dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    reset = 1; start = 0; done = 0;
    @(negedge clk); @(negedge clk); reset = 0;
    for (int k = 0; k < 16; k++) begin
      check(lfsr_out == SEQ[k % 8], $sformatf("state %0d = %0d", k, lfsr_out));
      check(last == (k % 8 == 7), $sformatf("last at %0d", k));
      @(negedge clk);
    end
    // hold
    done = 1;
    begin
      logic [2:0] held;
      held = lfsr_out;
      repeat (3) @(negedge clk);
      check(lfsr_out == held, "done holds the state");
    end
    done = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(lfsr_out == 3'd0, "start reloads 0");
    @(negedge clk);
    check(lfsr_out == 3'd1, "runs on after start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

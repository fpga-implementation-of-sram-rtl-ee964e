// tb_repair_regs: checks the repair registers: cleared by reset, loaded on
// the clock edge that samples load, held while load is low.
`timescale 1ns/1ps
module tb_repair_regs;
  logic       clk = 1'b0, reset, load, rae_in, cae_in, rae, cae;
  logic [2:0] rra_in, cra_in, rra, cra;
  int checks = 0, failures = 0;

  repair_regs dut (.*);
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

  logic [7:0] held;
  initial begin
    reset = 1; load = 0; rra_in = 3'd5; rae_in = 1; cra_in = 3'd2; cae_in = 1;
    @(negedge clk); @(negedge clk);
    check(!rae && !cae, "reset clears the enables");
    reset = 0;
    @(negedge clk);
    check(!rae && !cae, "no load, no change");
    for (int n = 0; n < 20; n++) begin
      rra_in = 3'($urandom); rae_in = 1'($urandom); cra_in = 3'($urandom); cae_in = 1'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      check({rra, rae, cra, cae} == {rra_in, rae_in, cra_in, cae_in}, $sformatf("load %0d", n));
      held = {rra, rae, cra, cae};
      rra_in = ~rra_in; rae_in = ~rae_in; cra_in = ~cra_in; cae_in = ~cae_in;
      @(negedge clk);
      check({rra, rae, cra, cae} == held, $sformatf("hold %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

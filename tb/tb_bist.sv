// tb_bist: runs the BIST against a reference RAM with stuck-at-0 cells and a
// fault receiver that accepts reports only after a random delay.
// Checks: without faults the test ends exactly 49 clocks after start (48 march clocks) with
// fail low and no reports; with faults every report (address, syndrome)
// matches the list worked out from the march {w 55, r 55, w AA, r AA} in
// address order 0,1,2,5,3,7,6,4; reports are held while not accepted; fail
// is set; a second start restarts cleanly.
`timescale 1ns/1ps
module tb_bist;
  logic       clk = 1'b0, reset, start;
  logic       wr_en, rd_en, flt_valid, flt_ready, lfsr_done, fail;
  logic [2:0] addr, fa;
  logic [7:0] wdata, rdata, syn;
  logic [7:0] mem [8];
  logic [7:0] fmask [8];
  int checks = 0, failures = 0;
  localparam logic [2:0] SEQ [8] = '{3'd0, 3'd1, 3'd2, 3'd5, 3'd3, 3'd7, 3'd6, 3'd4};

  bist dut (.*);
  always #5 clk = ~clk;

  // reference RAM: synchronous read, stuck-at-0 cells
  always @(posedge clk) begin
    if (wr_en) mem[addr] <= wdata;
    if (rd_en) rdata <= mem[addr] & ~fmask[addr];
  end

  // fault receiver with random acceptance delay
  int wait_cnt = 0;
  always @(posedge clk) begin
    if (flt_valid && !flt_ready) wait_cnt <= wait_cnt + 1;
    else wait_cnt <= 0;
  end
  logic [2:0] got_fa [$];
  logic [7:0] got_syn [$];
  int delay_sel;
  always_comb flt_ready = flt_valid && (wait_cnt >= delay_sel);
  always @(posedge clk) if (flt_valid && flt_ready) begin
    got_fa.push_back(fa);
    got_syn.push_back(syn);
    delay_sel <= $urandom_range(0, 3);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!lfsr_done && cycles < 1000) begin @(negedge clk); cycles++; end
  endtask

  int cyc;
  initial begin
    reset = 1; start = 0; delay_sel = 0;
    for (int a = 0; a < 8; a++) fmask[a] = 0;
    @(negedge clk); @(negedge clk); reset = 0;

    run(cyc);
    check(cyc == 49, $sformatf("fault-free test: lfsr_done 49 clocks after start (%0d)", cyc));
    check(!fail && got_fa.size() == 0, "no fault reported on a good RAM");

    fmask[1] = 8'h55; fmask[2] = 8'h04; fmask[7] = 8'h82; fmask[4] = 8'h10;
    run(cyc);
    check(fail, "fail set");
    begin
      logic [2:0] exp_fa [$];
      logic [7:0] exp_syn [$];
      for (int e = 0; e < 2; e++) begin
        logic [7:0] p;
        p = e ? 8'hAA : 8'h55;
        for (int k = 0; k < 8; k++)
          if ((p & fmask[SEQ[k]]) != 0) begin
            exp_fa.push_back(SEQ[k]);
            exp_syn.push_back(p & fmask[SEQ[k]]);
          end
      end
      check(got_fa.size() == exp_fa.size(), $sformatf("%0d reports, expected %0d", got_fa.size(), exp_fa.size()));
      for (int i = 0; i < exp_fa.size() && i < got_fa.size(); i++)
        check(got_fa[i] == exp_fa[i] && got_syn[i] == exp_syn[i],
              $sformatf("report %0d: %0d/%h expected %0d/%h", i, got_fa[i], got_syn[i], exp_fa[i], exp_syn[i]));
      check(cyc >= 49 + exp_fa.size(), "reports add cycles");
    end

    for (int a = 0; a < 8; a++) fmask[a] = 0;
    got_fa.delete(); got_syn.delete();
    run(cyc);
    check(cyc == 49 && !fail && got_fa.size() == 0, "restart after faults cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

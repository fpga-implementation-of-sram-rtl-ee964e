// tb_bisr_ctrl: drives the flow sequencer with scripted BIST, analyser and
// fuse responses and checks the order of its commands and its outcome:
// a clean pass ends in done with repaired_ok; an unrepairable analysis
// stops after the first test; a failing pre-fuse test stops before any
// fuse is programmed; start is ignored while ready is low. The analyser
// is in test mode only during clear, load of the empty signature, and the
// first test.
`timescale 1ns/1ps
module tb_bisr_ctrl;
  logic clk = 1'b0, reset, start, ready;
  logic bist_start, bist_done, bist_fail, bira_clear, bira_mode, bira_idle, bira_rep;
  logic fuse_sig_load, fuse_prog_start, fuse_prog_done, fuse_prog_ok;
  logic busy, done, repaired_ok, unrepairable, retest_fail;
  bisr_pkg::flow_state_t state;
  int checks = 0, failures = 0;

  bisr_ctrl dut (.*);
  always #5 clk = ~clk;

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

  // Event log, one decimal digit per command: 1 clear, 2 sig load, 3 bist
  // start (test mode), 4 bist start (normal mode), 5 prog start.
  longint log_q;
  always @(posedge clk) if (!reset) begin
    if (bira_clear) log_q = log_q * 10 + 1;
    if (fuse_sig_load) log_q = log_q * 10 + 2;
    if (bist_start) log_q = log_q * 10 + (bira_mode ? 4 : 3);
    if (fuse_prog_start) log_q = log_q * 10 + 5;
  end

  // Scripted responders: BIST finishes 10 clocks after its start, the
  // analyser is busy 3 clocks after that, fuses finish 5 clocks after start.
  int bist_cnt, prog_cnt, drain_cnt;
  logic retest_bad;
  always @(posedge clk) begin
    if (bist_start) bist_cnt <= 10; else if (bist_cnt > 0) bist_cnt <= bist_cnt - 1;
    if (bist_start) drain_cnt <= 13; else if (drain_cnt > 0) drain_cnt <= drain_cnt - 1;
    if (fuse_prog_start) prog_cnt <= 5; else if (prog_cnt > 0) prog_cnt <= prog_cnt - 1;
  end
  always_comb begin
    bist_done      = !bist_start && bist_cnt == 0;
    bist_fail      = bira_mode && retest_bad;
    bira_idle      = drain_cnt == 0;
    fuse_prog_done = !fuse_prog_start && prog_cnt == 0;
    fuse_prog_ok   = 1'b1;
  end

  // The flow must not leave the drain step while the analyser is busy.
  always @(posedge clk) if (!reset && state == bisr_pkg::FLOW_DRAIN && !bira_idle) begin
    #1 check(state == bisr_pkg::FLOW_DRAIN, "holds in drain while the analyser is busy");
  end

  task automatic run(output int cycles);
    log_q = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    check(busy, "busy after start");
    cycles = 1;
    while (!done && cycles < 200) begin
      if (state inside {bisr_pkg::FLOW_TEST, bisr_pkg::FLOW_DRAIN}) check(!bira_mode, "test mode during first test");
      @(negedge clk); cycles++;
    end
    check(done && !busy, "flow ends");
  endtask

  int cyc;
  initial begin
    reset = 1; start = 0; ready = 1; bira_rep = 1; retest_bad = 0;
    bist_cnt = 0; prog_cnt = 0; drain_cnt = 0;
    @(negedge clk); @(negedge clk); reset = 0;
    check(!busy && !done, "idle after reset");

    run(cyc);
    check(repaired_ok && !unrepairable && !retest_fail, "clean flow repaired_ok");
    check(log_q == 123245, "clean flow command order");
    check(bira_mode, "normal mode at the end");

    bira_rep = 0;
    run(cyc);
    check(unrepairable && !repaired_ok, "unrepairable flagged");
    check(log_q == 123, "stops after analysis");
    check(cyc >= 15, "waits for the analyser to drain");

    bira_rep = 1; retest_bad = 1;
    run(cyc);
    check(retest_fail && !repaired_ok && !unrepairable, "retest failure flagged");
    check(log_q == 12324, "no fuse programming after failed retest");

    ready = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    check(!busy && retest_fail, "start ignored while not ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

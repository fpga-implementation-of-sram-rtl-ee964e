// tb_bira: checks the redundancy analyser on its own.
// Test mode: fault reports are fed in directly and the resulting repair
// signature and repairable flag are compared with hand-derived results:
//   1. row 1 (bits 0,2,4,6), row 2 (bit 2), row 5 (bit 0), row 3 (bit 4):
//      bitmap rows {2,5}, columns {0,2}, spare row 1, spare column 4;
//   2. row 0 bit 0, row 1 bit 0, row 2 bit 0, row 5 bit 2, row 3 bit 4:
//      unrepairable, with spare row 2 and spare column 2.
// A report with n faulty bits must keep flt_ready low for n clocks.
// Normal mode: with the bitmap of case 1, a RAM model that corrupts every
// bit at a bitmap (row, column) pair is written and read; q must return the
// written data one clock after rd_en, while in test mode q is the raw RAM
// output.
`timescale 1ns/1ps
module tb_bira;
  logic       clk = 1'b0, reset, mode, clear, flt_valid, flt_ready, rep, sig_load;
  logic [2:0] fa, wr_addr, rd_addr;
  logic [7:0] syn, din, ram_q, q;
  logic       wr_en, rd_en;
  bisr_pkg::repair_sig_t sig, sig_in;
  logic [7:0] mem [8];
  int checks = 0, failures = 0;

  bira dut (.*);
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

  // Send one report, wait until it is accepted and fully analysed; return
  // the number of clocks flt_ready stayed low afterwards.
  task automatic report(input logic [2:0] a, input logic [7:0] s, output int busy);
    @(negedge clk);
    while (!flt_ready) @(negedge clk);
    flt_valid = 1; fa = a; syn = s;
    @(negedge clk); flt_valid = 0;
    busy = 0;
    while (!flt_ready) begin busy++; @(negedge clk); end
  endtask

  // RAM model for normal mode: bits at bitmap pairs of case 1 read inverted.
  function automatic logic [7:0] corrupt(logic [2:0] a, logic [7:0] d);
    if (a == 3'd2 || a == 3'd5) return d ^ 8'b0000_0101;
    return d;
  endfunction
  always @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= din;
    if (rd_en) ram_q <= corrupt(rd_addr, mem[rd_addr]);
  end

  int b;
  logic [7:0] exp_d [8];
  initial begin
    reset = 1; mode = 0; clear = 0; flt_valid = 0; sig_load = 0; sig_in = '0;
    fa = 0; syn = 0; wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; din = 0;
    @(negedge clk); @(negedge clk); reset = 0;

    // ---- case 1 ----
    report(3'd1, 8'h55, b); check(b == 4, $sformatf("4-bit syndrome busy 4 clocks (%0d)", b));
    report(3'd2, 8'h04, b); check(b == 1, "1-bit syndrome busy 1 clock");
    report(3'd5, 8'h01, b);
    report(3'd3, 8'h10, b);
    check(rep, "case 1 repairable");
    check(sig.rae && sig.rra == 3'd1, "case 1 spare row 1");
    check(sig.cae && sig.cra == 3'd4, "case 1 spare column 4");
    check(sig.rar_v == 2'b11 && sig.rar[0] == 3'd2 && sig.rar[1] == 3'd5, "case 1 bitmap rows");
    check(sig.car_v == 2'b11 && sig.car[0] == 3'd0 && sig.car[1] == 3'd2, "case 1 bitmap columns");

    // ---- normal mode with the case-1 bitmap ----
    @(negedge clk); mode = 1;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = 3'(a); din = 8'($urandom); exp_d[a] = din;
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < 8; a++) begin
      rd_en = 1; rd_addr = 3'(a);
      @(negedge clk); rd_en = 0;
      check(q == exp_d[a], $sformatf("normal read %0d: %h expected %h", a, q, exp_d[a]));
    end
    check(flt_ready, "normal mode accepts reports at once");
    // test mode: no replacement
    @(negedge clk); mode = 0;
    rd_en = 1; rd_addr = 3'd2;
    @(negedge clk); rd_en = 0;
    check(q == corrupt(3'd2, exp_d[2]), "test mode passes RAM data through");

    // ---- case 2 ----
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    check(sig == '0 && rep, "clear empties the analyser");
    report(3'd0, 8'h01, b);
    report(3'd1, 8'h01, b);
    report(3'd2, 8'h01, b);
    check(sig.rae && sig.rra == 3'd2, "case 2 spare row after row overflow");
    report(3'd5, 8'h04, b);
    check(sig.cae && sig.cra == 3'd2, "case 2 spare column");
    check(rep, "case 2 still repairable");
    report(3'd3, 8'h10, b);
    check(!rep, "case 2 unrepairable");

    // ---- signature restore ----
    sig_in = '0; sig_in.rar_v = 2'b01; sig_in.rar[0] = 3'd6; sig_in.car_v = 2'b10; sig_in.car[1] = 3'd7;
    @(negedge clk); sig_load = 1;
    @(negedge clk); sig_load = 0;
    check(sig == sig_in && rep, "sig_load restores the signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

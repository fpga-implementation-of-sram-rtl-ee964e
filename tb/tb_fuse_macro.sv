// tb_fuse_macro: checks the fuse macro.
//  - after reset of a fresh part it restores eight words of zeros and pulses
//    restore_done once, eight clocks after reset;
//  - sig_load packs the signature into words 0..2 (read back through the
//    access port), drives the repair register values and pulses
//    sig_loaded one clock later;
//  - programming takes 16 clocks (8 program, 8 read-back) and reports ok;
//  - after another reset the signature comes back from the fuses;
//  - a later signature that would need a blown fuse cleared fails the
//    read-back check.
`timescale 1ns/1ps
module tb_fuse_macro;
  logic       clk = 1'b0, reset, wr_en, rd_en, sig_load, prog_start;
  logic       prog_done, prog_ok, restoring, restore_done, sig_loaded, row_en, col_en;
  logic [2:0] addr, row_addr, col_addr;
  logic [7:0] wr_data, read_data;
  bisr_pkg::repair_sig_t sig_in, sig_out, s1;
  int checks = 0, failures = 0;

  fuse_macro dut (.*);
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

  int n_pulse = 0;
  always @(posedge clk) if (restore_done && !reset) n_pulse++;

  task automatic do_reset(output int cycles);
    @(negedge clk); reset = 1;
    @(negedge clk); reset = 0;
    cycles = 0;
    while (restoring) begin @(negedge clk); cycles++; end
  endtask

  task automatic read_word(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); rd_en = 1; addr = a;
    @(negedge clk); rd_en = 0; d = read_data;
  endtask

  task automatic do_program(output int cycles);
    @(negedge clk); prog_start = 1;
    @(negedge clk); prog_start = 0;
    cycles = 1;
    while (!prog_done && cycles < 100) begin @(negedge clk); cycles++; end
  endtask

  int cyc;
  logic [7:0] d;
  initial begin
    reset = 1; wr_en = 0; rd_en = 0; sig_load = 0; prog_start = 0; addr = 0; wr_data = 0;
    sig_in = '0; n_pulse = 0;
    do_reset(cyc);
    check(cyc == 8, $sformatf("restore takes 8 clocks (%0d)", cyc));
    check(sig_out == '0 && !row_en && !col_en, $sformatf("fresh part restores nothing %h %0d", sig_out, n_pulse));
    @(negedge clk);
    check(n_pulse == 1, "one restore_done pulse");

    s1 = '0;
    s1.rae = 1; s1.rra = 3'd6; s1.cae = 1; s1.cra = 3'd3;
    s1.rar_v = 2'b11; s1.rar[0] = 3'd1; s1.rar[1] = 3'd4;
    s1.car_v = 2'b01; s1.car[0] = 3'd5;
    sig_in = s1;
    check(!sig_loaded, "no sig_loaded pulse before a load");
    @(negedge clk); sig_load = 1;
    @(negedge clk); sig_load = 0;
    check(sig_loaded, "sig_loaded pulses the clock after sig_load");
    check(row_en && row_addr == 3'd6 && col_en && col_addr == 3'd3, "repair registers follow the signature");
    check(sig_out == s1, "signature held");
    read_word(3'd0, d); check(d == 8'b1_110_1_011, $sformatf("word 0 = %b", d));
    read_word(3'd1, d); check(d == 8'b1100_1001, $sformatf("word 1 = %b", d));
    read_word(3'd2, d); check(d == 8'b0000_1101, $sformatf("word 2 = %b", d));
    // direct write of a spare word
    @(negedge clk); wr_en = 1; addr = 3'd7; wr_data = 8'h3C;
    @(negedge clk); wr_en = 0;
    read_word(3'd7, d); check(d == 8'h3C, "direct write and read");

    do_program(cyc);
    check(prog_done && prog_ok, "programming succeeds");
    check(cyc == 17, $sformatf("prog_done 17 clocks after prog_start (%0d)", cyc));

    do_reset(cyc);
    check(sig_out == s1, "signature restored from fuses after reset");
    check(row_en && row_addr == 3'd6, "repair registers restored");
    read_word(3'd7, d); check(d == 8'h3C, "word 7 restored");

    // new signature needs fuses cleared: read-back must fail
    sig_in = '0; sig_in.rae = 1; sig_in.rra = 3'd1;
    @(negedge clk); sig_load = 1;
    @(negedge clk); sig_load = 0;
    do_program(cyc);
    check(prog_done && !prog_ok, "blown fuses cannot be cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bisr_top: end-to-end test of the self-repairing RAM at its default size
// (8 x 8 RAM, 2 x 2 bitmap).
//
// Scenarios, in one simulation so the fuse box keeps its contents:
//   A. fault-free RAM: the flow finishes repaired with no spare in use;
//   B. cells in five rows fail: the analyser runs out of spares and the
//      flow stops as unrepairable (row overflow puts the spare row on row 2
//      and the spare column on bit 2);
//   C. faults needing the bitmap, the spare column and the spare row: the
//      flow repairs the RAM, the expected repair registers and bitmap are
//      checked, and random data is written and read back fault-free;
//   D. reset (power cycle) with the same defects: the repair comes back
//      from the fuses with no new test, and the RAM works again;
//   E. a new defect appears between analysis and the pre-fuse test, which
//      must then fail.
// Expected results are worked out by hand from the allocation rules; the
// data checks use a plain array as reference. Each mechanism is counted
// and one that never happens is a failure.
`timescale 1ns/1ps
module tb_bisr_top;
  logic       clk = 1'b0;
  logic       reset, start, wr_en, rd_en, fault_en, fuse_wr_en, fuse_rd_en;
  logic [2:0] write_address, read_address, fault_addr, fuse_addr;
  logic [7:0] wr_data, fault_data, fuse_wr_data, read_data, fuse_read_data;
  logic [2:0] row_address, col_address;
  logic       row_en, col_en, busy, done, repaired_ok, unrepairable, retest_fail;

  int checks = 0, failures = 0;

  bisr_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---- mechanism counters (probe the design's internal events) -----------
  int n_stall, n_bitmap, n_row_by_row, n_row_by_col, n_col, n_covered,
      n_unrep, n_sparebit_rd, n_prog, n_restore_sig, n_retest_fail;
  always @(posedge clk) if (!reset) begin
    if (dut.flt_valid && !dut.flt_ready) n_stall++;
    if (dut.u_bira.analyse) begin
      if (dut.u_bira.covered) n_covered++;
      else if (dut.u_bira.use_bitmap) n_bitmap++;
      else if (dut.u_bira.use_row && !dut.u_bira.row_ok) n_row_by_row++;
      else if (dut.u_bira.use_row) n_row_by_col++;
      else if (dut.u_bira.use_col) n_col++;
      else n_unrep++;
    end
    if (dut.u_bira.rep_mask != 0 && dut.u_bira.mode) n_sparebit_rd++;
    if (dut.u_fuse.state == 2'd2) n_prog++;
    if (dut.u_fuse.restore_done && dut.u_fuse.sig_out != '0) n_restore_sig++;
    if (dut.u_ctrl.state == bisr_pkg::FLOW_RETEST && dut.bist_done && dut.bist_fail) n_retest_fail++;
  end

  task automatic idle_inputs();
    start = 0; wr_en = 0; rd_en = 0; fault_en = 0; fuse_wr_en = 0; fuse_rd_en = 0;
    write_address = 0; read_address = 0; fault_addr = 0; fuse_addr = 0;
    wr_data = 0; fault_data = 0; fuse_wr_data = 0;
  endtask

  task automatic do_reset();
    @(negedge clk); reset = 1;
    repeat (2) @(negedge clk);
    reset = 0;
    // restore takes 8 clocks
    repeat (12) @(negedge clk);
    check(!dut.u_fuse.restoring, "fuse restore finished");
  endtask

  task automatic inject(input logic [2:0] a, input logic [7:0] m);
    @(negedge clk); fault_en = 1; fault_addr = a; fault_data = m;
    @(negedge clk); fault_en = 0;
  endtask

  task automatic run_flow(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done && cycles < 5000) begin @(negedge clk); cycles++; end
    check(done, "flow finished");
  endtask

  // Write random words everywhere, read them back, count mismatches.
  task automatic data_test(output int errors);
    logic [7:0] ref_mem [8];
    errors = 0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int a = 0; a < 8; a++) begin
        @(negedge clk);
        wr_en = 1; write_address = 3'(a); wr_data = 8'($urandom);
        if (pass == 1) wr_data = 8'hFF;
        ref_mem[a] = wr_data;
      end
      @(negedge clk); wr_en = 0;
      for (int a = 0; a < 8; a++) begin
        rd_en = 1; read_address = 3'(a);
        @(negedge clk); rd_en = 0;
        if (read_data !== ref_mem[a]) errors++;
      end
    end
  endtask

  int cyc, errs;

  initial begin
    idle_inputs();
    reset = 1;
    n_stall = 0; n_bitmap = 0; n_row_by_row = 0; n_row_by_col = 0; n_col = 0;
    n_covered = 0; n_unrep = 0; n_sparebit_rd = 0; n_prog = 0; n_restore_sig = 0;
    n_retest_fail = 0;
    do_reset();

    // ---- A: fault-free ----
    data_test(errs);
    check(errs == 0, "A: fault-free RAM reads back");
    run_flow(cyc);
    check(repaired_ok && !unrepairable && !retest_fail, "A: flow passes");
    check(!row_en && !col_en, "A: no spare used");
    // 2 set-up + 48 test + drain/load + 48 retest + 16 fuse program/verify
    check(cyc > 100 && cyc < 140, $sformatf("A: flow length %0d cycles", cyc));

    // ---- B: unrepairable ----
    inject(0, 8'h01); inject(1, 8'h01); inject(2, 8'h01); inject(5, 8'h04); inject(3, 8'h10);
    run_flow(cyc);
    check(unrepairable && !repaired_ok, "B: reported unrepairable");
    check(dut.u_bira.sig.rae && dut.u_bira.sig.rra == 3'd2, "B: spare row on row 2");
    check(dut.u_bira.sig.cae && dut.u_bira.sig.cra == 3'd2, "B: spare column on bit 2");
    check(!row_en && !col_en, "B: repair registers left empty");

    // ---- C: repairable with bitmap, spare row and spare column ----
    do_reset();
    inject(1, 8'h55); inject(2, 8'h04); inject(5, 8'h01); inject(3, 8'h10);
    data_test(errs);
    check(errs != 0, "C: faults visible before repair");
    run_flow(cyc);
    check(repaired_ok && !unrepairable && !retest_fail, "C: flow repairs the RAM");
    check(row_en && row_address == 3'd1, "C: RRA = 1");
    check(col_en && col_address == 3'd4, "C: CRA = 4");
    check(dut.u_bira.sig.rar_v == 2'b11 && dut.u_bira.sig.rar[0] == 3'd2 && dut.u_bira.sig.rar[1] == 3'd5,
          "C: bitmap rows {2,5}");
    check(dut.u_bira.sig.car_v == 2'b11 && dut.u_bira.sig.car[0] == 3'd0 && dut.u_bira.sig.car[1] == 3'd2,
          "C: bitmap columns {0,2}");
    data_test(errs);
    check(errs == 0, $sformatf("C: repaired RAM reads back (%0d errors)", errs));
    // fuse register contents through the access port: word 0 = {RAE,RRA,CAE,CRA}
    @(negedge clk); fuse_rd_en = 1; fuse_addr = 0;
    @(negedge clk); fuse_rd_en = 0;
    check(fuse_read_data == 8'b1_001_1_100, "C: fuse word 0");

    // ---- D: power cycle, repair restored from the fuses ----
    do_reset();
    inject(1, 8'h55); inject(2, 8'h04); inject(5, 8'h01); inject(3, 8'h10);
    check(row_en && row_address == 3'd1 && col_en && col_address == 3'd4, "D: repair registers restored");
    check(dut.u_bira.sig.rar_v == 2'b11 && dut.u_bira.sig.car_v == 2'b11, "D: bitmap entries restored");
    data_test(errs);
    check(errs == 0, $sformatf("D: restored RAM reads back (%0d errors)", errs));

    // ---- E: a defect appears before the pre-fuse test ----
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (dut.u_ctrl.state != bisr_pkg::FLOW_LOAD) @(negedge clk);
    inject(6, 8'h02);
    while (!done) @(negedge clk);
    check(retest_fail && !repaired_ok && !unrepairable, "E: pre-fuse test fails");

    // ---- mechanisms ----
    check(n_stall > 0,       $sformatf("BIST stalled on a busy analyser (%0d)", n_stall));
    check(n_bitmap > 0,      $sformatf("bitmap allocations (%0d)", n_bitmap));
    check(n_row_by_row > 0,  $sformatf("spare row after row overflow (%0d)", n_row_by_row));
    check(n_row_by_col > 0,  $sformatf("spare row after column overflow (%0d)", n_row_by_col));
    check(n_col > 0,         $sformatf("spare column allocations (%0d)", n_col));
    check(n_covered > 0,     $sformatf("faults already covered by a spare (%0d)", n_covered));
    check(n_unrep > 0,       $sformatf("unrepairable faults (%0d)", n_unrep));
    check(n_sparebit_rd > 0, $sformatf("reads served by spare bits (%0d)", n_sparebit_rd));
    check(n_prog > 0,        $sformatf("fuse programming cycles (%0d)", n_prog));
    check(n_restore_sig > 0, $sformatf("non-empty restores from fuses (%0d)", n_restore_sig));
    check(n_retest_fail > 0, $sformatf("failing pre-fuse tests (%0d)", n_retest_fail));

    $display("stall=%0d bitmap=%0d row_by_row=%0d row_by_col=%0d col=%0d covered=%0d unrep=%0d sparebit_reads=%0d prog=%0d restores=%0d retest_fail=%0d",
             n_stall, n_bitmap, n_row_by_row, n_row_by_col, n_col, n_covered, n_unrep,
             n_sparebit_rd, n_prog, n_restore_sig, n_retest_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

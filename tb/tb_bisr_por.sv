// tb_bisr_por: power-on self-repair. With POR_START = 1 the top runs the
// whole test-and-repair flow by itself after every reset, with no start
// pulse. Defects are injected while the fuses are being restored. Checks:
// the flow starts and ends repaired after the first reset; the expected
// spares are chosen (spare row on row 4 after the bitmap rows fill up, the
// bitmap keeps rows 1 and 6); the RAM then reads back correctly; after a
// second reset the flow runs again and the same signature programs cleanly
// over the blown fuses.
`timescale 1ns/1ps
module tb_bisr_por;
  logic       clk = 1'b0;
  logic       reset, start, wr_en, rd_en, fault_en, fuse_wr_en, fuse_rd_en;
  logic [2:0] write_address, read_address, fault_addr, fuse_addr;
  logic [7:0] wr_data, fault_data, fuse_wr_data, read_data, fuse_read_data;
  logic [2:0] row_address, col_address;
  logic       row_en, col_en, busy, done, repaired_ok, unrepairable, retest_fail;
  int checks = 0, failures = 0;

  bisr_top #(.POR_START(1'b1)) dut (.*);
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

  int n_flows = 0;
  always @(posedge clk) if (!reset && dut.u_ctrl.state == bisr_pkg::FLOW_CLEAR) n_flows++;

  // Power-on: reset, then defects appear (one per clock, during the restore).
  task automatic power_on();
    @(negedge clk); reset = 1;
    repeat (2) @(negedge clk);
    reset = 0;
    fault_en = 1;
    fault_addr = 3'd1; fault_data = 8'h01; @(negedge clk);
    fault_addr = 3'd4; fault_data = 8'h02; @(negedge clk);
    fault_addr = 3'd6; fault_data = 8'h04; @(negedge clk);
    fault_en = 0;
    check(dut.u_fuse.restoring, "defects injected during restore");
    while (!done) @(negedge clk);
  endtask

  task automatic data_test(output int errors);
    logic [7:0] r [8];
    errors = 0;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); wr_en = 1; write_address = 3'(a); wr_data = 8'($urandom); r[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < 8; a++) begin
      rd_en = 1; read_address = 3'(a);
      @(negedge clk); rd_en = 0;
      if (read_data != r[a]) errors++;
    end
  endtask

  int errs;
  initial begin
    reset = 1; start = 0; wr_en = 0; rd_en = 0; fault_en = 0; fuse_wr_en = 0; fuse_rd_en = 0;
    write_address = 0; read_address = 0; fault_addr = 0; fuse_addr = 0;
    wr_data = 0; fault_data = 0; fuse_wr_data = 0;

    power_on();
    check(n_flows == 1, "flow started by reset alone");
    check(repaired_ok, "first power-on repairs");
    // address order 0,1,2,5,3,7,6,4: rows 1 (bit 0) and 6 (bit 2) are found
    // in the 0x55 pass and fill the bitmap rows; row 4 (bit 1) is found in
    // the 0xAA pass, overflows the row entries and takes the spare row
    check(row_en && row_address == 3'd4 && !col_en, "spare row on row 4");
    check(dut.u_bira.sig.rar_v == 2'b11 && dut.u_bira.sig.rar[0] == 3'd1 && dut.u_bira.sig.rar[1] == 3'd6,
          "bitmap rows 1 and 6");
    data_test(errs);
    check(errs == 0, "repaired RAM reads back");

    power_on();
    check(n_flows == 2, "flow started again by the second reset");
    check(repaired_ok, "second power-on repairs and fuses verify");
    data_test(errs);
    check(errs == 0, "RAM reads back after second power-on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

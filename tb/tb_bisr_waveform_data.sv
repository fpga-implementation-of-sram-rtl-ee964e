// tb_bisr_waveform_data: the functional scenario of the reference
// simulation: two sequences of data words are written into the RAM, which
// has defective cells, and read back.
//   - before self-repair the words read back differ from those written;
//   - after one start of the test-and-repair flow the same sequences read
//     back unchanged.
// The two sequences (26 129 9 99 13 241 101 and 1 13 118 61 237 140 249)
// are written to addresses 0..6. The defects are stuck-at-0 cells chosen so
// that every stored word is hit: in row 0 (bits 1 and 3), row 3 (bit 0),
// row 4 (bit 2) and row 6 (bit 5). Repair uses the spare row, the spare
// column and the bitmap spare bits.
`timescale 1ns/1ps
module tb_bisr_waveform_data;
  logic       clk = 1'b0;
  logic       reset, start, wr_en, rd_en, fault_en, fuse_wr_en, fuse_rd_en;
  logic [2:0] write_address, read_address, fault_addr, fuse_addr;
  logic [7:0] wr_data, fault_data, fuse_wr_data, read_data, fuse_read_data;
  logic [2:0] row_address, col_address;
  logic       row_en, col_en, busy, done, repaired_ok, unrepairable, retest_fail;
  int checks = 0, failures = 0;

  localparam logic [7:0] SEQ_A [7] = '{8'd26, 8'd129, 8'd9, 8'd99, 8'd13, 8'd241, 8'd101};
  localparam logic [7:0] SEQ_B [7] = '{8'd1, 8'd13, 8'd118, 8'd61, 8'd237, 8'd140, 8'd249};

  bisr_top dut (.*);
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

  task automatic inject(input logic [2:0] a, input logic [7:0] m);
    @(negedge clk); fault_en = 1; fault_addr = a; fault_data = m;
    @(negedge clk); fault_en = 0;
  endtask

  // Write a sequence, read it back, return the number of words that differ.
  task automatic write_read(input logic [7:0] s [7], output int bad);
    for (int a = 0; a < 7; a++) begin
      @(negedge clk); wr_en = 1; write_address = 3'(a); wr_data = s[a];
    end
    @(negedge clk); wr_en = 0;
    bad = 0;
    for (int a = 0; a < 7; a++) begin
      rd_en = 1; read_address = 3'(a);
      @(negedge clk); rd_en = 0;
      if (read_data != s[a]) bad++;
    end
  endtask

  int bad, cyc;
  initial begin
    reset = 1; start = 0; wr_en = 0; rd_en = 0; fault_en = 0; fuse_wr_en = 0; fuse_rd_en = 0;
    write_address = 0; read_address = 0; fault_addr = 0; fuse_addr = 0;
    wr_data = 0; fault_data = 0; fuse_wr_data = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    while (dut.u_fuse.restoring) @(negedge clk);
    inject(0, 8'h0A); inject(3, 8'h01); inject(4, 8'h04); inject(6, 8'h20);

    write_read(SEQ_A, bad); check(bad > 0, $sformatf("sequence A corrupted before repair (%0d words)", bad));
    write_read(SEQ_B, bad); check(bad > 0, $sformatf("sequence B corrupted before repair (%0d words)", bad));

    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    check(done && repaired_ok, "self-repair succeeds");
    $display("repair: RRA=%0d(%0d) CRA=%0d(%0d) flow %0d clocks", row_address, row_en, col_address, col_en, cyc);

    write_read(SEQ_A, bad); check(bad == 0, $sformatf("sequence A after repair (%0d bad words)", bad));
    write_read(SEQ_B, bad); check(bad == 0, $sformatf("sequence B after repair (%0d bad words)", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_repairable_ram: checks the repairable RAM against a reference array.
//  - without faults, random writes and reads match (read data one clock
//    after rd_en);
//  - an injected stuck-at-0 cell reads 0;
//  - with the faulty row sent to the spare row, or the faulty column to the
//    spare column, the RAM reads back correctly again, and the other rows
//    and columns stay where they were.
`timescale 1ns/1ps
module tb_repairable_ram;
  logic       clk = 1'b0, reset, wr_en, rd_en, fault_en;
  logic [2:0] row_address, read_addr, fault_addr;
  logic [7:0] w_data, r_data, repair_row_en, repair_col_en, fault_data;
  logic [7:0] ref_mem [8];
  int checks = 0, failures = 0;

  repairable_ram dut (.*);
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

  task automatic wr(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); wr_en = 1; row_address = a; w_data = d; ref_mem[a] = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); rd_en = 1; read_addr = a;
    @(negedge clk); rd_en = 0; d = r_data;
  endtask

  // Fill with random data and compare; mask = bits expected to read as 0.
  task automatic sweep(input string tag, input logic [2:0] frow, input logic [7:0] zmask);
    logic [7:0] d;
    for (int a = 0; a < 8; a++) wr(3'(a), 8'($urandom) | 8'h01);
    for (int a = 0; a < 8; a++) begin
      rd(3'(a), d);
      check(d == (ref_mem[a] & ((3'(a) == frow) ? ~zmask : 8'hFF)),
            $sformatf("%s addr %0d got %h", tag, a, d));
    end
  endtask

  initial begin
    reset = 1; wr_en = 0; rd_en = 0; fault_en = 0; row_address = 0; read_addr = 0;
    fault_addr = 0; w_data = 0; fault_data = 0; repair_row_en = 0; repair_col_en = 0;
    @(negedge clk); @(negedge clk); reset = 0;
    sweep("clean", 3'd0, 8'h00);
    // read timing: data appears one clock after rd_en, not before
    wr(3'd3, 8'hA5);
    @(negedge clk); rd_en = 1; read_addr = 3'd3; wr_en = 1; row_address = 3'd3; w_data = 8'h5A;
    @(negedge clk); rd_en = 0; wr_en = 0;
    check(r_data == 8'hA5, "read before same-cycle write");
    ref_mem[3] = 8'h5A;
    // stuck-at-0 cells in row 6, bits 0 and 5
    @(negedge clk); fault_en = 1; fault_addr = 3'd6; fault_data = 8'h21;
    @(negedge clk); fault_en = 0;
    sweep("faulty", 3'd6, 8'h21);
    // spare row
    repair_row_en = 8'b0100_0000;
    sweep("spare row", 3'd0, 8'h00);
    // spare column for bit 0 only: bit 5 of row 6 still faulty
    repair_row_en = 0; repair_col_en = 8'b0000_0001;
    sweep("spare col", 3'd6, 8'h20);
    // both spares together
    repair_row_en = 8'b0100_0000;
    sweep("both", 3'd0, 8'h00);
    // reset clears the injected faults
    repair_row_en = 0; repair_col_en = 0;
    @(negedge clk); reset = 1; @(negedge clk); reset = 0;
    sweep("after reset", 3'd0, 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

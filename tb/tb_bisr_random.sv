// tb_bisr_random: random defect patterns against a reference model.
// For each of 60 trials: reset, make 0..6 random cells stuck-at-0, run the
// flow, and compare with a model written here from the allocation rules:
//   - the model replays the march (0x55 then 0xAA, addresses 0,1,2,5,3,7,6,4),
//     takes the faulty bits of each word lowest first and allocates them
//     with the bitmap / spare row / spare column rules;
//   - the repairable verdict and the full repair signature must match;
//   - a RAM the analyser calls repairable must pass the pre-fuse test and
//     then read back random data without error;
//   - fuses only ever get blown, so the model keeps their contents and
//     predicts whether the read-back after programming succeeds.
`timescale 1ns/1ps
module tb_bisr_random;
  import bisr_pkg::*;
  logic       clk = 1'b0;
  logic       reset, start, wr_en, rd_en, fault_en, fuse_wr_en, fuse_rd_en;
  logic [2:0] write_address, read_address, fault_addr, fuse_addr;
  logic [7:0] wr_data, fault_data, fuse_wr_data, read_data, fuse_read_data;
  logic [2:0] row_address, col_address;
  logic       row_en, col_en, busy, done, repaired_ok, unrepairable, retest_fail;
  int checks = 0, failures = 0;
  localparam logic [2:0] ORDER [8] = '{3'd0, 3'd1, 3'd2, 3'd5, 3'd3, 3'd7, 3'd6, 3'd4};

  bisr_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- reference model of the redundancy analysis ----
  function automatic bit model(input logic [7:0] mask [8], output repair_sig_t s);
    bit ok = 1;
    s = '0;
    for (int e = 0; e < 2; e++)
      for (int k = 0; k < 8; k++) begin
        logic [2:0] r;
        logic [7:0] sy;
        r  = ORDER[k];
        sy = (e == 0 ? 8'h55 : 8'hAA) & mask[r];
        for (int c = 0; c < 8; c++) if (sy[c]) begin
          int ri, cj;
          bit rh, ch;
          if ((s.rae && s.rra == r) || (s.cae && s.cra == 3'(c))) continue;
          ri = -1; cj = -1; rh = 0; ch = 0;
          for (int i = 0; i < BM_K; i++) if (s.rar_v[i] && s.rar[i] == r) begin ri = i; rh = 1; end
          if (ri < 0) for (int i = 0; i < BM_K; i++) if (!s.rar_v[i] && ri < 0) ri = i;
          for (int j = 0; j < BM_L; j++) if (s.car_v[j] && s.car[j] == 3'(c)) begin cj = j; ch = 1; end
          if (cj < 0) for (int j = 0; j < BM_L; j++) if (!s.car_v[j] && cj < 0) cj = j;
          if (ri >= 0 && cj >= 0) begin
            s.rar_v[ri] = 1; s.rar[ri] = r; s.car_v[cj] = 1; s.car[cj] = 3'(c);
          end else begin
            bit take_row;
            if (ri < 0) take_row = !s.rae ? 1 : (!s.cae ? 0 : 1);
            else        take_row = !s.cae ? 0 : 1;
            if (take_row && !s.rae) begin
              s.rae = 1; s.rra = r;
              if (rh) s.rar_v[ri] = 0;
            end else if (!take_row && !s.cae) begin
              s.cae = 1; s.cra = 3'(c);
              if (ch) s.car_v[cj] = 0;
            end else ok = 0;
          end
        end
      end
    return ok;
  endfunction

  task automatic data_test(output int errors);
    logic [7:0] r [8];
    errors = 0;
    for (int p = 0; p < 2; p++) begin
      for (int a = 0; a < 8; a++) begin
        @(negedge clk); wr_en = 1; write_address = 3'(a);
        wr_data = p ? ~r[a] : 8'($urandom); r[a] = wr_data;
      end
      @(negedge clk); wr_en = 0;
      for (int a = 0; a < 8; a++) begin
        rd_en = 1; read_address = 3'(a);
        @(negedge clk); rd_en = 0;
        if (read_data != r[a]) errors++;
      end
    end
  endtask

  logic [7:0] mask [8];
  logic [7:0] fuses [8];
  repair_sig_t exp_sig, got_sig;
  int n_rep = 0, n_unrep = 0, n_fuse_bad = 0, errs;

  initial begin
    reset = 1; start = 0; wr_en = 0; rd_en = 0; fault_en = 0; fuse_wr_en = 0; fuse_rd_en = 0;
    write_address = 0; read_address = 0; fault_addr = 0; fuse_addr = 0;
    wr_data = 0; fault_data = 0; fuse_wr_data = 0;
    for (int w = 0; w < 8; w++) fuses[w] = 0;
    for (int trial = 0; trial < 60; trial++) begin
      bit exp_ok, exp_prog;
      logic [SIG_WORDS-1:0][7:0] words;
      @(negedge clk); reset = 1;
      @(negedge clk); reset = 0;
      while (dut.u_fuse.restoring) @(negedge clk);
      for (int a = 0; a < 8; a++) mask[a] = 0;
      for (int n = $urandom_range(0, 6); n > 0; n--) begin
        int a, b;
        a = $urandom_range(0, 7); b = $urandom_range(0, 7);
        mask[a][b] = 1'b1;
        @(negedge clk); fault_en = 1; fault_addr = 3'(a); fault_data = 8'(1 << b);
      end
      @(negedge clk); fault_en = 0;
      exp_ok = model(mask, exp_sig);

      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      got_sig = dut.u_bira.sig;

      check(unrepairable == !exp_ok, $sformatf("trial %0d verdict (model %0d)", trial, exp_ok));
      if (exp_ok) begin
        n_rep++;
        check(got_sig == exp_sig, $sformatf("trial %0d signature %h expected %h", trial, got_sig, exp_sig));
        check(!retest_fail, $sformatf("trial %0d repairable RAM passes the pre-fuse test", trial));
        words = sig_pack(exp_sig);
        exp_prog = 1;
        for (int w = 0; w < 8; w++) begin
          logic [7:0] v;
          v = (w < SIG_WORDS) ? words[w] : 8'h00;
          if ((fuses[w] | v) != v) exp_prog = 0;
          fuses[w] |= v;
        end
        if (!exp_prog) n_fuse_bad++;
        check(repaired_ok == exp_prog, $sformatf("trial %0d fuse read-back %0d expected %0d", trial, repaired_ok, exp_prog));
        data_test(errs);
        check(errs == 0, $sformatf("trial %0d repaired RAM data (%0d errors)", trial, errs));
      end else begin
        n_unrep++;
      end
    end
    $display("repairable %0d, unrepairable %0d, fuse read-back failures %0d", n_rep, n_unrep, n_fuse_bad);
    check(n_rep > 0 && n_unrep > 0, "both verdicts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// bira: built-in redundancy analyser with a local bitmap that is reused as
// spare bits.
//
// The bitmap has BM_K row address registers (RAR) and BM_L column address
// registers (CAR), each with a valid bit and a comparator, and a BM_K x BM_L
// array of bit cells b[i][j]. Because the RAM is bit-oriented with one word
// per row, a column address is the bit position inside the word.
//
// Test mode (mode = 0). The BIST offers a faulty address fa and its syndrome
// syn (flt_valid/flt_ready). The controller (CTR) takes one set bit of the
// syndrome per clock, lowest first, and encodes its bit address c. The
// faulty cell (r = fa, c) is then allocated:
//   - nothing to do if the spare row already holds r or the spare column c;
//   - otherwise, if r matches or gets a free row entry, and c matches or
//     gets a free column entry, both are kept and b[i][j] is set;
//   - otherwise, when the row entries overflowed, the spare row is given to
//     r (the spare column to c if the row is taken); when the column entries
//     overflowed, the spare column is tried first. The entry the spare takes
//     over is freed;
//   - with both spares in use the RAM is unrepairable and rep drops to 0.
// flt_ready is high while no syndrome bits are left, so a report with n
// faulty bits keeps the analyser busy for n clocks.
//
// Normal mode (mode = 1). Faults are accepted and ignored. The RAM's normal
// I/O runs through the bitmap. A write whose row matches RAR_i (RAH_i) stores
// bit CAR_j of the data in b[i][j] for every valid column entry j (CAH_j). A
// read looks up the same way: bits of the word at a valid (RAR_i, CAR_j)
// come from b[i][j], the rest from the RAM. The lookup is registered with
// rd_en, so q is valid together with the RAM's registered ram_q, one clock
// after rd_en.
//
// sig holds the repair signature (spare row and column registers and the
// bitmap addresses); sig_load restores it, e.g. from fuses at power-up, and
// clear empties the analyser before a test. The bitmap structure, test and
// normal modes, RAH/CAH matching and the spare-bit reuse follow the
// paper. The allocation order, the one-bit-per-clock CTR and the bitmap
// size are this design's choices.
module bira
#(
  parameter int ROWS  = bisr_pkg::ROWS,
  parameter int WIDTH = bisr_pkg::WIDTH,
  localparam int AW   = $clog2(ROWS),
  localparam int BW   = $clog2(WIDTH),
  localparam int K    = bisr_pkg::BM_K,
  localparam int L    = bisr_pkg::BM_L,
  localparam int KW   = (K > 1) ? $clog2(K) : 1,
  localparam int LW   = (L > 1) ? $clog2(L) : 1
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             mode,       // 0 test, 1 normal
  input  logic             clear,
  // fault reports from the BIST
  input  logic             flt_valid,
  output logic             flt_ready,
  input  logic [AW-1:0]    fa,
  input  logic [WIDTH-1:0] syn,
  output logic             rep,        // 1: repairable so far
  // repair signature
  output bisr_pkg::repair_sig_t      sig,
  input  logic             sig_load,
  input  bisr_pkg::repair_sig_t      sig_in,
  // normal I/O of the RAM
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  input  logic [WIDTH-1:0] ram_q,
  output logic [WIDTH-1:0] q
);
  bisr_pkg::repair_sig_t      s;                   // registers RRA..CAR
  logic             bits [K][L];   // bitmap cells / spare bits
  logic [AW-1:0]    cur_fa;
  logic [WIDTH-1:0] cur_syn;
  logic [WIDTH-1:0] rep_mask, rep_val;   // registered spare-bit lookup

  assign sig       = s;
  assign flt_ready = mode || (cur_syn == '0);

  // ---- CTR: bit address of the next syndrome bit -------------------------
  logic [BW-1:0] c;
  always_comb begin
    c = '0;
    for (int b = WIDTH-1; b >= 0; b--) if (cur_syn[b]) c = BW'(b);
  end

  // ---- comparators against the faulty cell --------------------------------
  logic          covered, rhit, rfree, chit, cfree;
  logic [KW-1:0]  ri;
  logic [LW-1:0]  cj;
  always_comb begin
    covered = (s.rae && s.rra == cur_fa) || (s.cae && s.cra == c);
    rhit = 1'b0; rfree = 1'b0; ri = '0;
    for (int i = K-1; i >= 0; i--) if (!s.rar_v[i]) begin rfree = 1'b1; ri = ($bits(ri))'(i); end
    for (int i = K-1; i >= 0; i--) if (s.rar_v[i] && s.rar[i] == cur_fa) begin rhit = 1'b1; ri = ($bits(ri))'(i); end
    chit = 1'b0; cfree = 1'b0; cj = '0;
    for (int j = L-1; j >= 0; j--) if (!s.car_v[j]) begin cfree = 1'b1; cj = ($bits(cj))'(j); end
    for (int j = L-1; j >= 0; j--) if (s.car_v[j] && s.car[j] == c) begin chit = 1'b1; cj = ($bits(cj))'(j); end
  end

  logic row_ok, col_ok, use_bitmap, use_row, use_col;
  always_comb begin
    row_ok     = rhit || rfree;
    col_ok     = chit || cfree;
    use_bitmap = row_ok && col_ok;
    use_row    = 1'b0;
    use_col    = 1'b0;
    if (!use_bitmap) begin
      if (!row_ok) begin
        use_row = !s.rae;
        use_col = s.rae && !s.cae;
      end else begin
        use_col = !s.cae;
        use_row = s.cae && !s.rae;
      end
    end
  end

  logic analyse;
  assign analyse = !mode && (cur_syn != '0);

  // ---- normal-mode row / column hits --------------------------------------
  logic [K-1:0] rah_w, rah_r;
  logic [L-1:0] cah;
  always_comb begin
    for (int i = 0; i < K; i++) begin
      rah_w[i] = s.rar_v[i] && s.rar[i] == wr_addr;
      rah_r[i] = s.rar_v[i] && s.rar[i] == rd_addr;
    end
    for (int j = 0; j < L; j++) cah[j] = s.car_v[j];
  end

  // ---- registers -----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (reset || clear) begin
      s       <= '0;
      rep     <= 1'b1;
      cur_fa  <= '0;
      cur_syn <= '0;
      for (int i = 0; i < K; i++) for (int j = 0; j < L; j++) bits[i][j] <= 1'b0;
    end else if (sig_load) begin
      s       <= sig_in;
      rep     <= 1'b1;
      cur_syn <= '0;
    end else if (analyse) begin
      cur_syn <= cur_syn & (cur_syn - WIDTH'(1));
      if (!covered) begin
        if (use_bitmap) begin
          s.rar_v[ri] <= 1'b1;
          s.rar[ri]   <= cur_fa;
          s.car_v[cj] <= 1'b1;
          s.car[cj]   <= c;
          bits[ri][cj] <= 1'b1;
        end else if (use_row) begin
          s.rae <= 1'b1;
          s.rra <= cur_fa;
          if (rhit) begin
            s.rar_v[ri] <= 1'b0;
            for (int j = 0; j < L; j++) bits[ri][j] <= 1'b0;
          end
        end else if (use_col) begin
          s.cae <= 1'b1;
          s.cra <= c;
          if (chit) begin
            s.car_v[cj] <= 1'b0;
            for (int i = 0; i < K; i++) bits[i][cj] <= 1'b0;
          end
        end else begin
          rep <= 1'b0;
        end
      end
    end else if (!mode && flt_valid && flt_ready) begin
      cur_fa  <= fa;
      cur_syn <= syn;
    end else if (mode && wr_en) begin
      for (int i = 0; i < K; i++)
        for (int j = 0; j < L; j++)
          if (rah_w[i] && cah[j]) bits[i][j] <= din[s.car[j]];
    end
  end

  // Spare-bit lookup for reads, registered to line up with the RAM output.
  always_ff @(posedge clk) begin
    if (reset) begin
      rep_mask <= '0;
      rep_val  <= '0;
    end else if (rd_en) begin
      rep_mask <= '0;
      rep_val  <= '0;
      if (mode)
        for (int i = 0; i < K; i++)
          for (int j = 0; j < L; j++)
            if (rah_r[i] && cah[j]) begin
              rep_mask[s.car[j]] <= 1'b1;
              rep_val[s.car[j]]  <= bits[i][j];
            end
    end
  end

  assign q = (ram_q & ~rep_mask) | (rep_val & rep_mask);

  // A report can only be accepted while the CTR is idle.
  assert property (@(posedge clk) disable iff (reset) (!mode && flt_valid && flt_ready) |-> cur_syn == '0);
endmodule

// bisr_pkg: constants and types shared by the built-in self-repair (BISR) design.
//
// The RAM is the 8 x 8 bit-oriented array with one spare row and one spare
// column used throughout the design (one 8-bit word per row, so a column is a
// bit position of the word). The local bitmap of the redundancy analyser holds
// BM_K row entries and BM_L column entries; its size is this design's choice.
// The repair signature groups everything needed to restore a repair: the
// spare-row and spare-column repair registers (RRA/RAE, CRA/CAE) and the
// address entries of the bitmap, whose cells serve as spare bits.
package bisr_pkg;

  localparam int ROWS       = 8;                // words (rows) of the RAM
  localparam int WIDTH      = 8;                // bits per word (columns)
  localparam int AW         = $clog2(ROWS);     // row (word) address width
  localparam int BW         = $clog2(WIDTH);    // bit (column) address width
  localparam int BM_K       = 2;                // bitmap row entries
  localparam int BM_L       = 2;                // bitmap column entries
  localparam int FUSE_WORDS = 8;                // fuse register words

  // Repair signature: spare row, spare column and bitmap address entries.
  typedef struct packed {
    logic                    rae;    // row address enable
    logic [AW-1:0]           rra;    // row repair address
    logic                    cae;    // column address enable
    logic [BW-1:0]           cra;    // column repair address
    logic [BM_K-1:0]         rar_v;  // bitmap row entry valid
    logic [BM_K-1:0][AW-1:0] rar;    // bitmap row addresses
    logic [BM_L-1:0]         car_v;  // bitmap column entry valid
    logic [BM_L-1:0][BW-1:0] car;    // bitmap column (bit) addresses
  } repair_sig_t;

  // Words of the fuse register that hold the signature (packed 8 bits each).
  localparam int SIG_WORDS = 3;

  // Packing into fuse words: word 0 = {RAE, RRA, CAE, CRA};
  // word 1 = row entries {valid, address}, entry 0 in the low nibble;
  // word 2 = column entries, same layout.
  function automatic logic [SIG_WORDS-1:0][WIDTH-1:0] sig_pack(repair_sig_t s);
    logic [SIG_WORDS-1:0][WIDTH-1:0] w;
    w = '0;
    w[0] = {s.rae, s.rra, s.cae, s.cra};
    for (int i = 0; i < BM_K; i++) w[1][i*(AW+1) +: AW+1] = {s.rar_v[i], s.rar[i]};
    for (int j = 0; j < BM_L; j++) w[2][j*(BW+1) +: BW+1] = {s.car_v[j], s.car[j]};
    return w;
  endfunction

  function automatic repair_sig_t sig_unpack(logic [SIG_WORDS-1:0][WIDTH-1:0] w);
    repair_sig_t s;
    {s.rae, s.rra, s.cae, s.cra} = w[0];
    for (int i = 0; i < BM_K; i++) {s.rar_v[i], s.rar[i]} = w[1][i*(AW+1) +: AW+1];
    for (int j = 0; j < BM_L; j++) {s.car_v[j], s.car[j]} = w[2][j*(BW+1) +: BW+1];
    return s;
  endfunction

  // Phases of the test-and-repair flow.
  typedef enum logic [3:0] {
    FLOW_IDLE, FLOW_CLEAR, FLOW_UNREPAIR, FLOW_TEST_GO, FLOW_TEST, FLOW_DRAIN,
    FLOW_LOAD, FLOW_RETEST_GO, FLOW_RETEST, FLOW_PROG_GO, FLOW_PROG,
    FLOW_DONE, FLOW_FAIL
  } flow_state_t;

  // March elements of the BIST.
  typedef enum logic [2:0] {
    BIST_IDLE, BIST_WRITE, BIST_RD_ISSUE, BIST_RD_CHECK, BIST_REPORT, BIST_DONE
  } bist_state_t;

endpackage

// bisr_top: RAM with built-in self-repair. It tests its own array, decides
// how to use its redundancy, repairs itself and keeps the repair in fuses.
//
// Redundancy comes in three kinds: one spare row and one spare column in the
// RAM, and the cells of the analyser's local bitmap, which hold the fault
// addresses during the test and act as spare bits afterwards.
//
// A start pulse runs the flow in bisr_ctrl. The BIST marches over the raw
// RAM, and the BIRA (analyser) allocates each faulty cell to a bitmap cell,
// the spare row or the spare column. The repair is then loaded into the
// repair registers. The BIST checks the repaired RAM again, and the fuse
// controller programs the signature into the e-fuse box. The fuse register
// carries the signature between the fuse box, the repair registers
// (RRA/RAE/CRA/CAE) and the analyser. After every reset
// the fuse macro restores the signature from the fuses; with POR_START = 1
// the flow then also runs by itself, as a power-on self-repair. The repair registers
// steer the RAM's row and column multiplexers through the two decoders, and
// the bitmap addresses go back to the analyser. A programmed part therefore
// comes up repaired without a new test.
//
// Functional port: write with wr_en/write_address/wr_data, read with
// rd_en/read_address; read_data is valid one clock after rd_en. The port is
// ignored while busy is high (the BIST owns the RAM then). row_address,
// col_address, row_en and col_en show the repair registers (RRA, CRA, RAE,
// CAE). fault_en/fault_addr/fault_data make RAM cells stuck-at-0 for
// simulation. The fuse_* port reads and writes the fuse register directly.
// The structure (BIST, BIRA, fuse macro, RRA/CRA/RAE/CAE repair registers,
// the repairable RAM) and most port names follow the paper; write_address,
// the status outputs and the fuse_* port are this design's additions.
module bisr_top #(
  parameter bit POR_START = 1'b0,   // run the flow after every reset as well
  parameter int ROWS  = bisr_pkg::ROWS,
  parameter int WIDTH = bisr_pkg::WIDTH,
  localparam int AW   = $clog2(ROWS),
  localparam int BW   = $clog2(WIDTH),
  localparam int FAW  = $clog2(bisr_pkg::FUSE_WORDS)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  // functional RAM port
  input  logic             wr_en,
  input  logic [AW-1:0]    write_address,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    read_address,
  output logic [WIDTH-1:0] read_data,
  // fault injection
  input  logic             fault_en,
  input  logic [AW-1:0]    fault_addr,
  input  logic [WIDTH-1:0] fault_data,
  // repair registers
  output logic [AW-1:0]    row_address,
  output logic [BW-1:0]    col_address,
  output logic             row_en,
  output logic             col_en,
  // fuse register access
  input  logic [FAW-1:0]   fuse_addr,
  input  logic             fuse_wr_en,
  input  logic [WIDTH-1:0] fuse_wr_data,
  input  logic             fuse_rd_en,
  output logic [WIDTH-1:0] fuse_read_data,
  // flow status
  output logic             busy,
  output logic             done,
  output logic             repaired_ok,
  output logic             unrepairable,
  output logic             retest_fail
);
  // BIST
  logic             bist_start, bist_done, bist_fail;
  logic             bist_wr, bist_rd;
  logic [AW-1:0]    bist_addr, fa;
  logic [WIDTH-1:0] bist_wdata, syn;
  logic             flt_valid, flt_ready;
  // BIRA
  logic             bira_clear, bira_mode, bira_rep;
  bisr_pkg::repair_sig_t bira_sig, fuse_sig;
  // fuse macro
  logic             fuse_sig_load, prog_start, prog_done, prog_ok, restoring, restore_done, sig_loaded;
  logic [AW-1:0]    f_rra;
  logic [BW-1:0]    f_cra;
  logic             f_rae, f_cae;
  // RAM side
  logic             m_wr, m_rd;
  logic [AW-1:0]    m_waddr, m_raddr;
  logic [WIDTH-1:0] m_wdata, ram_q, merged_q;
  logic [ROWS-1:0]  repair_row_en;
  logic [WIDTH-1:0] repair_col_en;
  // The flow state is not a port; it is kept here for waveform viewing and
  // hierarchical probing, so lint reports it as unused.
  bisr_pkg::flow_state_t flow_state;

  bisr_ctrl #(.POR_START(POR_START)) u_ctrl (
    .clk, .reset, .start, .ready(!restoring),
    .bist_start, .bist_done, .bist_fail,
    .bira_clear, .bira_mode, .bira_idle(flt_ready), .bira_rep,
    .fuse_sig_load, .fuse_prog_start(prog_start), .fuse_prog_done(prog_done),
    .fuse_prog_ok(prog_ok),
    .state(flow_state), .busy, .done, .repaired_ok, .unrepairable, .retest_fail
  );

  bist #(.ROWS(ROWS), .WIDTH(WIDTH)) u_bist (
    .clk, .reset, .start(bist_start),
    .wr_en(bist_wr), .rd_en(bist_rd), .addr(bist_addr), .wdata(bist_wdata),
    .rdata(merged_q),
    .flt_valid, .flt_ready, .fa, .syn,
.lfsr_done(bist_done), .fail(bist_fail)
  );

  // RAM access belongs to the BIST while the flow runs.
  always_comb begin
    if (busy) begin
      m_wr = bist_wr;  m_waddr = bist_addr;  m_wdata = bist_wdata;
      m_rd = bist_rd;  m_raddr = bist_addr;
    end else begin
      m_wr = wr_en;    m_waddr = write_address; m_wdata = wr_data;
      m_rd = rd_en;    m_raddr = read_address;
    end
  end

  bira #(.ROWS(ROWS), .WIDTH(WIDTH)) u_bira (
    .clk, .reset, .mode(bira_mode), .clear(bira_clear),
    .flt_valid, .flt_ready, .fa, .syn, .rep(bira_rep),
    .sig(bira_sig), .sig_load(restore_done), .sig_in(fuse_sig),
    .wr_en(m_wr), .wr_addr(m_waddr), .din(m_wdata),
    .rd_en(m_rd), .rd_addr(m_raddr), .ram_q, .q(merged_q)
  );

  fuse_macro u_fuse (
    .clk, .reset,
    .addr(fuse_addr), .wr_en(fuse_wr_en), .wr_data(fuse_wr_data),
    .rd_en(fuse_rd_en), .read_data(fuse_read_data),
    .sig_load(fuse_sig_load), .sig_in(bira_sig), .sig_out(fuse_sig),
    .prog_start, .prog_done, .prog_ok, .restoring, .restore_done, .sig_loaded,
    .row_addr(f_rra), .col_addr(f_cra), .row_en(f_rae), .col_en(f_cae)
  );

  // Repair registers, loaded from the fuse register after a restore or a
  // signature load.
  repair_regs #(.AW(AW), .BW(BW)) u_repair_regs (
    .clk, .reset, .load(restore_done || sig_loaded),
    .rra_in(f_rra), .rae_in(f_rae), .cra_in(f_cra), .cae_in(f_cae),
    .rra(row_address), .rae(row_en), .cra(col_address), .cae(col_en)
  );

  repair_decoder #(.AW(AW)) u_rra_dec (.addr(row_address), .en(row_en), .decoder_out(repair_row_en));
  repair_decoder #(.AW(BW)) u_rca_dec (.addr(col_address), .en(col_en), .decoder_out(repair_col_en));

  repairable_ram #(.ROWS(ROWS), .WIDTH(WIDTH)) u_ram (
    .clk, .reset,
    .wr_en(m_wr), .row_address(m_waddr), .w_data(m_wdata),
    .rd_en(m_rd), .read_addr(m_raddr), .r_data(ram_q),
    .repair_row_en, .repair_col_en,
    .fault_en, .fault_addr, .fault_data
  );

  assign read_data = merged_q;
endmodule

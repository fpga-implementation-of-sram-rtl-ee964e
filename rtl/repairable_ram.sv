// repairable_ram: ROWS x WIDTH bit-oriented RAM with one spare row and one
// spare column, repaired by row and column multiplexers.
//
// The physical array has ROWS+1 rows and WIDTH+1 columns; the extra row and
// column are the spares. repair_row_en is the one-hot decoded row repair
// address (all zeros when no row is repaired): the row multiplexer sends
// every access to that row to the spare row instead, so the defective row is
// skipped while all other rows keep their place. repair_col_en does the same
// for one column (bit position of the word): that bit is written to and read
// from the spare column. Keeping every other cell in place means that fault
// addresses logged before the repair stay valid after it, which the spare
// bits of the redundancy analyser rely on. Writes use row_address, reads read_addr, so one
// write and one read can happen in the same cycle; a read returns the stored
// word on r_data one clock after rd_en (reading before a same-cycle write).
//
// For simulation of repair, cells can be made defective: a pulse on fault_en
// marks the cells set in fault_data of physical row fault_addr as stuck-at-0.
// The masks are cleared by reset; spare cells are never defective. The
// multiplexer repair, the port names and the 8 x 8 size with one spare row and
// column follow the paper; the stuck-at-0 fault model, synchronous read
// and separate read and write addresses are this design's choices.
module repairable_ram #(
  parameter int ROWS  = bisr_pkg::ROWS,
  parameter int WIDTH = bisr_pkg::WIDTH,
  localparam int AW   = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             reset,
  // write port
  input  logic             wr_en,
  input  logic [AW-1:0]    row_address,
  input  logic [WIDTH-1:0] w_data,
  // read port
  input  logic             rd_en,
  input  logic [AW-1:0]    read_addr,
  output logic [WIDTH-1:0] r_data,
  // decoded repair registers
  input  logic [ROWS-1:0]  repair_row_en,
  input  logic [WIDTH-1:0] repair_col_en,
  // fault injection
  input  logic             fault_en,
  input  logic [AW-1:0]    fault_addr,
  input  logic [WIDTH-1:0] fault_data
);
  logic [WIDTH:0] mem    [ROWS+1];   // main array plus spare row / column
  logic [WIDTH:0] fmask  [ROWS];     // stuck-at-0 cells of the main rows

  // Row multiplexer: the repaired row is redirected to the spare row.
  function automatic logic [AW:0] phys_row(logic [AW-1:0] a, logic [ROWS-1:0] rep);
    return rep[a] ? (AW+1)'(ROWS) : {1'b0, a};
  endfunction

  // Column multiplexers: the repaired bit is also written to the spare
  // column, and read from it.
  logic [WIDTH:0] w_phys;
  always_comb w_phys = {|(w_data & repair_col_en), w_data};

  // Cell contents as read, including stuck-at-0 defects.
  logic [AW:0]    rrow;
  logic [WIDTH:0] r_cells;
  always_comb begin
    rrow    = phys_row(read_addr, repair_row_en);
    r_cells = mem[rrow];
    if (rrow < (AW+1)'(ROWS)) r_cells = r_cells & ~fmask[rrow[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[phys_row(row_address, repair_row_en)] <= w_phys;
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      for (int b = 0; b < WIDTH; b++) r_data[b] <= repair_col_en[b] ? r_cells[WIDTH] : r_cells[b];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < ROWS; i++) fmask[i] <= '0;
    end else if (fault_en) begin
      fmask[fault_addr] <= fmask[fault_addr] | {1'b0, fault_data};
    end
  end
endmodule

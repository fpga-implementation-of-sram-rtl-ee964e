// efuse_box: behavioural model of the electrically programmable fuse array
// that keeps the repair signature while power is off.
//
// This is a behavioural model of a process macro, not logic to synthesize as
// is. It holds WORDS words of WIDTH fuses. Every fuse of a fresh part is
// unblown (reads 0); a clock edge with prog high blows the fuses set in
// prog_data in word prog_addr, and a blown fuse stays 1. Nothing clears the
// array, so its contents survive reset. rd_data shows word rd_addr without a
// clock. The one-time programmable behaviour follows the paper's e-fuse;
// the word organisation matches the fuse register it feeds.
module efuse_box #(
  parameter int WORDS = bisr_pkg::FUSE_WORDS,
  parameter int WIDTH = bisr_pkg::WIDTH,
  localparam int FAW  = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             prog,
  input  logic [FAW-1:0]   prog_addr,
  input  logic [WIDTH-1:0] prog_data,
  input  logic [FAW-1:0]   rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] fuse [WORDS];

  initial for (int i = 0; i < WORDS; i++) fuse[i] = '0;

  always @(posedge clk)
    if (prog) fuse[prog_addr] <= fuse[prog_addr] | prog_data;

  assign rd_data = fuse[rd_addr];
endmodule

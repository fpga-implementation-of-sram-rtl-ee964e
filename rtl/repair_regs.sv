// repair_regs: the repair registers of the RAM: row repair address (RRA),
// row address enable (RAE), column repair address (CRA) and column address
// enable (CAE). They hold the controls of the RAM's row and column
// multiplexers (through the repair decoders).
//
// The fuse register is only the transport between the fuse box and these
// registers: a one-clock load pulse copies its repair fields in. Reset
// clears both enables, so the RAM runs unrepaired until the first load.
// The outputs change on the clock edge that samples load. The four
// registers and their role follow the paper; the load pulse is this
// design's choice.
module repair_regs #(
  parameter int AW = bisr_pkg::AW,
  parameter int BW = bisr_pkg::BW
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          load,
  input  logic [AW-1:0] rra_in,
  input  logic          rae_in,
  input  logic [BW-1:0] cra_in,
  input  logic          cae_in,
  output logic [AW-1:0] rra,
  output logic          rae,
  output logic [BW-1:0] cra,
  output logic          cae
);
  always_ff @(posedge clk) begin
    if (reset) begin
      rra <= '0;
      rae <= 1'b0;
      cra <= '0;
      cae <= 1'b0;
    end else if (load) begin
      rra <= rra_in;
      rae <= rae_in;
      cra <= cra_in;
      cae <= cae_in;
    end
  end
endmodule

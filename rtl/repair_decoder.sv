// repair_decoder: turns a repair address and its enable into one-hot
// multiplexer controls for the repairable RAM.
//
// One instance decodes the row repair address (RRA, enabled by RAE) and one
// the column repair address (CRA, enabled by CAE). decoder_out has the bit of
// the defective row or column set, and is all zeros when the enable is low,
// so no repair is applied. Purely combinational.
module repair_decoder #(
  parameter int AW = 3,
  localparam int N = 1 << AW
) (
  input  logic [AW-1:0] addr,
  input  logic          en,
  output logic [N-1:0]  decoder_out
);
  always_comb begin
    decoder_out = '0;
    if (en) decoder_out[addr] = 1'b1;
  end
endmodule

// bist_lfsr: address generator of the BIST, an AW-bit linear feedback shift
// register extended to visit all 2^AW addresses.
//
// A Fibonacci LFSR shifting left, with feedback polynomial x^3 + x^2 + 1 for
// the default AW = 3, is modified in the usual de Bruijn way: the feedback is
// inverted when all bits but the top one are zero, which inserts the all-zero
// state. The sequence for AW = 3 is 0,1,2,5,3,7,6,4 and then repeats. The
// state is 0 after reset and after start; it advances every clock while done
// is low and holds while done is high. last is high in the final state of the
// sequence (1 followed by zeros). The 3-bit output and the port names are
// the paper's; the polynomial and the all-zero extension are this design's.
module bist_lfsr #(
  parameter int AW = 3
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  input  logic          done,
  output logic [AW-1:0] lfsr_out,
  output logic          last
);
  // Tap masks of maximal-length polynomials (bit AW-1 is the x^AW term).
  function automatic logic [AW-1:0] taps();
    case (AW)
      2:       return AW'('b11);
      3:       return AW'('b110);
      4:       return AW'('b1100);
      5:       return AW'('b10100);
      6:       return AW'('b110000);
      7:       return AW'('b1100000);
      default: return AW'('b10111000);
    endcase
  endfunction

  logic fb;
  always_comb begin
    fb   = (^(lfsr_out & taps())) ^ (lfsr_out[AW-2:0] == '0);
    last = (lfsr_out == {1'b1, {(AW-1){1'b0}}});
  end

  always_ff @(posedge clk) begin
    if (reset || start) lfsr_out <= '0;
    else if (!done)     lfsr_out <= {lfsr_out[AW-2:0], fb};
  end
endmodule

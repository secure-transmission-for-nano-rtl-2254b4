// osml_bit: one-step majority-logic decision for a single code bit.
//
// For bit BIT it forms the four parity-check sums orthogonal on that bit
// (each a 4-input XOR) and feeds them to a 4-input majority gate; when the
// majority of the checks fail, the bit is wrong and is inverted. The sets for
// bit 14 are the document's; for bit j they are the same sets rotated by j+1
// positions, which is valid because the code is cyclic.
// Interface: cw in; checks, flip and the corrected bit_out. Combinational.
module osml_bit
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned BIT = 14
) (
  input  codeword_t  cw,
  output logic [3:0] checks,
  output logic       flip,
  output logic       bit_out
);

  always_comb begin
    for (int s = 0; s < J; s++) begin
      checks[s] = 1'b0;
      for (int m = 0; m < J; m++) checks[s] ^= cw[modn(ORTH14[s][m] + BIT + 1)];
    end
  end

  majority_gate u_maj (.in_bits(checks), .sorted(), .maj(flip));

  assign bit_out = cw[BIT] ^ flip;

endmodule

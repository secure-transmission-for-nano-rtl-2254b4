// eg_encoder: systematic encoder for the (15,7,5) EG-LDPC code.
//
// The codeword is the 7 information bits (C0..C6) followed by 8 parity bits
// (C7..C14); each parity bit is the XOR of the information bits whose row of
// the generator matrix G=[I:X] has a 1 in that column. The systematic
// structure is the document's; X (in eg_ldpc_pkg) is the parity part of the
// systematic generator matrix implied by the parity-check matrix.
// Interface: info in, cw out. Purely combinational; its output is watched by
// an fsd_detector, and on a flagged word the encoding is repeated.
module eg_encoder
  import eg_ldpc_pkg::*;
(
  input  info_t     info,
  output codeword_t cw
);

  logic [R-1:0] parity;

  always_comb begin
    for (int p = 0; p < R; p++) begin
      parity[p] = 1'b0;
      for (int i = 0; i < K; i++) parity[p] ^= info[i] & XROW[i][p];
    end
  end

  assign cw = {parity, info};

endmodule

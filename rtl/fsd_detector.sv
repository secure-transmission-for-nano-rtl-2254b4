// fsd_detector: fault-secure detector for the (15,7,5) EG-LDPC code.
//
// Each syndrome bit S_j is the XOR of the four codeword bits on parity row j
// (C_j, C_j+8, C_j+9, C_j+11, indices mod 15), and the error flag is the OR of
// all 15 syndrome bits. Because every error pattern of up to 4 bits, whether it
// sits in the checked word or in the XOR gates themselves, gives a non-zero
// syndrome, the detector stays fault secure; only the final OR has to be built
// in reliable logic. Structure and row pattern are the document's.
// Interface: cw in, syndrome and err out. Purely combinational.
module fsd_detector
  import eg_ldpc_pkg::*;
(
  input  codeword_t cw,
  output codeword_t syndrome,
  output logic      err
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      syndrome[j] = 1'b0;
      for (int m = 0; m < J; m++) syndrome[j] ^= cw[modn(j + HROW_OFS[m])];
    end
  end

  assign err = |syndrome;

endmodule

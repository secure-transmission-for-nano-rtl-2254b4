// parallel_corrector: parallel, pipelined one-step majority-logic corrector.
//
// Fifteen osml_bit circuits, one per code bit, correct all bits of a word at
// once; a register on the output makes it a pipeline stage that delivers one
// corrected word per cycle. Up to two bit errors per word are repaired.
// Copying the single-bit corrector is the document's idea; the single output
// register is this design's choice.
// Interface: cw_in is sampled when en is high; cw_out follows one cycle later
// and holds while en is low.
module parallel_corrector
  import eg_ldpc_pkg::*;
(
  input  logic      clk,
  input  logic      en,
  input  codeword_t cw_in,
  output codeword_t cw_out
);

  codeword_t fixed;

  for (genvar b = 0; b < N; b++) begin : g_bit
    osml_bit #(.BIT(b)) u_bit (.cw(cw_in), .checks(), .flip(), .bit_out(fixed[b]));
  end

  always_ff @(posedge clk) if (en) cw_out <= fixed;

endmodule

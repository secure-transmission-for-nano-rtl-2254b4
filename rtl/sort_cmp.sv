// sort_cmp: one 2-bit comparator of a binary sorting network.
// The larger bit (OR) goes to hi and the smaller (AND) to lo, two 2-input
// gates as in the document's comparator. Combinational.
module sort_cmp (
  input  logic a,
  input  logic b,
  output logic hi,
  output logic lo
);
  assign hi = a | b;
  assign lo = a & b;
endmodule

// majority_gate: 4-input majority built from a binary sorting network.
//
// Five sort_cmp comparators, in the order (0,1) (2,3) (0,2) (1,3) (1,2), sort
// the four input bits so that sorted[0] >= sorted[1] >= sorted[2] >= sorted[3].
// sorted[k] is then 1 exactly when at least k+1 inputs are 1, so the majority
// (more than half, at least 3 of 4) is sorted[2]. The sorting-network idea and
// the five comparators of ten gates are the document's; the comparator order
// and the tie rule (2 of 4 is not a majority, so a bit is not flipped when
// only two checks fail) are this design's reading.
// Interface: in_bits in, sorted and maj out. Combinational.
module majority_gate (
  input  logic [3:0] in_bits,
  output logic [3:0] sorted,
  output logic       maj
);

  logic a1, b1, c1, d1;  // after stage 1
  logic a2, b2, c2, d2;  // after stage 2

  sort_cmp u_c01 (.a(in_bits[0]), .b(in_bits[1]), .hi(a1), .lo(b1));
  sort_cmp u_c23 (.a(in_bits[2]), .b(in_bits[3]), .hi(c1), .lo(d1));
  sort_cmp u_c02 (.a(a1), .b(c1), .hi(a2), .lo(c2));
  sort_cmp u_c13 (.a(b1), .b(d1), .hi(b2), .lo(d2));
  sort_cmp u_c12 (.a(b2), .b(c2), .hi(sorted[1]), .lo(sorted[2]));

  assign sorted[0] = a2;
  assign sorted[3] = d2;
  assign maj       = sorted[2];

endmodule

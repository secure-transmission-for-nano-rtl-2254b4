// tb_majority_gate: exhaustive check of the sorting-network majority gate.
// For all 16 inputs the sorted output must hold the inputs' ones at the top
// and maj must be 1 exactly when at least 3 inputs are 1.
// The sorting-network majority gate is the document's; the 3-of-4
// threshold follows from correcting two errors with four checks.
module tb_majority_gate;
  logic [3:0] in_bits, sorted;
  logic       maj;
  int checks = 0, failures = 0;

  majority_gate dut (.in_bits(in_bits), .sorted(sorted), .maj(maj));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones;
      logic [3:0] exp_sorted;
      ones = $countones(4'(v)); exp_sorted = '0;
      for (int k = 0; k < ones; k++) exp_sorted[k] = 1'b1;
      in_bits = 4'(v); #1;
      checks++; if (sorted !== exp_sorted) begin failures++; $display("FAIL sort %b -> %b", in_bits, sorted); end
      checks++; if (maj !== (ones >= 3)) begin failures++; $display("FAIL maj %b -> %b", in_bits, maj); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

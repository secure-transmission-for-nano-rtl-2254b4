// tb_eg_encoder: exhaustive check of the systematic encoder.
// For all 128 information vectors the codeword must equal the XOR of the
// selected literal generator rows, keep the information in C0..C6, and
// satisfy all 15 parity checks (computed here from the row pattern).
// The systematic form G = [I : X] is the document's; the expected rows
// are the unique codewords with one information bit set.
module tb_eg_encoder;
  logic [6:0]  info;
  logic [14:0] cw;
  int checks = 0, failures = 0;

  eg_encoder dut (.info(info), .cw(cw));

  string grow [7] = '{"100000010001011", "010000011001110", "001000001100111",
                      "000100010111000", "000010001011100", "000001000101110",
                      "000000100010111"};

  function automatic logic [14:0] row_vec(input string s);
    logic [14:0] v;
    for (int b = 0; b < 15; b++) v[b] = (s[b] == "1");
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      logic [14:0] exp;
      logic        par;
      exp = '0; par = 1'b0;
      for (int r = 0; r < 7; r++) if (i[r]) exp ^= row_vec(grow[r]);
      info = 7'(i); #1;
      checks++; if (cw !== exp) begin failures++; $display("FAIL info %0d got %b exp %b", i, cw, exp); end
      checks++; if (cw[6:0] !== 7'(i)) failures++;
      for (int j = 0; j < 15; j++) par |= cw[j] ^ cw[(j+8)%15] ^ cw[(j+9)%15] ^ cw[(j+11)%15];
      checks++; if (par) begin failures++; $display("FAIL info %0d parity", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

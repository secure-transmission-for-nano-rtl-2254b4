// tb_osml_bit: checks the one-step majority-logic decision for bit 14 (the
// position drawn with explicit check sets) and bit 5 (a rotated copy).
// For every codeword and every error pattern of weight up to 2 the corrected
// bit must equal the bit of the error-free codeword; for bit 14 the four
// check sums are also compared with the literal sets.
// The check sets for bit 14 are the document's; the rotation to other bits
// follows from the code being cyclic.
module tb_osml_bit;
  logic [14:0] cw;
  logic [3:0]  chk14, chk5;
  logic        flip14, flip5, b14, b5;
  int checks = 0, failures = 0;

  osml_bit #(.BIT(14)) dut14 (.cw(cw), .checks(chk14), .flip(flip14), .bit_out(b14));
  osml_bit #(.BIT(5))  dut5  (.cw(cw), .checks(chk5),  .flip(flip5),  .bit_out(b5));

  string grow [7] = '{"100000010001011", "010000011001110", "001000001100111",
                      "000100010111000", "000010001011100", "000001000101110",
                      "000000100010111"};

  function automatic logic [14:0] cw_of(input int info);
    logic [14:0] c = '0;
    for (int r = 0; r < 7; r++)
      if (info[r]) for (int b = 0; b < 15; b++) c[b] ^= (grow[r][b] == "1");
    return c;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      logic [14:0] c;
      c = cw_of(i);
      for (int a = -1; a < 15; a++)
        for (int b = a; b < 15; b++) begin
          logic [14:0] e;
          logic [3:0]  exp;
          e = '0;
          if (a >= 0) e[a] = 1'b1;
          if (b >= 0) e[b] = 1'b1;
          cw = c ^ e; #1;
          exp = {cw[7]^cw[8]^cw[10]^cw[14], cw[0]^cw[2]^cw[6]^cw[14],
                 cw[1]^cw[5]^cw[13]^cw[14], cw[3]^cw[11]^cw[12]^cw[14]};
          checks++; if (b14 !== c[14]) begin failures++; if (failures < 10) $display("FAIL b14 info %0d e %b", i, e); end
          checks++; if (b5 !== c[5])   begin failures++; if (failures < 10) $display("FAIL b5 info %0d e %b", i, e); end
          checks++; if (chk14 !== exp) begin failures++; if (failures < 10) $display("FAIL checks %b exp %b", chk14, exp); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

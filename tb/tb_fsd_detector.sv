// tb_fsd_detector: exhaustive check of the fault-secure detector.
// Every one of the 128 codewords (built here from literal generator rows)
// must pass, and every error pattern of weight 1..4 added to a codeword must
// be flagged, since the code's minimum distance is 5. The syndrome is also
// compared with one computed here from the parity-check row pattern.
// The detector structure and the distance-5 property are the document's;
// the choice of test patterns is this testbench's.
module tb_fsd_detector;
  logic [14:0] cw, syn;
  logic        err;
  int checks = 0, failures = 0;

  fsd_detector dut (.cw(cw), .syndrome(syn), .err(err));

  // Generator rows, C0 first (leftmost character).
  string grow [7] = '{"100000010001011", "010000011001110", "001000001100111",
                      "000100010111000", "000010001011100", "000001000101110",
                      "000000100010111"};

  function automatic logic [14:0] row_vec(input string s);
    logic [14:0] v;
    for (int b = 0; b < 15; b++) v[b] = (s[b] == "1");
    return v;
  endfunction

  function automatic logic [14:0] cw_of(input int info);
    logic [14:0] c = '0;
    for (int r = 0; r < 7; r++) if (info[r]) c ^= row_vec(grow[r]);
    return c;
  endfunction

  function automatic logic [14:0] my_syn(input logic [14:0] c);
    logic [14:0] s;
    for (int j = 0; j < 15; j++)
      s[j] = c[j] ^ c[(j+8)%15] ^ c[(j+9)%15] ^ c[(j+11)%15];
    return s;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      logic [14:0] c;
      c = cw_of(i);
      cw = c; #1;
      checks++; if (err !== 1'b0 || syn !== '0) begin failures++; $display("FAIL codeword %0d flagged", i); end
      for (int e = 1; e < (1 << 15); e++) begin
        if ($countones(e) > 4) continue;
        if ($countones(e) > 2 && (e % 7) != (i % 7)) continue;  // sample weights 3 and 4
        cw = c ^ 15'(e); #1;
        checks++;
        if (err !== 1'b1 || syn !== my_syn(c ^ 15'(e))) begin
          failures++;
          if (failures < 10) $display("FAIL info %0d err pattern %h err=%b", i, e, err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

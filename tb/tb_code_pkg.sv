// tb_code_pkg: reference model of the (15,7,5) EG-LDPC code for testbenches,
// written independently of the RTL package: literal generator rows (C0 is the
// leftmost character) and the parity-check row pattern j, j+8, j+9, j+11.
// The code, its systematic generator form and the parity-check row pattern
// are the document's; each generator row is the unique codeword with its
// information part. Function names and bit-order conventions are this
// design's.
package tb_code_pkg;
  localparam string GROW [7] = '{"100000010001011", "010000011001110", "001000001100111",
                                 "000100010111000", "000010001011100", "000001000101110",
                                 "000000100010111"};

  function automatic logic [14:0] cw_of(input logic [6:0] info);
    logic [14:0] c;
    c = '0;
    for (int r = 0; r < 7; r++)
      if (info[r]) for (int b = 0; b < 15; b++) c[b] ^= (GROW[r][b] == "1");
    return c;
  endfunction

  function automatic logic [14:0] syn_of(input logic [14:0] c);
    logic [14:0] s;
    for (int j = 0; j < 15; j++)
      s[j] = c[j] ^ c[(j+8)%15] ^ c[(j+9)%15] ^ c[(j+11)%15];
    return s;
  endfunction

  // Random error pattern with exactly w ones.
  function automatic logic [14:0] rand_err(input int w);
    logic [14:0] e;
    e = '0;
    while ($countones(e) < w) e[$urandom_range(14, 0)] = 1'b1;
    return e;
  endfunction
endpackage

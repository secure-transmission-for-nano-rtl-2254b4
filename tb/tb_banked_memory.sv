// tb_banked_memory: random writes, reads and upsets over 4 banks of 12
// words, compared with a flat shadow array.
// The bank size is not a power of two, so bank and row come from a
// division. Checks that writes reach only the addressed bank, that the read
// mux follows the bank of the registered read address, and that q holds
// while re is low.
// Four banks on a common row address follow the document's banked
// organisation; the address split and the read timing are this design's.
module tb_banked_memory;
  localparam int BANKS = 4, BW = 12, WORDS = BANKS * BW;
  logic        clk = 0, we, re, ue;
  logic [5:0]  waddr, raddr, uaddr;
  logic [14:0] wdata, q, umask;
  logic [14:0] shadow [WORDS];
  logic [14:0] exp_q;
  logic        exp_v;
  int checks = 0, failures = 0;

  banked_memory #(.BANKS(BANKS), .BANK_WORDS(BW), .W(15)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; ue = 0; waddr = 0; raddr = 0; uaddr = 0; wdata = 0; umask = 0; exp_v = 0;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = 15'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    // read back every word once in order
    for (int a = 0; a <= WORDS; a++) begin
      @(negedge clk);
      if (a > 0) begin
        checks++;
        if (q !== shadow[a-1]) begin failures++; $display("FAIL addr %0d q %h exp %h", a - 1, q, shadow[a-1]); end
      end
      re = (a < WORDS); raddr = 6'(a);
    end
    exp_v = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (q !== exp_q) begin failures++; if (failures < 10) $display("FAIL q %h exp %h", q, exp_q); end
      end
      we = $urandom_range(1, 0); waddr = 6'($urandom_range(WORDS - 1, 0)); wdata = 15'($urandom);
      re = $urandom_range(1, 0); raddr = 6'($urandom_range(WORDS - 1, 0));
      ue = ($urandom_range(3, 0) == 0); uaddr = 6'($urandom_range(WORDS - 1, 0)); umask = 15'($urandom);
      if (ue && we && uaddr == waddr) ue = 0;
      if (re) exp_q = shadow[raddr];
      exp_v = exp_v | re;
      if (we) shadow[waddr] = wdata;
      if (ue) shadow[uaddr] ^= umask;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

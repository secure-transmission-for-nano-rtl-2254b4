// tb_mem_bank: random writes, reads and upsets on a small bank, compared
// with a shadow array. A read returns the word stored before the clock edge
// (old data when a write to the same word happens in the same cycle), q holds
// while re is low, and an upset flips exactly the masked bits.
// The document describes only the storage function; the port set and
// read-during-write behaviour checked here are this design's.
module tb_mem_bank;
  localparam int WORDS = 64;
  logic        clk = 0, we, re, ue;
  logic [5:0]  waddr, raddr, uaddr;
  logic [14:0] wdata, q, umask;
  logic [14:0] shadow [WORDS];
  logic [14:0] exp_q;
  logic        exp_v;
  int checks = 0, failures = 0;

  mem_bank #(.WORDS(WORDS), .W(15)) dut (.*);

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
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (q !== exp_q) begin failures++; if (failures < 10) $display("FAIL q %h exp %h", q, exp_q); end
      end
      we = $urandom_range(1, 0); waddr = 6'($urandom); wdata = 15'($urandom);
      re = $urandom_range(1, 0); raddr = 6'($urandom);
      ue = ($urandom_range(3, 0) == 0); uaddr = 6'($urandom); umask = 15'($urandom);
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

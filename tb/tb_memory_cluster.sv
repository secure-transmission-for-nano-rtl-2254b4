// tb_memory_cluster: a cluster of 2 banks x 8 words with the parallel read
// path. Stores codewords, flips 1-2 bits in each, then reads every word:
// each must come back corrected with its tag, 2 cycles after issue. Then
// holds out_ready low: the result must stay offered and rd_ok must drop once
// the pipeline is full; after release every held word arrives in order.
// Clusters of two banks with their own corrector follow the document; the
// issue stage, the handshake and the latency checked are this design's.
module tb_memory_cluster;
  import tb_code_pkg::*;
  localparam int WORDS = 16;
  logic        clk = 0, rst_n = 0;
  logic        we, rd_ok, re, ue, out_valid, out_ready, out_err, ev_retry, ev_corrected;
  logic [3:0]  waddr, raddr, uaddr;
  logic [14:0] wdata, umask, cor_upset, out_cw;
  logic [19:0] rtag, out_tag;
  logic [14:0] golden [WORDS];
  int checks = 0, failures = 0, cycle = 0, n_corr = 0;

  memory_cluster #(.BANKS(2), .BANK_WORDS(8), .TAG_W(20), .MAX_RETRY(3), .SERIAL(1'b0)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;
  always @(posedge clk) if (rst_n) n_corr += int'(ev_corrected);

  typedef struct { int a; int t0; int lat; } exp_t;
  exp_t q[$];

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    exp_t x;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      x = q.pop_front();
      if (out_cw !== golden[x.a] || out_tag !== 20'(x.a) || out_err || (x.lat >= 0 && cycle - x.t0 != x.lat)) begin
        failures++;
        $display("FAIL word %0d got %b exp %b tag %0d lat %0d", x.a, out_cw, golden[x.a], out_tag, cycle - x.t0);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input int a, input int lat);
    @(negedge clk); #1;
    while (!rd_ok) begin @(negedge clk); #1; end
    re = 1; raddr = 4'(a); rtag = 20'(a);
    @(posedge clk);
    q.push_back('{a: a, t0: cycle, lat: lat});
    #1 re = 0;
  endtask

  initial begin
    int held;
    we = 0; re = 0; ue = 0; waddr = '0; raddr = '0; uaddr = '0; wdata = '0; umask = '0;
    cor_upset = '0; rtag = '0; out_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      golden[a] = cw_of(7'($urandom));
      @(negedge clk); we = 1; waddr = 4'(a); wdata = golden[a];
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); ue = 1; uaddr = 4'(a); umask = rand_err(1 + a % 2);
    end
    @(negedge clk); ue = 0;
    for (int a = 0; a < WORDS; a++) begin issue(a, 2); repeat (3) @(negedge clk); end
    checks++; if (n_corr != WORDS) begin failures++; $display("FAIL corrections %0d", n_corr); end
    checks++; if (q.size() != 0) failures++;
    // back-pressure
    out_ready = 0;
    fork
      for (int a = 0; a < 4; a++) issue(a, -1);
      begin
        held = 0;
        repeat (12) begin @(negedge clk); #2; if (out_valid && !rd_ok) held++; end
      end
    join_any
    checks++; if (held == 0) begin failures++; $display("FAIL rd_ok never dropped under back-pressure"); end
    @(negedge clk); out_ready = 1;
    wait (q.size() == 0);
    repeat (5) @(negedge clk);
    checks++; if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

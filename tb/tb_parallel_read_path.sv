// tb_parallel_read_path: streams codewords with 0..2 memory errors through the
// parallel read path, one per cycle when in_ready allows. Some words get a
// transient corrector upset (1 or 2 bits, present only in their first pass):
// the detector must catch it and the repeated correction must deliver the
// clean word one cycle later. Checks data, tag order, out_err and latency
// (1 cycle clean, 2 with one repeat). Finally a persistent upset must end in
// out_err after MAX_RETRY repeats. Then random back-pressure on the output
// must lose, duplicate or reorder no word.
// Repeating the correction on a detector alarm is the document's; the
// latencies, the retry limit and the handshake are this design's.
module tb_parallel_read_path;
  import tb_code_pkg::*;
  localparam int MAXR = 3;
  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, out_valid, out_ready, out_err, ev_retry, ev_corrected;
  logic [14:0] in_cw, out_cw, upset;
  logic [18:0] in_tag, out_tag;
  int checks = 0, failures = 0, n_retry = 0, n_corr = 0, cycle = 0;

  parallel_read_path #(.TAG_W(19), .MAX_RETRY(MAXR)) dut (.*);

  always #5 clk = ~clk;

  // back-pressure on the result when bp_en is set
  logic bp_en = 1'b0;
  int   n_held = 0;
  always @(negedge clk) out_ready = bp_en ? ($urandom_range(1, 0) == 1) : 1'b1;
  always @(posedge clk) if (out_valid && !out_ready) n_held++;
  always @(negedge clk) cycle++;

  typedef struct { logic [14:0] cw; int tag; int lat; logic err; int t0; } exp_t;
  exp_t q[$];

  always @(posedge clk) if (rst_n) begin
    if (ev_retry) n_retry++;
    if (ev_corrected) n_corr++;
    if (out_valid && out_ready) begin
      exp_t x;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        x = q.pop_front();
        if (out_tag !== 19'(x.tag) || out_err !== x.err || (!x.err && out_cw !== x.cw) ||
            (x.lat >= 0 && cycle - x.t0 != x.lat)) begin
          failures++;
          if (failures < 10) $display("FAIL tag %0d/%0d err %b cw %b exp %b lat %0d exp %0d",
                                      out_tag, x.tag, out_err, out_cw, x.cw, cycle - x.t0, x.lat);
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] c;
    int n_up = 0;
    in_valid = 0; in_cw = '0; in_tag = '0; upset = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      bit inj;
      c = cw_of(7'($urandom));
      inj = ($urandom_range(9, 0) == 0);
      @(negedge clk);
      if ($urandom_range(3, 0) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_cw = c ^ rand_err(n % 3); in_tag = 19'(n);
      while (!in_ready) @(negedge clk);
      upset = inj ? rand_err(1 + n % 2) : '0;
      @(posedge clk);
      q.push_back('{cw: c, tag: n, lat: inj ? 2 : 1, err: 1'b0, t0: cycle});
      if (inj) n_up++;
      #1 upset = '0;
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++; if (n_retry != n_up) begin failures++; $display("FAIL retries %0d exp %0d", n_retry, n_up); end
    checks++; if (n_corr == 0) begin failures++; $display("FAIL no corrections counted"); end
    // persistent corrector fault: never passes the detector
    c = cw_of(7'h55);
    @(negedge clk); in_valid = 1; in_cw = c; in_tag = 19'd7777; upset = 15'h0101;
    @(posedge clk);
    q.push_back('{cw: c, tag: 7777, lat: 1 + MAXR, err: 1'b1, t0: cycle});
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    // back-pressure: every word must still arrive once, in order
    @(negedge clk); in_valid = 0; upset = '0;
    bp_en = 1;
    for (int n = 0; n < 1000; n++) begin
      c = cw_of(7'($urandom));
      @(negedge clk); #1;
      in_valid = 1; in_cw = c ^ rand_err(n % 3); in_tag = 19'(20000 + n);
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      q.push_back('{cw: c, tag: 20000 + n, lat: -1, err: 1'b0, t0: cycle});
      #1 in_valid = 0;
    end
    repeat (200) @(negedge clk);
    bp_en = 0;
    repeat (50) @(negedge clk);
    checks++; if (n_held == 0) begin failures++; $display("FAIL output never held"); end
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

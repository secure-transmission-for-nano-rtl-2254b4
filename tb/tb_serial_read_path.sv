// tb_serial_read_path: streams codewords with 0..2 errors through the read
// path with the serial corrector off the fast path. Clean words must leave
// one cycle after being taken; words with errors must leave corrected after
// 1 + 16 + 1 = 18 cycles. Some corrected words get a transient upset on the
// corrector output: the detector must catch it and the corrector run again
// (another 17 cycles). A persistent upset must end in out_err after the
// corrector has run 1 + MAX_RETRY times. Then random back-pressure on the
// output must lose, duplicate or reorder no word.
// Checking words first and correcting only flagged ones is the document's;
// the latencies, the retry limit and the handshake are this design's.
module tb_serial_read_path;
  import tb_code_pkg::*;
  localparam int MAXR = 3;
  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, out_valid, out_ready, out_err, ev_retry, ev_corrected;
  logic [14:0] in_cw, out_cw, upset, up_mask;
  logic [18:0] in_tag, out_tag;
  logic        up_first, up_always;
  int checks = 0, failures = 0, n_retry = 0, n_corr = 0, cycle = 0;

  serial_read_path #(.TAG_W(19), .MAX_RETRY(MAXR)) dut (.*);

  // the upset is present when the corrector starts its first run (or always)
  assign upset = (up_always || (up_first && ev_corrected)) ? up_mask : '0;

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
    int n_up = 0, n_err = 0;
    in_valid = 0; in_cw = '0; in_tag = '0; up_mask = '0; up_first = 0; up_always = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      bit inj;
      int w;
      c = cw_of(7'($urandom));
      w = (n % 4 == 3) ? 1 + n % 2 : 0;
      inj = (w != 0) && ($urandom_range(3, 0) == 0);
      @(negedge clk);
      in_valid = 1; in_cw = c ^ rand_err(w); in_tag = 19'(n);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      q.push_back('{cw: c, tag: n, lat: (w == 0) ? 1 : (inj ? 35 : 18), err: 1'b0, t0: cycle});
      if (inj) n_up++;
      if (w != 0) n_err++;
      #1 in_valid = 0;
      up_first = inj; up_mask = rand_err(1 + n % 2);
      if (w != 0) repeat (3) @(negedge clk);
    end
    repeat (50) @(negedge clk);
    checks++; if (n_retry != n_up) begin failures++; $display("FAIL retries %0d exp %0d", n_retry, n_up); end
    checks++; if (n_corr != n_err) begin failures++; $display("FAIL corrections %0d exp %0d", n_corr, n_err); end
    // persistent corrector fault
    up_first = 0; up_always = 1; up_mask = 15'h0003;
    c = cw_of(7'h2A);
    @(negedge clk); in_valid = 1; in_cw = c ^ 15'h0100; in_tag = 19'd4242;
    @(posedge clk);
    q.push_back('{cw: c, tag: 4242, lat: 1 + (1 + MAXR) * 17, err: 1'b1, t0: cycle});
    #1 in_valid = 0;
    repeat (100) @(negedge clk);
    // back-pressure: every word must still arrive once, in order
    @(negedge clk); in_valid = 0; up_always = 0; up_first = 0;
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

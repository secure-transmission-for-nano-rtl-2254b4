// tb_mem_system_run: end-to-end test program for eg_ldpc_memory_system,
// instantiated by tb_eg_ldpc_memory_system once per corrector variant.
// Phases: (1) fill memory, with transient encoder upsets that must be caught
// and re-encoded; (2) stream reads back-to-back, checking data, one read per
// cycle and 2-cycle latency; (3) flip 1-2 stored bits in every word and read
// each word alone, checking the corrected data and the latency of the
// variant; (4) upset the corrector output during reads, which must be
// repeated; (5) a persistent corrector fault must give rsp_err; (6) scrub
// with random reads and writes mixed in, then check that scrubbing repaired
// every word (reads trigger no correction); (7) with several clusters, upset
// the final mux output, which must be caught and the selection repeated.
// Each mechanism must occur.
// The mechanisms are the document's; every latency, limit and ordering
// rule checked here is this design's own choice.
module tb_mem_system_run #(
  parameter bit SERIAL     = 1'b0,
  parameter int CLUSTERS   = 1,
  parameter int BANKS      = 4,
  parameter int BANK_WORDS = 16,
  parameter int INTERVAL   = 8,
  parameter int MAXR       = 3
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import tb_code_pkg::*;
  localparam int WORDS = BANKS * BANK_WORDS;
  localparam int AW = $clog2(WORDS);

  logic          clk = 0, rst_n = 0;
  logic          wr_valid, wr_ready, rd_valid, rd_ready, rsp_valid, rsp_err, scrub_en;
  logic [AW-1:0] wr_addr, rd_addr, rsp_addr, mem_upset_addr;
  logic [6:0]    wr_data, rsp_data;
  logic [14:0]   enc_upset, cor_upset, mux_upset, mem_upset_mask;
  logic          mem_upset;
  logic          ev_enc_retry, ev_cor_retry, ev_mux_retry, ev_corrected, ev_scrub_wb, ev_scrub_steal;

  eg_ldpc_memory_system #(.BANKS(BANKS), .CLUSTERS(CLUSTERS), .BANK_WORDS(BANK_WORDS), .SCRUB_INTERVAL(INTERVAL),
                          .MAX_RETRY(MAXR), .SERIAL(SERIAL)) dut (.*);

  always #5 clk = ~clk;

  int cycle = 0;
  always @(negedge clk) cycle++;

  // event counters
  int n_mux_retry = 0;
  int n_enc_retry = 0, n_cor_retry = 0, n_corr = 0, n_wb = 0, n_steal = 0, n_rsp_err = 0;
  int n_wr_blocked = 0;
  always @(posedge clk) if (rst_n) begin
    n_enc_retry += int'(ev_enc_retry);
    n_cor_retry += int'(ev_cor_retry);
    n_mux_retry += int'(ev_mux_retry);
    n_corr      += int'(ev_corrected);
    n_wb        += int'(ev_scrub_wb);
    n_steal     += int'(ev_scrub_steal);
    n_rsp_err   += int'(rsp_valid && rsp_err);
  end

  logic [6:0] shadow [WORDS];

  typedef struct { int addr; logic [6:0] data; logic err; int lat; int t0; } exp_t;
  exp_t q[$];

  always @(posedge clk) if (rst_n && rsp_valid) begin
    exp_t x;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL[%0d] unexpected response", SERIAL); end
    else begin
      x = q.pop_front();
      if (int'(rsp_addr) != x.addr || rsp_err !== x.err || (!x.err && rsp_data !== x.data) ||
          (x.lat >= 0 && cycle - x.t0 != x.lat)) begin
        failures++;
        if (failures < 10)
          $display("FAIL[%0d,%0d] addr %0d/%0d data %h/%h err %b/%b lat %0d/%0d", SERIAL, CLUSTERS, rsp_addr,
                   x.addr, rsp_data, x.data, rsp_err, x.err, cycle - x.t0, x.lat);
      end
    end
  end

  task automatic do_write(input int a, input logic [6:0] d, input logic [14:0] up);
    @(negedge clk);
    wr_valid = 1; wr_addr = AW'(a); wr_data = d; enc_upset = up;
    #1;
    if (up != '0) begin
      checks++; if (wr_ready) begin failures++; $display("FAIL[%0d] corrupt codeword accepted", SERIAL); end
      @(negedge clk); enc_upset = '0; #1;
    end
    while (!wr_ready) begin n_wr_blocked++; @(negedge clk); #1; end
    @(posedge clk);
    shadow[a] = d;
    #1 wr_valid = 0;
  endtask

  // issue a read; lat < 0 means do not check the latency
  task automatic do_read(input int a, input int lat, input logic err, input bit keep_valid);
    @(negedge clk);
    rd_valid = 1; rd_addr = AW'(a);
    #1;
    while (!rd_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    q.push_back('{addr: a, data: shadow[a], err: err, lat: lat, t0: cycle});
    if (!keep_valid) #1 rd_valid = 0;
  endtask

  task automatic drain();
    int guard = 0;
    #1 rd_valid = 0;
    while (q.size() != 0 && guard < 2000) begin @(negedge clk); guard++; end
    repeat (3) @(negedge clk);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL[%0d] mechanism never happened: %s", SERIAL, what); end
  endtask

  initial begin
    int n_inj, c0, t_start, lat_err;
    done = 0; checks = 0; failures = 0;
    wr_valid = 0; rd_valid = 0; wr_addr = '0; rd_addr = '0; wr_data = '0; scrub_en = 0;
    enc_upset = '0; cor_upset = '0; mux_upset = '0; mem_upset = 0; mem_upset_addr = '0; mem_upset_mask = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // (1) fill memory; every 5th write meets a transient encoder fault
    n_inj = 0;
    for (int a = 0; a < WORDS; a++) begin
      logic [14:0] up;
      up = (a % 5 == 0) ? rand_err(1 + a % 3) : '0;
      if (up != '0) n_inj++;
      do_write(a, 7'($urandom), up);
    end
    checks++; if (n_enc_retry != n_inj) begin failures++; $display("FAIL[%0d] encoder retries %0d exp %0d", SERIAL, n_enc_retry, n_inj); end

    // (2) back-to-back reads of clean words: one per cycle, latency 2
    t_start = cycle;
    for (int a = 0; a < WORDS; a++) do_read(a, 2, 1'b0, 1'b1);
    checks++; if (CLUSTERS == 1 ? cycle - t_start != WORDS : cycle - t_start > WORDS + 4 * (CLUSTERS - 1)) begin failures++; $display("FAIL[%0d] %0d reads took %0d cycles", SERIAL, WORDS, cycle - t_start); end
    drain();
    checks++; if (n_corr != 0) begin failures++; $display("FAIL[%0d] clean words corrected", SERIAL); end

    // (3) 1-2 upsets in every stored word; isolated reads
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); mem_upset = 1; mem_upset_addr = AW'(a); mem_upset_mask = rand_err(1 + a % 2);
    end
    @(negedge clk); mem_upset = 0;
    lat_err = SERIAL ? 19 : 2;
    c0 = n_corr;
    for (int a = 0; a < WORDS; a++) begin do_read(a, lat_err, 1'b0, 1'b0); drain(); end
    checks++; if (n_corr - c0 != WORDS) begin failures++; $display("FAIL[%0d] corrections %0d exp %0d", SERIAL, n_corr - c0, WORDS); end

    // (4) transient corrector fault while correcting: repeated, one extra round
    for (int a = 0; a < 8; a++) begin
      do_read(a, lat_err + (SERIAL ? 17 : 1), 1'b0, 1'b0);
      @(negedge clk);                 // word is in the memory output stage
      if (SERIAL) @(negedge clk);     // word is at the detector, corrector starts
      cor_upset = 15'(1) << (a % 15);
      @(negedge clk); cor_upset = '0;
      drain();
    end
    checks++; if (n_cor_retry != 8) begin failures++; $display("FAIL[%0d] corrector retries %0d exp 8", SERIAL, n_cor_retry); end

    // (5) persistent corrector fault: uncorrectable
    cor_upset = 15'h0011;
    do_read(3, -1, 1'b1, 1'b0);
    drain();
    cor_upset = '0;

    // (6) scrubbing with user traffic mixed in
    scrub_en = 1;
    for (int n = 0; n < WORDS * (INTERVAL + 4); n++) begin
      int a;
      a = $urandom_range(WORDS - 1, 0);
      case ($urandom_range(3, 0))
        0: do_read(a, -1, 1'b0, 1'b0);
        1: do_write(a, 7'($urandom), '0);
        default: @(negedge clk);
      endcase
    end
    // let every word be scrubbed once more, then stop
    repeat (WORDS * (INTERVAL + (SERIAL ? 20 : 4))) @(negedge clk);
    scrub_en = 0;
    drain();
    repeat (INTERVAL + 40) @(negedge clk);
    c0 = n_corr;
    for (int a = 0; a < WORDS; a++) do_read(a, 2, 1'b0, 1'b1);
    drain();
    checks++; if (n_corr != c0) begin failures++; $display("FAIL[%0d] %0d words not repaired by scrubbing", SERIAL, n_corr - c0); end
    checks++; if (n_wb < WORDS) begin failures++; $display("FAIL[%0d] only %0d scrub write-backs", SERIAL, n_wb); end

    // (7) transient fault in the final mux: caught, selection repeated
    if (CLUSTERS > 1) begin
      for (int a = 0; a < 6; a++) begin
        do_read(a * (WORDS / 6), 3, 1'b0, 1'b0);
        @(negedge clk);                 // word in the memory output stage
        @(negedge clk);                 // word offered to the final mux
        mux_upset = 15'(3) << (a % 13);
        @(negedge clk); mux_upset = '0;
        drain();
      end
      checks++; if (n_mux_retry != 6) begin failures++; $display("FAIL[%0d] mux retries %0d exp 6", SERIAL, n_mux_retry); end
      need("final mux repeat", n_mux_retry);
    end else begin
      checks++; if (n_mux_retry != 0) failures++;
    end

    need("encoder retry", n_enc_retry);
    need("corrector retry", n_cor_retry);
    need("correction", n_corr);
    need("uncorrectable word", n_rsp_err);
    need("scrub write-back", n_wb);
    need("read slot taken by scrub", n_steal);
    need("write held during scrub", n_wr_blocked);
    $display("[SERIAL=%0d CLUSTERS=%0d] mux_retry=%0d", SERIAL, CLUSTERS, n_mux_retry);
    $display("[SERIAL=%0d] enc_retry=%0d cor_retry=%0d corrected=%0d uncorrectable=%0d scrub_wb=%0d steal=%0d wr_blocked=%0d",
             SERIAL, n_enc_retry, n_cor_retry, n_corr, n_rsp_err, n_wb, n_steal, n_wr_blocked);
    done = 1;
  end
endmodule

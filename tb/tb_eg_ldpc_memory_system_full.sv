// tb_eg_ldpc_memory_system_full: one complete operation of the memory system
// at its default size (4 banks x 69906 words, scrub interval 1024, parallel
// corrector). Writes words in every bank (one write meets an encoder upset),
// reads them back, flips stored bits and reads the corrected words, repeats a
// corrector operation after an injected corrector upset, then scrubs the
// first 32 words and checks that they no longer need correction.
// The bank count and 1 Mb bank size are the document's; the scrub interval,
// the retry limit and the 2-cycle read latency checked here are this
// design's own choices.
module tb_eg_ldpc_memory_system_full;
  import tb_code_pkg::*;
  localparam int AW = 19;
  localparam int NW = 64;

  logic          clk = 0, rst_n = 0;
  logic          wr_valid, wr_ready, rd_valid, rd_ready, rsp_valid, rsp_err, scrub_en;
  logic [AW-1:0] wr_addr, rd_addr, rsp_addr, mem_upset_addr;
  logic [6:0]    wr_data, rsp_data;
  logic [14:0]   enc_upset, cor_upset, mux_upset, mem_upset_mask;
  logic          mem_upset;
  logic          ev_enc_retry, ev_cor_retry, ev_mux_retry, ev_corrected, ev_scrub_wb, ev_scrub_steal;
  int checks = 0, failures = 0, cycle = 0;
  int n_enc = 0, n_cor = 0, n_corr = 0, n_wb = 0;

  eg_ldpc_memory_system dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) cycle++;

  always @(posedge clk) if (rst_n) begin
    n_enc  += int'(ev_enc_retry);
    n_cor  += int'(ev_cor_retry);
    n_corr += int'(ev_corrected);
    n_wb   += int'(ev_scrub_wb);
  end

  // test addresses: the first 32 words (bank 0, scrubbed below) and 32 words
  // spread over all four banks
  function automatic int addr_of(input int k);
    return (k < 32) ? k : (k - 32) * 8191 + 77;
  endfunction

  logic [6:0] shadow [NW];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(input int k, input logic [14:0] up);
    @(negedge clk);
    wr_valid = 1; wr_addr = AW'(addr_of(k)); wr_data = 7'($urandom); enc_upset = up;
    #1;
    if (up != '0) begin
      checks++; if (wr_ready) failures++;
      @(negedge clk); enc_upset = '0; #1;
    end
    while (!wr_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    shadow[k] = wr_data;
    #1 wr_valid = 0;
  endtask

  // read one word and wait for its response; check data and latency in
  // cycles from the accepting clock edge. up is applied to the corrector
  // output in the cycle the word enters the corrector.
  task automatic read_word(input int k, input int lat, input logic [14:0] up = '0);
    int n;
    bit got;
    @(negedge clk);
    rd_valid = 1; rd_addr = AW'(addr_of(k));
    #1;
    while (!rd_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 rd_valid = 0;
    n = 0; got = 0;
    while (!got && n < 100) begin
      @(negedge clk); n++;
      cor_upset = (n == 1) ? up : '0;
      #1 got = rsp_valid;
    end
    checks++;
    if (!got || rsp_err || rsp_data !== shadow[k] || int'(rsp_addr) != addr_of(k) || n != lat) begin
      failures++;
      $display("FAIL word %0d data %h exp %h err %b lat %0d exp %0d", k, rsp_data, shadow[k],
               rsp_err, n, lat);
    end
    @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    int c0;
    wr_valid = 0; rd_valid = 0; wr_addr = '0; rd_addr = '0; wr_data = '0; scrub_en = 0;
    enc_upset = '0; cor_upset = '0; mux_upset = '0; mem_upset = 0; mem_upset_addr = '0; mem_upset_mask = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NW; k++) write_word(k, (k == 40) ? 15'h0204 : '0);
    checks++; if (n_enc != 1) begin failures++; $display("FAIL encoder retries %0d", n_enc); end
    for (int k = 0; k < NW; k++) read_word(k, 2);
    checks++; if (n_corr != 0) failures++;
    // two upsets in each test word
    for (int k = 0; k < NW; k++) begin
      @(negedge clk); mem_upset = 1; mem_upset_addr = AW'(addr_of(k)); mem_upset_mask = rand_err(2);
    end
    @(negedge clk); mem_upset = 0;
    for (int k = 32; k < NW; k++) read_word(k, 2);
    checks++; if (n_corr != 32) begin failures++; $display("FAIL corrections %0d", n_corr); end
    // transient corrector fault: one repeat, one extra cycle
    read_word(50, 3, 15'h4000);
    checks++; if (n_cor != 1) begin failures++; $display("FAIL corrector retries %0d", n_cor); end
    // scrub the first 32 words (one every 1024 cycles)
    scrub_en = 1;
    wait (n_wb == 32);
    @(negedge clk); scrub_en = 0;
    repeat (20) @(negedge clk);
    c0 = n_corr;
    for (int k = 0; k < 32; k++) read_word(k, 2);
    checks++; if (n_corr != c0) begin failures++; $display("FAIL %0d words still corrected after scrub", n_corr - c0); end
    $display("enc_retry=%0d cor_retry=%0d corrected=%0d scrub_wb=%0d cycles=%0d", n_enc, n_cor, n_corr, n_wb, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

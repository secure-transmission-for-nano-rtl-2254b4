// eg_ldpc_memory_system: fault-tolerant banked memory protected by the
// (15,7,5) EG-LDPC code, with fault-secure detectors on encoder and corrector.
//
// Write side: the 7-bit information vector is encoded into a 15-bit codeword
// and a fault-secure detector checks the encoder's output in the same cycle.
// A flagged codeword is not stored; wr_ready stays low and the encoding is
// redone in the next cycle. Read side: the banks are grouped into CLUSTERS
// clusters (memory_cluster), each with its own read path of corrector and
// detector (by default the parallel pipelined corrector, with SERIAL=1 the
// serial corrector kept off the fast path). With one cluster (the default)
// the cluster's result is the response. With several, a final mux selects the
// result of the active cluster and a further detector checks the mux output;
// if it flags a word that the cluster delivered clean, the fault lies in the
// mux and the selection is repeated in the next cycle. Scrubbing: every
// SCRUB_INTERVAL cycles one word is read, corrected and written back, so
// errors cannot pile up in a word beyond what the code repairs. This
// organisation is the document's; arbitration, the retry limits and the
// handshakes are this design's.
//
// Arbitration: a pending scrub read takes the read slot ahead of a user read
// (rd_ready low, ev_scrub_steal). User writes wait while a scrub read is in
// flight, so a write-back can never overwrite newer data; one scrub operation
// is in flight at a time. Reads complete in request order: with several
// clusters, a read to another cluster waits until the active cluster has
// delivered all its reads, so rd_ready depends on rd_addr.
// Timing (parallel path): a read taken in cycle t gives rsp_valid in cycle
// t+2 when the corrector's output checks clean; each repeat of the corrector
// or of the final mux adds a cycle. Serial path: t+2 for a clean word, t+19
// for a corrected one. A read and a write to the same address in one cycle
// return the old word. Word address a lives in cluster a / (words per
// cluster), and within the cluster in bank and row as banked_memory maps it.
// enc_upset, cor_upset, mux_upset and the mem_upset port are fault-injection
// inputs that model transient faults in the encoder, the corrector, the final
// mux and the stored words; tie them to zero in normal use (mux_upset is
// unused with a single cluster, which has no final mux). The ev_* outputs
// are one-cycle event strobes; ev_mux_retry stays 0 with a single cluster.
module eg_ldpc_memory_system
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned BANKS          = 4,
  parameter int unsigned CLUSTERS       = 1,
  parameter int unsigned BANK_WORDS     = 69906,
  parameter int unsigned SCRUB_INTERVAL = 1024,
  parameter int unsigned MAX_RETRY      = 3,
  parameter bit          SERIAL         = 1'b0,
  localparam int unsigned WORDS         = BANKS * BANK_WORDS,
  localparam int unsigned AW            = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [AW-1:0] wr_addr,
  input  info_t         wr_data,
  // read port
  input  logic          rd_valid,
  output logic          rd_ready,
  input  logic [AW-1:0] rd_addr,
  output logic          rsp_valid,
  output logic [AW-1:0] rsp_addr,
  output info_t         rsp_data,
  output logic          rsp_err,
  // scrubbing
  input  logic          scrub_en,
  // fault injection
  input  codeword_t     enc_upset,
  input  codeword_t     cor_upset,
  input  codeword_t     mux_upset,
  input  logic          mem_upset,
  input  logic [AW-1:0] mem_upset_addr,
  input  codeword_t     mem_upset_mask,
  // events
  output logic          ev_enc_retry,
  output logic          ev_cor_retry,
  output logic          ev_mux_retry,
  output logic          ev_corrected,
  output logic          ev_scrub_wb,
  output logic          ev_scrub_steal
);

  localparam int unsigned CB    = BANKS / CLUSTERS;          // banks per cluster
  localparam int unsigned CWRDS = CB * BANK_WORDS;           // words per cluster
  localparam int unsigned LAW   = $clog2(CWRDS);             // cluster-local address
  localparam int unsigned CIW   = (CLUSTERS > 1) ? $clog2(CLUSTERS) : 1;
  localparam int unsigned RW    = $clog2(MAX_RETRY + 1) + 1;

  typedef struct packed {
    logic          scrub;
    logic [AW-1:0] addr;
  } tag_t;

  localparam int unsigned TAG_W = $bits(tag_t);

  function automatic logic [CIW-1:0] cluster_of(input logic [AW-1:0] a);
    return CIW'(32'(a) / CWRDS);
  endfunction

  function automatic logic [LAW-1:0] local_of(input logic [AW-1:0] a);
    return LAW'(32'(a) % CWRDS);
  endfunction

  // ---------------- write side: encoder and its detector ----------------
  codeword_t enc_cw;
  codeword_t enc_out;
  logic      enc_err;

  eg_encoder   u_enc     (.info(wr_data), .cw(enc_cw));
  assign enc_out = enc_cw ^ enc_upset;
  fsd_detector u_enc_det (.cw(enc_out), .syndrome(), .err(enc_err));

  // ---------------- scrubbing ----------------
  logic          scrub_req;
  logic [AW-1:0] scrub_addr;
  logic          scrub_go;
  logic          scrub_busy;

  scrub_controller #(.WORDS(WORDS), .INTERVAL(SCRUB_INTERVAL)) u_scrub (
    .clk(clk), .rst_n(rst_n), .enable(scrub_en),
    .req(scrub_req), .addr(scrub_addr), .ack(scrub_go)
  );

  // ---------------- clusters ----------------
  logic [CIW-1:0]      cur;        // cluster holding the reads in flight
  logic [2:0]          inflight;   // reads issued but not yet delivered
  logic                m_fire;
  logic [CLUSTERS-1:0] c_rd_ok;
  logic [CLUSTERS-1:0] c_out_valid;
  logic [CLUSTERS-1:0] c_out_err;
  logic [CLUSTERS-1:0] c_ev_retry;
  logic [CLUSTERS-1:0] c_ev_corr;
  codeword_t           c_out_cw  [CLUSTERS];
  logic [TAG_W-1:0]    c_out_tag [CLUSTERS];
  logic                m_ready;

  logic          mem_re;
  logic [AW-1:0] mem_raddr;
  logic          mem_we;
  logic [AW-1:0] mem_waddr;
  codeword_t     mem_wdata;

  for (genvar c = 0; c < CLUSTERS; c++) begin : g_cl
    memory_cluster #(.BANKS(CB), .BANK_WORDS(BANK_WORDS), .TAG_W(TAG_W),
                     .MAX_RETRY(MAX_RETRY), .SERIAL(SERIAL)) u_cluster (
      .clk(clk), .rst_n(rst_n),
      .we(mem_we && cluster_of(mem_waddr) == CIW'(c)), .waddr(local_of(mem_waddr)),
      .wdata(mem_wdata),
      .rd_ok(c_rd_ok[c]),
      .re(mem_re && cluster_of(mem_raddr) == CIW'(c)), .raddr(local_of(mem_raddr)),
      .rtag(tag_t'{scrub: scrub_go, addr: mem_raddr}),
      .ue(mem_upset && cluster_of(mem_upset_addr) == CIW'(c)),
      .uaddr(local_of(mem_upset_addr)), .umask(mem_upset_mask),
      .cor_upset(cor_upset),
      .out_valid(c_out_valid[c]), .out_ready(m_ready && cur == CIW'(c)),
      .out_cw(c_out_cw[c]), .out_tag(c_out_tag[c]), .out_err(c_out_err[c]),
      .ev_retry(c_ev_retry[c]), .ev_corrected(c_ev_corr[c])
    );
  end

  // ---------------- read issue (in order across clusters) ----------------
  function automatic logic can_issue(input logic [AW-1:0] a,
                                     input logic [CLUSTERS-1:0] ok,
                                     input logic [2:0] n, input logic [CIW-1:0] cl);
    return ok[cluster_of(a)] && (n == '0 || cluster_of(a) == cl) && (n != 3'd7);
  endfunction

  assign scrub_go  = scrub_req && !scrub_busy && can_issue(scrub_addr, c_rd_ok, inflight, cur);
  assign rd_ready  = !scrub_go && can_issue(rd_addr, c_rd_ok, inflight, cur);
  assign mem_re    = scrub_go || (rd_valid && rd_ready);
  assign mem_raddr = scrub_go ? scrub_addr : rd_addr;

  // ---------------- final mux and its detector ----------------
  logic          m_valid;
  codeword_t     m_cw;
  tag_t          m_tag;
  logic          m_cerr;      // cluster could not correct the word
  logic          m_err;       // final detector flags the mux output
  logic          m_retry;
  logic [RW-1:0] m_tries;

  assign m_valid = c_out_valid[cur];
  assign m_tag   = tag_t'(c_out_tag[cur]);
  assign m_cerr  = c_out_err[cur];

  if (CLUSTERS > 1) begin : g_mux_det
    assign m_cw = c_out_cw[cur] ^ mux_upset;
    fsd_detector u_mux_det (.cw(m_cw), .syndrome(), .err(m_err));
  end else begin : g_no_mux
    assign m_cw  = c_out_cw[0];
    assign m_err = 1'b0;
  end

  assign m_retry = m_valid && m_err && !m_cerr && (m_tries < RW'(MAX_RETRY));
  assign m_ready = !m_retry;
  assign m_fire  = m_valid && m_ready;

  // ---------------- write port and scrub write-back ----------------
  logic scrub_wb;
  assign scrub_wb  = m_fire && m_tag.scrub && !m_cerr && !m_err;
  assign wr_ready  = !enc_err && !scrub_busy && !scrub_go;
  assign mem_we    = scrub_wb || (wr_valid && wr_ready);
  assign mem_waddr = scrub_wb ? m_tag.addr : wr_addr;
  assign mem_wdata = scrub_wb ? m_cw : enc_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur        <= '0;
      inflight   <= '0;
      scrub_busy <= 1'b0;
      m_tries    <= '0;
    end else begin
      if (mem_re) cur <= cluster_of(mem_raddr);
      inflight <= inflight + 3'(mem_re) - 3'(m_fire);
      if (scrub_go) scrub_busy <= 1'b1;
      else if (m_fire && m_tag.scrub) scrub_busy <= 1'b0;
      if (m_retry) m_tries <= m_tries + RW'(1);
      else if (m_fire) m_tries <= '0;
    end
  end

  // ---------------- outputs ----------------
  assign rsp_valid      = m_fire && !m_tag.scrub;
  assign rsp_addr       = m_tag.addr;
  assign rsp_data       = m_cw[K-1:0];
  assign rsp_err        = m_cerr || m_err;
  assign ev_enc_retry   = wr_valid && enc_err;
  assign ev_cor_retry   = |c_ev_retry;
  assign ev_mux_retry   = m_retry;
  assign ev_corrected   = |c_ev_corr;
  assign ev_scrub_wb    = scrub_wb;
  assign ev_scrub_steal = scrub_go && rd_valid;

  a_store_clean: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_valid && wr_ready) |-> ref_syndrome(enc_out) == '0);
  a_in_order: assert property (@(posedge clk) disable iff (!rst_n)
    (c_out_valid & ~(CLUSTERS'(1) << cur)) == '0);

endmodule

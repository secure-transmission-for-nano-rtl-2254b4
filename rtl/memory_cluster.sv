// memory_cluster: a group of memory banks with its own corrector and detector.
//
// The banks of a cluster share one read path: the word read from the
// addressed bank sits in the bank's output register (the read-issue stage)
// until the read path takes it, then passes the corrector and the detector
// that watches the corrector (parallel pipelined corrector by default, serial
// corrector off the fast path with SERIAL=1). A memory system is built from
// one cluster holding all banks, or from several clusters whose outputs are
// merged by a final mux. Grouping banks into clusters, each with a corrector
// and detector, is the document's; the issue stage and handshakes are this
// design's.
// Interface: write port (we/waddr/wdata, cluster-local address, stored at the
// clock edge); read issue (re/raddr/rtag, allowed only while rd_ok is high);
// result (out_valid/out_ready handshake, corrected codeword, tag, out_err for
// a word still flagged after MAX_RETRY corrector repeats). ue/uaddr/umask flip
// stored bits and cor_upset flips corrector output bits (fault injection).
// Timing: a read issued in cycle t is offered in cycle t+2 when clean.
// BANKS defaults to 2, the cluster size drawn in the document; the top sets
// it to its own banks per cluster.
module memory_cluster
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned BANKS      = 2,
  parameter int unsigned BANK_WORDS = 69906,
  parameter int unsigned TAG_W      = 20,
  parameter int unsigned MAX_RETRY  = 3,
  parameter bit          SERIAL     = 1'b0,
  localparam int unsigned AW        = $clog2(BANKS * BANK_WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  codeword_t        wdata,
  output logic             rd_ok,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  input  logic [TAG_W-1:0] rtag,
  input  logic             ue,
  input  logic [AW-1:0]    uaddr,
  input  codeword_t        umask,
  input  codeword_t        cor_upset,
  output logic             out_valid,
  input  logic             out_ready,
  output codeword_t        out_cw,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_err,
  output logic             ev_retry,
  output logic             ev_corrected
);

  logic             s1_v;
  logic [TAG_W-1:0] s1_tag;
  logic             path_ready;
  codeword_t        mem_q;

  banked_memory #(.BANKS(BANKS), .BANK_WORDS(BANK_WORDS), .W(N)) u_mem (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .re(re), .raddr(raddr), .q(mem_q),
    .ue(ue), .uaddr(uaddr), .umask(umask)
  );

  assign rd_ok = !s1_v || path_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v   <= 1'b0;
      s1_tag <= '0;
    end else if (re) begin
      s1_v   <= 1'b1;
      s1_tag <= rtag;
    end else if (path_ready) begin
      s1_v <= 1'b0;
    end
  end

  if (SERIAL) begin : g_serial
    serial_read_path #(.TAG_W(TAG_W), .MAX_RETRY(MAX_RETRY)) u_path (
      .clk(clk), .rst_n(rst_n),
      .in_valid(s1_v), .in_ready(path_ready), .in_cw(mem_q), .in_tag(s1_tag),
      .upset(cor_upset),
      .out_valid(out_valid), .out_ready(out_ready), .out_cw(out_cw), .out_tag(out_tag),
      .out_err(out_err), .ev_retry(ev_retry), .ev_corrected(ev_corrected)
    );
  end else begin : g_parallel
    parallel_read_path #(.TAG_W(TAG_W), .MAX_RETRY(MAX_RETRY)) u_path (
      .clk(clk), .rst_n(rst_n),
      .in_valid(s1_v), .in_ready(path_ready), .in_cw(mem_q), .in_tag(s1_tag),
      .upset(cor_upset),
      .out_valid(out_valid), .out_ready(out_ready), .out_cw(out_cw), .out_tag(out_tag),
      .out_err(out_err), .ev_retry(ev_retry), .ev_corrected(ev_corrected)
    );
  end

  // A read may only be issued while the issue stage can accept it.
  a_issue_ok: assert property (@(posedge clk) disable iff (!rst_n) re |-> rd_ok);

endmodule

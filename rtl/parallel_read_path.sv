// parallel_read_path: read path of the memory system with the parallel corrector.
//
// Every word read from memory goes through the parallel pipelined corrector,
// and a fault-secure detector checks the corrector's output. A clean result
// leaves one cycle after the word was taken. When the detector flags the
// result, the fault lies in the corrector itself (the corrector repairs up to
// two memory errors), so the input mux selects the corrector's own output and
// the correction is repeated; meanwhile in_ready is low. After MAX_RETRY
// repeats that still fail, the word is delivered with out_err set. The mux,
// the repeat on a detected error and the one-word-per-cycle pipeline are the
// document's; the retry limit and the tag are this design's.
// The upset input is a fault model for test: it is XORed into the corrector
// output, sampled together with the corrector input.
// Interface: in_valid/in_ready and out_valid/out_ready handshakes; a word
// whose output is not taken stays in the stage and blocks the input. ev_retry
// and ev_corrected are one-cycle event strobes (ev_corrected when the word
// leaves).
module parallel_read_path
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned TAG_W     = 20,
  parameter int unsigned MAX_RETRY = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  codeword_t        in_cw,
  input  logic [TAG_W-1:0] in_tag,
  input  codeword_t        upset,
  output logic             out_valid,
  input  logic             out_ready,
  output codeword_t        out_cw,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_err,
  output logic             ev_retry,
  output logic             ev_corrected
);

  localparam int unsigned RW = $clog2(MAX_RETRY + 1) + 1;

  logic             s_v;
  logic [TAG_W-1:0] s_tag;
  logic [RW-1:0]    s_tries;
  codeword_t        s_orig;
  codeword_t        upset_q;
  codeword_t        cor_q;
  codeword_t        cor_in;
  codeword_t        s_cw;
  logic             det_err;
  logic             retry;
  logic             load;
  logic             hold;

  assign s_cw   = cor_q ^ upset_q;
  assign retry  = s_v && det_err && (s_tries < RW'(MAX_RETRY));
  assign hold   = s_v && !retry && !out_ready;
  assign in_ready = !retry && !hold;
  assign load   = retry || (in_valid && in_ready);
  assign cor_in = retry ? s_cw : in_cw;

  parallel_corrector u_cor (.clk(clk), .en(load), .cw_in(cor_in), .cw_out(cor_q));
  fsd_detector       u_det (.cw(s_cw), .syndrome(), .err(det_err));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_v     <= 1'b0;
      s_tag   <= '0;
      s_tries <= '0;
      s_orig  <= '0;
      upset_q <= '0;
    end else begin
      if (load) upset_q <= upset;
      if (retry) begin
        s_tries <= s_tries + RW'(1);
      end else if (!hold) begin
        s_v     <= in_valid;
        s_tries <= '0;
        if (in_valid) begin
          s_tag  <= in_tag;
          s_orig <= in_cw;
        end
      end
    end
  end

  assign out_valid    = s_v && !retry;
  assign out_cw       = s_cw;
  assign out_tag      = s_tag;
  assign out_err      = det_err;
  assign ev_retry     = retry;
  assign ev_corrected = out_valid && out_ready && !det_err && (s_cw != s_orig);

endmodule

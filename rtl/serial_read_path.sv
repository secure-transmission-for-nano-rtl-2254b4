// serial_read_path: read path with the serial corrector off the fast path.
//
// A word from memory is latched behind a mux and checked by a fault-secure
// detector. A clean word leaves the next cycle, so error-free reads keep full
// throughput. A flagged word is handed to the serial corrector (15 cycles);
// its result comes back through the mux and is checked again. If the check of
// a corrected word fails, the fault was in the corrector and it is run again,
// up to MAX_RETRY times, after which the word leaves with out_err set. The
// placement of the corrector, the mux and the detector are the document's;
// the retry limit, the tag and the handshake are this design's.
// The upset input is a fault model for test, XORed into the corrector's
// result and sampled when the corrector starts.
// Interface: in_valid/in_ready handshake (in_ready is low while a word is
// being corrected) and out_valid/out_ready handshake on the result.
// Latency: 1 cycle for a clean word, 1 + 15 + 1 cycles for a corrected one.
module serial_read_path
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

  localparam int unsigned RW = $clog2(MAX_RETRY + 2) + 1;

  logic             r_v;
  codeword_t        r_cw;
  logic [TAG_W-1:0] r_tag;
  logic [RW-1:0]    r_pass;    // 0: word straight from memory
  codeword_t        upset_q;
  logic             det_err;
  logic             send;
  logic             fire;
  logic             busy;
  logic             done;
  codeword_t        cor_out;

  fsd_detector     u_det (.cw(r_cw), .syndrome(), .err(det_err));
  serial_corrector u_cor (.clk(clk), .rst_n(rst_n), .start(send), .cw_in(r_cw),
                          .busy(busy), .done(done), .cw_out(cor_out));

  assign send     = r_v && det_err && (r_pass <= RW'(MAX_RETRY));
  assign fire     = r_v && !send && out_ready;
  assign in_ready = !busy && !done && (!r_v || fire);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_v     <= 1'b0;
      r_cw    <= '0;
      r_tag   <= '0;
      r_pass  <= '0;
      upset_q <= '0;
    end else begin
      if (send) begin
        r_v     <= 1'b0;
        upset_q <= upset;
      end else if (done) begin
        r_v    <= 1'b1;
        r_cw   <= cor_out ^ upset_q;
        r_pass <= r_pass + RW'(1);
      end else if (in_valid && in_ready) begin
        r_v    <= 1'b1;
        r_cw   <= in_cw;
        r_tag  <= in_tag;
        r_pass <= '0;
      end else if (fire) begin
        r_v <= 1'b0;
      end
    end
  end

  assign out_valid    = r_v && !send;
  assign out_cw       = r_cw;
  assign out_tag      = r_tag;
  assign out_err      = det_err;
  assign ev_corrected = send && (r_pass == '0);
  assign ev_retry     = send && (r_pass != '0);

endmodule

// serial_corrector: serial one-step majority-logic corrector.
//
// The word sits in a 15-bit cyclic shift register. Each cycle one osml_bit
// circuit decides whether the last bit C14 is wrong; C14, inverted if so,
// re-enters the register at C0 while every other bit moves up one place. As
// the code is cyclic, after 15 shifts each bit has passed position 14 once and
// the corrected word is back in its original alignment. This structure is the
// document's; start/busy/done control is this design's.
// Interface: a start pulse loads cw_in (ignored while busy); busy is high for
// the 15 shift cycles that follow, then done pulses for one cycle with cw_out
// valid, 16 cycles after the start cycle. cw_out holds
// the register contents until the next start.
module serial_corrector
  import eg_ldpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  codeword_t cw_in,
  output logic      busy,
  output logic      done,
  output codeword_t cw_out
);

  codeword_t        sr;
  logic [3:0]       cnt;
  logic             last;

  osml_bit #(.BIT(N - 1)) u_bit (.cw(sr), .checks(), .flip(), .bit_out(last));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        sr  <= {sr[N-2:0], last};
        cnt <= cnt + 4'd1;
        if (cnt == 4'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        sr   <= cw_in;
        cnt  <= '0;
        busy <= 1'b1;
      end
    end
  end

  assign cw_out = sr;

endmodule

// scrub_controller: issues the periodic reads of memory scrubbing.
//
// While enable is high a timer counts INTERVAL cycles and then raises req
// with the next address to scrub; req stays up until ack, after which the
// address advances (wrapping after WORDS words) and the timer starts again.
// The read word is corrected and written back by the memory system. Periodic
// read-correct-write-back is the document's; the interval and the ascending
// address order are this design's choices.
// Interface: req/addr out, ack in (one-cycle pulse when the read is issued).
module scrub_controller #(
  parameter int unsigned WORDS    = 279624,
  parameter int unsigned INTERVAL = 1024,
  localparam int unsigned AW      = $clog2(WORDS),
  localparam int unsigned TW      = $clog2(INTERVAL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  output logic          req,
  output logic [AW-1:0] addr,
  input  logic          ack
);

  logic [TW-1:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req   <= 1'b0;
      addr  <= '0;
      timer <= '0;
    end else begin
      if (ack && req) begin
        req  <= 1'b0;
        addr <= (addr == AW'(WORDS - 1)) ? '0 : addr + AW'(1);
      end else if (enable && !req) begin
        if (timer == TW'(INTERVAL - 1)) begin
          req   <= 1'b1;
          timer <= '0;
        end else begin
          timer <= timer + TW'(1);
        end
      end
    end
  end

endmodule

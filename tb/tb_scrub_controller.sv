// tb_scrub_controller: with INTERVAL=5 and 8 words, req must rise exactly
// INTERVAL cycles after enable or after the previous ack, hold until ack,
// and present addresses 0,1,..,7,0,.. in turn. With enable low no request
// may appear.
// Periodic scrubbing is the document's; the interval, the address order
// and the req/ack handshake are this design's.
module tb_scrub_controller;
  localparam int WORDS = 8, INTERVAL = 5;
  logic       clk = 0, rst_n = 0, enable, req, ack;
  logic [2:0] addr;
  int checks = 0, failures = 0;

  scrub_controller #(.WORDS(WORDS), .INTERVAL(INTERVAL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_c, hold;
    enable = 0; ack = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20) begin @(negedge clk); checks++; if (req) failures++; end
    enable = 1;
    for (int n = 0; n < 40; n++) begin
      wait_c = 0;
      while (!req && wait_c < 50) begin @(negedge clk); wait_c++; end
      checks++; if (wait_c != INTERVAL) begin failures++; $display("FAIL interval %0d", wait_c); end
      checks++; if (addr !== 3'(n % WORDS)) begin failures++; $display("FAIL addr %0d exp %0d", addr, n % WORDS); end
      hold = $urandom_range(3, 0);
      repeat (hold) begin @(negedge clk); checks++; if (!req || addr !== 3'(n % WORDS)) failures++; end
      ack = 1; @(negedge clk); ack = 0;
      checks++; if (req) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_serial_corrector: random codewords with 0..2 errors are corrected;
// done must come exactly 16 cycles after the start cycle (one load, one
// shift per code bit), busy must be high in between, and start is ignored
// while busy.
// Correcting one bit per shift is the document's; the load cycle and the
// start/busy/done handshake are this design's.
module tb_serial_corrector;
  import tb_code_pkg::*;
  logic        clk = 0, rst_n = 0, start, busy, done;
  logic [14:0] cw_in, cw_out;
  int checks = 0, failures = 0;

  serial_corrector dut (.clk(clk), .rst_n(rst_n), .start(start), .cw_in(cw_in),
                        .busy(busy), .done(done), .cw_out(cw_out));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] c;
    int lat;
    start = 0; cw_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      c = cw_of(7'($urandom));
      @(negedge clk); start = 1; cw_in = c ^ rand_err(n % 3);
      @(negedge clk); start = 1; cw_in = ~cw_in;  // must be ignored: busy
      lat = 1;
      checks++; if (!busy) failures++;
      start = 0;
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      checks++; if (lat != 16) begin failures++; $display("FAIL latency %0d", lat); end
      checks++; if (cw_out !== c) begin failures++; if (failures < 10) $display("FAIL got %b exp %b", cw_out, c); end
      checks++; if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

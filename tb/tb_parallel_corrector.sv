// tb_parallel_corrector: every codeword with every error pattern of weight
// 0..2 is fed, one per cycle; the output one cycle later must be the
// error-free codeword. Also checks that the output holds while en is low.
// One majority circuit per bit is the document's; the single output
// register, and so the one-cycle latency, is this design's.
module tb_parallel_corrector;
  import tb_code_pkg::*;
  logic        clk = 0, en;
  logic [14:0] cw_in, cw_out;
  int checks = 0, failures = 0;

  parallel_corrector dut (.clk(clk), .en(en), .cw_in(cw_in), .cw_out(cw_out));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] c, e, prev;
    en = 0; cw_in = '0;
    for (int i = 0; i < 128; i++) begin
      c = cw_of(7'(i));
      for (int a = -1; a < 15; a++)
        for (int b = a; b < 15; b++) begin
          e = '0;
          if (a >= 0) e[a] = 1'b1;
          if (b >= 0) e[b] = 1'b1;
          @(negedge clk); en = 1; cw_in = c ^ e;
          @(negedge clk); en = 0;
          checks++;
          if (cw_out !== c) begin failures++; if (failures < 10) $display("FAIL %b -> %b exp %b", c ^ e, cw_out, c); end
        end
    end
    // hold while en is low
    prev = cw_out;
    @(negedge clk); cw_in = ~cw_in; en = 0;
    @(negedge clk);
    checks++; if (cw_out !== prev) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

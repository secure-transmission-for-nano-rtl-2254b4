// tb_eg_ldpc_memory_system: end-to-end test of the memory system at reduced
// size (4 banks of 16 words, scrub interval 8). It runs four configurations:
// the parallel pipelined corrector and the serial corrector, each with all
// banks in one cluster and with two clusters of two banks. The test program
// is tb_mem_system_run.
// The mechanisms checked (encoder redo, corrector repeat, scrubbing, final
// mux check) are the document's; sizes, latencies and arbitration rules
// checked here are this design's own choices.
module tb_eg_ldpc_memory_system;
  logic done [4];
  int   checks [4], failures [4];

  tb_mem_system_run #(.SERIAL(1'b0), .CLUSTERS(1)) run_par  (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  tb_mem_system_run #(.SERIAL(1'b1), .CLUSTERS(1)) run_ser  (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
  tb_mem_system_run #(.SERIAL(1'b0), .CLUSTERS(2)) run_par2 (.done(done[2]), .checks(checks[2]), .failures(failures[2]));
  tb_mem_system_run #(.SERIAL(1'b1), .CLUSTERS(2)) run_ser2 (.done(done[3]), .checks(checks[3]), .failures(failures[3]));

  function automatic int total(input int v [4]);
    return v[0] + v[1] + v[2] + v[3];
  endfunction

  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule

// tb_test_env_full: the end-to-end test of test_env_harness with the
// board-level design at its default parameters (16-bit debounce and
// display-refresh counters): the whole program, one button press per
// instruction, with every display selection read back from the segments.
module tb_test_env_full;
  test_env_harness #(.FULL(1'b1)) h ();

  // watchdog
  initial begin
    #5s;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule

// tb_test_env: end-to-end test of the board-level design with short
// debounce and display-refresh counters (4 bits each), so that it runs in
// seconds. The test itself is in test_env_harness.
module tb_test_env;
  test_env_harness #(.FULL(1'b0), .MPG_CNT_W(4), .SSD_CNT_W(4)) h ();

  // watchdog
  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule

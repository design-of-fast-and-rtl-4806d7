// router_scheduler_tb: end-to-end test of the scheduler at its default size
// (8 x 8 ports, frames of 16 slots, 8-bit cells, packets of up to 16 cells),
// with no parameter overrides. The checks, the traffic and the coverage
// counts are described in router_scheduler_env. A watchdog ends the run
// with a failure if it does not finish in time.
module router_scheduler_tb;
  int checks, failures;
  bit done;

  router_scheduler_env u_env (.checks, .failures, .done);

  initial begin
    #4_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

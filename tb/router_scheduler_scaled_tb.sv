// router_scheduler_scaled_tb: the end-to-end test of router_scheduler_env at
// other sizes, to show the scheduler scales with its parameters:
// 2 x 2 ports with frames of 4 slots (buffers smaller than one packet),
// 4 x 4 with frames of 8, and 16 x 16 with frames of 32. All three run at
// once; the result line sums their checks and failures. A watchdog ends the
// run with a failure if they do not finish in time.
module router_scheduler_scaled_tb;
  int checks [3], failures [3];
  bit done [3];

  router_scheduler_env #(.N(2),  .F(4),  .DEFAULTS(1'b0)) u_env2  (
    .checks(checks[0]), .failures(failures[0]), .done(done[0]));
  router_scheduler_env #(.N(4),  .F(8),  .DEFAULTS(1'b0)) u_env4  (
    .checks(checks[1]), .failures(failures[1]), .done(done[1]));
  router_scheduler_env #(.N(16), .F(32), .DEFAULTS(1'b0)) u_env16 (
    .checks(checks[2]), .failures(failures[2]), .done(done[2]));

  function automatic int sum(input int v [3]);
    return v[0] + v[1] + v[2];
  endfunction

  initial begin
    #4_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks), sum(failures) + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks), sum(failures));
    $finish;
  end
endmodule

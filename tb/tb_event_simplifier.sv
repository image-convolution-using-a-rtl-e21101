// tb_event_simplifier: checks on-bus cancellation of signed events.
// Two harnesses (simp_check) test the simplifier with a one-event hold
// (HOLD_W = 1, the basic scheme) and with a 2-bit count (up to three events
// held per pixel). Each keeps a reference model of the held counts and
// predicts for every event whether it is held, cancelled or sent. Random
// signed events on a few pixels, biased so that some pixels get runs of one
// sign, are sent with random output back-pressure in three phases:
// simplification on, bypass (every event must pass unchanged), then on again
// after a clear. Outputs are compared in order with the prediction, and each
// phase set must show at least one hold, cancellation and release.
module tb_event_simplifier;
  logic clk = 0, rst_n = 0;
  logic done1, done2;
  int checks1, failures1, checks2, failures2;
  int checks = 0, failures = 0;

  simp_check #(.HOLD_W(1)) u_h1 (.clk, .rst_n, .done(done1), .checks(checks1), .failures(failures1));
  simp_check #(.HOLD_W(2)) u_h2 (.clk, .rst_n, .done(done2), .checks(checks2), .failures(failures2));

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures = failures1 + failures2 + 1;
    checks = checks1 + checks2;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done1 && done2);
    checks = checks1 + checks2;
    failures = failures1 + failures2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

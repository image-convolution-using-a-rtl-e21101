// simp_check: test harness for one event_simplifier with a given HOLD_W,
// used by tb_event_simplifier. It drives the block and checks it against a
// reference model; it reports its counts through its ports and raises done.
// A reference model keeps a held-event count per pixel and predicts, for each
// event, whether it is held, cancelled or sent. Random signed events on a few
// pixels are sent with random output back-pressure, in three phases:
// simplification on, bypass (every event must pass unchanged), then on again
// after a clear. Outputs are compared in order with the model's prediction;
// the phases must also show at least one hold, cancellation and release.
// The counts are cleared after reset, so the test first waits for busy low.
module simp_check
  import aer_pkg::*;
#(
  parameter int HOLD_W = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int CMAX = (1 << HOLD_W) - 1;
  logic enable = 1, clear = 0, busy;
  logic in_valid = 0, in_ready;
  aer_evt_t in_evt = '0;
  logic out_valid, out_ready;
  aer_evt_t out_evt;
  int model [logic [PIX_W-1:0]];
  aer_evt_t expq [$];
  int n_hold = 0, n_cancel = 0, n_release = 0, n_bypass = 0;

  event_simplifier #(.HOLD_W(HOLD_W)) dut (.*);

  always_ff @(posedge clk) out_ready <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0 || out_evt !== expq[0]) begin
      failures++;
      $display("unexpected output %h", out_evt);
    end
    if (expq.size() != 0) void'(expq.pop_front());
  end

  task automatic predict(aer_evt_t e, bit en);
    int c = model.exists(e.pix) ? model[e.pix] : 0;
    int s = e.neg ? -1 : 1;
    if (!en) begin
      expq.push_back(e); n_bypass++;
    end else if (c * s < 0) begin
      model[e.pix] = c + s; n_cancel++;
    end else if (c * s < CMAX) begin
      model[e.pix] = c + s; n_hold++;
    end else begin
      expq.push_back(e); n_release++;
    end
  endtask

  task automatic send(aer_evt_t e);
    @(negedge clk);
    in_valid = 1; in_evt = e;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic phase(int n, bit en);
    enable = en;
    for (int i = 0; i < n; i++) begin
      aer_evt_t e;
      e.pix = 16'h4000 + 16'($urandom_range(0, 5));
      // pixel-dependent bias so some pixels are mostly one sign
      e.neg = ($urandom_range(0, 9) < 3 + int'(e.pix[1:0]));
      predict(e, en);
      send(e);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d events missing", expq.size()); end
  endtask

  initial begin
    done = 0;
    checks = 0;
    failures = 0;
    wait (rst_n);
    @(negedge clk);
    checks++;
    if (!busy) begin failures++; $display("no clear after reset"); end
    wait (!busy);
    phase(3000, 1);
    phase(500, 0);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    model.delete();
    wait (!busy);
    phase(3000, 1);
    checks++;
    if (n_hold == 0 || n_cancel == 0 || n_release == 0 || n_bypass == 0) begin
      failures++;
      $display("mechanism never seen: hold %0d cancel %0d release %0d bypass %0d",
               n_hold, n_cancel, n_release, n_bypass);
    end
    $display("HOLD_W=%0d: hold %0d cancel %0d release %0d bypass %0d", HOLD_W,
             n_hold, n_cancel, n_release, n_bypass);
    done = 1;
  end
endmodule

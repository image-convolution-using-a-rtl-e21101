// tb_aer_rx: checks the AER receiver against a four-phase sender model.
// The sender puts an address on the bus, raises req, waits for ack, drops req
// and waits for ack to fall. The consumer side takes events with a random
// ready. Every address sent must come out once, in order; ack must not rise
// without req, and each event must need exactly one ack pulse.
module tb_aer_rx;
  localparam int AW = 16;
  localparam int N  = 200;
  logic clk = 0, rst_n = 0;
  logic aer_req = 0, aer_ack;
  logic [AW-1:0] aer_data = '0;
  logic out_valid, out_ready;
  logic [AW-1:0] out_data;
  int checks = 0, failures = 0;
  logic [AW-1:0] sent [N];
  int n_rx = 0, n_ack = 0;

  aer_rx #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer with random back-pressure
  always_ff @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (n_rx >= N || out_data !== sent[n_rx]) begin
      failures++;
      $display("event %0d: got %h expected %h", n_rx, out_data, sent[n_rx]);
    end
    n_rx++;
  end

  // protocol: ack only while or after req, count rising edges of ack
  logic ack_d = 0;
  always @(posedge clk) begin
    ack_d <= aer_ack;
    if (rst_n && aer_ack && !ack_d) n_ack++;
  end

  initial begin
    for (int i = 0; i < N; i++) sent[i] = AW'($urandom);
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      aer_data = sent[i];
      @(negedge clk);
      aer_req = 1;
      wait (aer_ack == 1);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      @(negedge clk);
      aer_req = 0;
      aer_data = ~aer_data;   // data may change once req is low
      wait (aer_ack == 0);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (n_rx != N) begin failures++; $display("received %0d of %0d", n_rx, N); end
    checks++;
    if (n_ack != N) begin failures++; $display("ack pulses %0d for %0d events", n_ack, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aer_tx: checks the AER sender against a four-phase receiver model.
// The producer offers random addresses with random gaps; the receiver model
// answers req with ack after a random delay, reads the data while req is
// high and drops ack after req falls. All addresses must arrive once, in
// order, with data stable from one clock before req rises until ack.
module tb_aer_tx;
  localparam int AW = 17;
  localparam int N  = 200;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [AW-1:0] in_data = '0;
  logic aer_req, aer_ack = 0;
  logic [AW-1:0] aer_data;
  int checks = 0, failures = 0;
  logic [AW-1:0] sent [N];
  int n_rx = 0;

  aer_tx #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver model
  initial begin
    forever begin
      wait (aer_req == 1);
      repeat ($urandom_range(1, 4)) @(negedge clk);
      checks++;
      if (n_rx >= N || aer_data !== sent[n_rx]) begin
        failures++;
        $display("event %0d: got %h expected %h", n_rx, aer_data, sent[n_rx]);
      end
      n_rx++;
      aer_ack = 1;
      wait (aer_req == 0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      aer_ack = 0;
    end
  end

  // req must not fall before ack, nor rise while ack is still high
  logic req_d = 0, ack_d = 0;
  always @(posedge clk) begin
    req_d <= aer_req;
    ack_d <= aer_ack;
    checks++;
    if (rst_n && req_d && !aer_req && !ack_d) begin
      failures++; $display("req dropped without ack");
    end
    if (rst_n && !req_d && aer_req && ack_d) begin
      failures++; $display("req raised while ack high");
    end
  end

  initial begin
    for (int i = 0; i < N; i++) sent[i] = AW'($urandom);
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = sent[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      in_data  = '0;
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (n_rx != N) begin failures++; $display("received %0d of %0d", n_rx, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_map_ram: checks the mapping table memory at its full 512K x 32 size.
// Words are written at random addresses (including the first and last
// word), then read back with the one-clock read latency; a read of a word in
// the clock it is overwritten must return the old word, and rdata must hold
// its value while re is low.
module tb_map_ram;
  localparam int AW = 19, DW = 32, N = 2000;
  logic clk = 0;
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [AW-1:0] addrs [N];
  logic [DW-1:0] model [logic [AW-1:0]];

  map_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) addrs[i] = AW'($urandom);
    addrs[0] = '0;
    addrs[1] = '1;
    // write
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1; waddr = addrs[i]; wdata = $urandom;
      model[addrs[i]] = wdata;
    end
    @(negedge clk); we = 0;
    // read back
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      re = 1; raddr = addrs[i];
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata !== model[addrs[i]]) begin
        failures++; $display("addr %h: %h expected %h", addrs[i], rdata, model[addrs[i]]);
      end
      raddr = addrs[(i + 1) % N];
      @(negedge clk);
      checks++;
      if (rdata !== model[addrs[i]]) begin failures++; $display("rdata not held"); end
    end
    // read during write returns the old word
    @(negedge clk);
    re = 1; raddr = addrs[5]; we = 1; waddr = addrs[5]; wdata = ~model[addrs[5]];
    @(negedge clk);
    re = 0; we = 0;
    checks++;
    if (rdata !== model[addrs[5]]) begin failures++; $display("read-during-write"); end
    model[addrs[5]] = ~model[addrs[5]];
    re = 1;
    @(negedge clk);
    re = 0;
    checks++;
    if (rdata !== model[addrs[5]]) begin failures++; $display("write lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

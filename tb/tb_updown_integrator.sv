// tb_updown_integrator: checks per-pixel up-down integration of signed
// events. Two integrators take the same random event stream: one with the
// default 20-bit counters and one with 4-bit counters, which must saturate at
// +7 and -8 instead of wrapping. A reference model counts the events; after
// the stream every pixel used (and one never used) is read through the host
// port and compared. A clear must bring all counters back to zero.
module tb_updown_integrator;
  import aer_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, busy, busy4;
  logic in_valid = 0, in_ready, in_ready4;
  aer_evt_t in_evt = '0;
  logic rd_en = 0;
  logic [PIX_W-1:0] rd_pix = '0;
  logic rd_valid, rd_valid4;
  logic signed [19:0] rd_data;
  logic signed [3:0]  rd_data4;
  int checks = 0, failures = 0;
  int model [logic [PIX_W-1:0]];
  int model4 [logic [PIX_W-1:0]];
  int n_sat = 0;

  updown_integrator dut (.clk, .rst_n, .clear, .busy, .in_valid, .in_ready, .in_evt,
                         .rd_en, .rd_pix, .rd_valid, .rd_data);
  updown_integrator #(.CNT_W(4)) dut4 (.clk, .rst_n, .clear, .busy(busy4), .in_valid,
                         .in_ready(in_ready4), .in_evt, .rd_en, .rd_pix,
                         .rd_valid(rd_valid4), .rd_data(rd_data4));

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(aer_evt_t e);
    @(negedge clk);
    in_valid = 1; in_evt = e;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic check_pix(logic [PIX_W-1:0] p);
    int m  = model.exists(p) ? model[p] : 0;
    int m4 = model4.exists(p) ? model4[p] : 0;
    @(negedge clk);
    rd_en = 1; rd_pix = p;
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (!rd_valid || int'(rd_data) != m || int'(rd_data4) != m4) begin
      failures++;
      $display("pixel %h: %0d/%0d expected %0d/%0d", p, rd_data, rd_data4, m, m4);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (!busy);
    checks++;
    if (busy4 || in_ready4 !== in_ready) begin failures++; $display("instances out of step"); end
    for (int i = 0; i < 3000; i++) begin
      aer_evt_t e;
      e.pix = 16'h7700 + 16'($urandom_range(0, 7));
      // pixel 0 mostly positive, pixel 1 mostly negative, to reach saturation
      e.neg = (e.pix[2:0] == 0) ? ($urandom_range(0, 9) == 0) :
              (e.pix[2:0] == 1) ? ($urandom_range(0, 9) != 0) : 1'($urandom);
      begin
        int c, c4;
        c  = model.exists(e.pix) ? model[e.pix] : 0;
        c4 = model4.exists(e.pix) ? model4[e.pix] : 0;
        model[e.pix] = c + (e.neg ? -1 : 1);
        if (!e.neg && c4 < 7) c4++;
        else if (e.neg && c4 > -8) c4--;
        else n_sat++;
        model4[e.pix] = c4;
      end
      send(e);
    end
    repeat (3) @(negedge clk);
    for (int p = 0; p < 8; p++) check_pix(16'h7700 + 16'(p));
    check_pix(16'h0000);
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never reached"); end
    // clear
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    wait (!busy);
    model.delete(); model4.delete();
    for (int p = 0; p < 8; p++) check_pix(16'h7700 + 16'(p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

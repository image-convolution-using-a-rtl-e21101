// tb_halfimage_integrator: checks separate integration of the two
// half-images. Two instances take the same random signed event stream: one
// with default 20-bit counters and one with 3-bit counters, which must stop
// at 7. A reference model counts positive and negative events per pixel;
// every pixel used (and one never used) is read back and rd_pos, rd_neg and
// rd_diff compared. A clear must bring all counters back to zero.
module tb_halfimage_integrator;
  import aer_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, busy, busy3;
  logic in_valid = 0, in_ready, in_ready3;
  aer_evt_t in_evt = '0;
  logic rd_en = 0;
  logic [PIX_W-1:0] rd_pix = '0;
  logic rd_valid, rd_valid3;
  logic [REC_W-1:0] rd_pos, rd_neg;
  logic signed [REC_W:0] rd_diff;
  logic [2:0] rd_pos3, rd_neg3;
  logic signed [3:0] rd_diff3;
  int checks = 0, failures = 0;
  int mpos [logic [PIX_W-1:0]];
  int mneg [logic [PIX_W-1:0]];

  halfimage_integrator dut (.clk, .rst_n, .clear, .busy, .in_valid, .in_ready, .in_evt,
                            .rd_en, .rd_pix, .rd_valid, .rd_pos, .rd_neg, .rd_diff);
  halfimage_integrator #(.CNT_W(3)) dut3 (.clk, .rst_n, .clear, .busy(busy3), .in_valid,
                            .in_ready(in_ready3), .in_evt, .rd_en, .rd_pix,
                            .rd_valid(rd_valid3), .rd_pos(rd_pos3), .rd_neg(rd_neg3),
                            .rd_diff(rd_diff3));

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

  function automatic int sat3(int v);
    return (v > 7) ? 7 : v;
  endfunction

  task automatic check_pix(logic [PIX_W-1:0] p);
    int mp = mpos.exists(p) ? mpos[p] : 0;
    int mn = mneg.exists(p) ? mneg[p] : 0;
    @(negedge clk);
    rd_en = 1; rd_pix = p;
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (!rd_valid || int'(rd_pos) != mp || int'(rd_neg) != mn || int'(rd_diff) != mp - mn ||
        int'(rd_pos3) != sat3(mp) || int'(rd_neg3) != sat3(mn) ||
        int'(rd_diff3) != sat3(mp) - sat3(mn)) begin
      failures++;
      $display("pixel %h: +%0d -%0d d%0d / +%0d -%0d d%0d, expected +%0d -%0d", p, rd_pos,
               rd_neg, rd_diff, rd_pos3, rd_neg3, rd_diff3, mp, mn);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (!busy);
    checks++;
    if (busy3 || in_ready3 !== in_ready) begin failures++; $display("instances out of step"); end
    for (int i = 0; i < 2000; i++) begin
      aer_evt_t e;
      e.pix = 16'h3300 + 16'($urandom_range(0, 7));
      // pixel 0 only positive, pixel 1 only negative
      e.neg = (e.pix[2:0] == 0) ? 1'b0 : (e.pix[2:0] == 1) ? 1'b1 : 1'($urandom);
      if (e.neg) mneg[e.pix] = (mneg.exists(e.pix) ? mneg[e.pix] : 0) + 1;
      else       mpos[e.pix] = (mpos.exists(e.pix) ? mpos[e.pix] : 0) + 1;
      send(e);
    end
    repeat (3) @(negedge clk);
    for (int p = 0; p < 8; p++) check_pix(16'h3300 + 16'(p));
    check_pix(16'h0000);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    wait (!busy);
    mpos.delete(); mneg.delete();
    for (int p = 0; p < 8; p++) check_pix(16'h3300 + 16'(p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
